// tb_coef_fifo_bank: writes two wavelet lines (LINE_WORDS = 8) band by band, checks
// that lines_ready counts them, reads both lines back band by band from the right
// parity set and compares every coefficient, checks that releasing lines counts
// down, and finally overfills one FIFO to check the sticky overflow flag.
module tb_coef_fifo_bank;
  import hsc_pkg::*;
  localparam int LW = 8;
  logic  clk = 0, rst_n = 0;
  logic  wr_valid [4], wr_last [4];
  coef_t wr_data  [4][HALF];
  band_e rd_band = BAND_A3;
  logic  rd_parity = 0, rd_en = 0, line_release = 0;
  coef_t rd_data [HALF];
  logic [1:0] lines_ready;
  logic  overflow;
  int    checks = 0, failures = 0;
  int    store [2][4][$];

  always #5 clk = ~clk;
  coef_fifo_bank #(.LINE_WORDS(LW)) dut (.*);

  function automatic int groups(input int b);
    return (b == 3) ? LW : (b == 2) ? LW / 2 : LW / 4;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write_line(input int par);
    // D1 groups first, then the lower rates, as the pyramid would interleave them
    for (int b = 3; b >= 0; b--)
      for (int g = 0; g < groups(b); g++) begin
        for (int i = 0; i < 4; i++) wr_valid[i] = 0;
        wr_valid[b] = 1;
        wr_last[b]  = (g == groups(b) - 1);
        for (int k = 0; k < HALF; k++) begin
          wr_data[b][k] = coef_t'($urandom);
          store[par][b].push_back(int'(wr_data[b][k]));
        end
        @(negedge clk);
      end
    for (int i = 0; i < 4; i++) wr_valid[i] = 0;
  endtask

  task automatic read_line(input int par);
    rd_parity = par[0];
    for (int b = 0; b < 4; b++) begin
      rd_band = band_e'(b);
      for (int g = 0; g < groups(b); g++) begin
        #1;
        for (int k = 0; k < HALF; k++)
          check(int'(rd_data[k]) == store[par][b].pop_front(), $sformatf("data p%0d b%0d g%0d", par, b, g));
        rd_en = 1;
        @(negedge clk);
        rd_en = 0;
      end
    end
    line_release = 1;
    @(negedge clk);
    line_release = 0;
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin
      wr_valid[i] = 0; wr_last[i] = 0;
      for (int k = 0; k < HALF; k++) wr_data[i][k] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(lines_ready == 0, "empty after reset");
    write_line(0);
    check(lines_ready == 1, "one line ready");
    write_line(1);
    check(lines_ready == 2, "two lines ready");
    check(!overflow, "no overflow yet");
    read_line(0);
    check(lines_ready == 1, "one line after release");
    read_line(1);
    check(lines_ready == 0, "none after release");
    // overfill the even D1 FIFO
    for (int g = 0; g <= LW; g++) begin
      wr_valid[3] = 1; wr_last[3] = 0;
      @(negedge clk);
    end
    wr_valid[3] = 0;
    check(overflow, "overflow flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
