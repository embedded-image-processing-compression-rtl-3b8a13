// tb_run_extract: two frames of 6 rows of 40 pixels (runs of random length, runs
// crossing word borders, runs touching both row ends) are coded under a random ready;
// the event list (start/end, x, y) must equal the model's. Then, with ready held low,
// a small FIFO is overfilled and the overflow flag must rise.
module tb_run_extract;
  import hsc_pkg::*;
  localparam int LW = 4, N = LW * LANES, ROWS = 6;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0, in_first = 0, in_last = 0;
  logic [LANES-1:0] in_bits = '0;
  logic out_valid, out_ready = 0, overflow;
  run_evt_t out_evt;
  int   checks = 0, failures = 0, n_start = 0, n_end = 0;
  run_evt_t exp_e[$];

  always #5 clk = ~clk;
  run_extract #(.FIFO_DEPTH(8)) dut (.*);

  function automatic run_evt_t ev(input bit e, input int x, input int y);
    run_evt_t r;
    r.is_end = e; r.x = 11'(x); r.y = 11'(y);
    return r;
  endfunction

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    run_evt_t e;
    e = exp_e.pop_front();
    checks++;
    if (out_evt != e) begin
      failures++;
      if (failures < 10) $display("event %p expected %p", out_evt, e);
    end
    if (out_evt.is_end) n_end++; else n_start++;
  end

  task automatic frame(input int seed_kind);
    for (int y = 0; y < ROWS; y++) begin
      automatic bit row[$];
      automatic bit prev = 0;
      for (int x = 0; x < N; x++) begin
        bit b;
        b = (seed_kind == 0 && y == 0) ? 1'b1 : (x % 7 == y) ? !prev : ($urandom_range(5) == 0) ? !prev : prev;
        row.push_back(b);
        if (b && !prev) exp_e.push_back(ev(0, x, y));
        if (!b && prev) exp_e.push_back(ev(1, x - 1, y));
        prev = b;
      end
      if (prev) exp_e.push_back(ev(1, N - 1, y));
      for (int w = 0; w < LW; w++) begin
        in_valid = 1;
        in_sof   = (y == 0 && w == 0);
        in_first = (w == 0);
        in_last  = (w == LW - 1);
        for (int j = 0; j < LANES; j++) in_bits[j] = row[w*LANES + j];
        @(negedge clk);
        in_valid = 0;
        repeat (12) @(negedge clk);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      begin frame(0); frame(1); end
      forever begin out_ready = ($urandom_range(3) != 0); @(negedge clk); end
    join_any
    disable fork;
    out_ready = 1;
    repeat (40) @(negedge clk);
    checks++;
    if (exp_e.size() != 0) begin failures++; $display("%0d events missing", exp_e.size()); end
    checks++;
    if (overflow) failures++;
    // overflow: nothing is read while words full of runs arrive
    out_ready = 0;
    for (int w = 0; w < 12; w++) begin
      in_valid = 1; in_sof = 0; in_first = (w == 0); in_last = 0; in_bits = 10'b0101010101;
      @(negedge clk);
    end
    in_valid = 0;
    checks++;
    if (!overflow) failures++;
    $display("starts %0d ends %0d", n_start, n_end);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
