// tb_coef_serializer: the wavelet front end of the compression path (pyramid, FIFO
// bank, serializer) with LINE_WORDS = 8. Random lines go in; the serial stream must
// equal, line after line, the model's A3|D3|D2|D1 line, with the band tags and the
// end-of-line flag, under a random ready. The serializer must take exactly one clock
// per coefficient while ready is held high.
module tb_coef_serializer;
  import hsc_pkg::*;
  import hsc_ref_pkg::*;
  localparam int LW = 8, NLINE = 12;
  logic  clk = 0, rst_n = 0;
  logic  in_valid = 0, in_first = 0, in_last = 0;
  pix_t  in_pix [LANES];
  logic  det_valid [3], det_first [3], det_last [3];
  coef_t det_data  [3][HALF];
  logic  app_valid, app_first, app_last;
  coef_t app_data  [HALF];
  logic  bw_valid [4], bw_last [4];
  coef_t bw_data  [4][HALF];
  band_e rd_band;
  logic  rd_parity, rd_en, line_release, overflow;
  coef_t rd_data [HALF];
  logic [1:0] lines_ready;
  logic  out_valid, out_ready = 0, out_eol;
  coef_t out_coef;
  band_e out_band;
  int    checks = 0, failures = 0;
  int    exp_q[$], exp_band[$];
  bit    always_ready = 0;
  int    stall_cycles = 0, lines_out = 0;

  always #5 clk = ~clk;

  dwt3_pyramid u_dwt (.clk, .rst_n, .in_valid, .in_first, .in_last, .in_pix,
    .det_valid, .det_first, .det_last, .det_data, .app_valid, .app_first, .app_last, .app_data);
  always_comb begin
    bw_valid[0] = app_valid;    bw_last[0] = app_last;    bw_data[0] = app_data;
    bw_valid[1] = det_valid[2]; bw_last[1] = det_last[2]; bw_data[1] = det_data[2];
    bw_valid[2] = det_valid[1]; bw_last[2] = det_last[1]; bw_data[2] = det_data[1];
    bw_valid[3] = det_valid[0]; bw_last[3] = det_last[0]; bw_data[3] = det_data[0];
  end
  coef_fifo_bank #(.LINE_WORDS(LW)) u_bank (.clk, .rst_n, .wr_valid(bw_valid), .wr_last(bw_last),
    .wr_data(bw_data), .rd_band, .rd_parity, .rd_en, .rd_data, .line_release, .lines_ready, .overflow);
  coef_serializer #(.LINE_WORDS(LW)) dut (.*);

  int pos = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      int e, eb;
      e  = exp_q.pop_front();
      eb = exp_band.pop_front();
      checks++;
      if (int'(out_coef) != e || int'(out_band) != eb) begin
        failures++;
        if (failures < 30) $display("pos %0d: got %0d/%0d exp %0d/%0d", pos, out_coef, out_band, e, eb);
      end
      checks++;
      if (out_eol != (pos == LW * LANES - 1)) failures++;
      pos = (pos == LW * LANES - 1) ? 0 : pos + 1;
      if (out_eol) lines_out++;
    end
    if (always_ready && !out_valid && pos != 0) stall_cycles++;
  end

  initial begin
    for (int i = 0; i < LANES; i++) in_pix[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      for (int ln = 0; ln < NLINE; ln++) begin
        automatic int x[$];
        automatic int w[$];
        for (int i = 0; i < LW * LANES; i++) x.push_back(int'($urandom_range(1023)));
        dwt_line(x, w);
        foreach (w[i]) begin
          exp_q.push_back(w[i]);
          exp_band.push_back(i < LW*LANES/8 ? 0 : i < LW*LANES/4 ? 1 : i < LW*LANES/2 ? 2 : 3);
        end
        for (int wd = 0; wd < LW; wd++) begin
          in_valid = 1; in_first = (wd == 0); in_last = (wd == LW - 1);
          for (int i = 0; i < LANES; i++) in_pix[i] = pix_t'(x[wd*LANES+i]);
          @(negedge clk);
          in_valid = 0;
          repeat (9 + ((ln < NLINE/2) ? 4 : 0)) @(negedge clk);   // keep below the serial rate
        end
      end
      begin
        while (lines_out < NLINE) begin
          out_ready = (lines_out >= NLINE / 2) ? 1'b1 : ($urandom_range(3) != 0);
          always_ready = (lines_out >= NLINE / 2);
          @(negedge clk);
        end
      end
    join
    checks++;
    if (exp_q.size() != 0 || overflow) failures++;
    checks++;
    if (stall_cycles != 0) begin failures++; $display("serializer idled %0d clocks inside a line", stall_cycles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
