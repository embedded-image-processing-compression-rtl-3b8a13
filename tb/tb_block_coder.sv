// tb_block_coder: three 8-line bands of 32 coefficients (4 windows each) are coded.
// Each window is built to be uniform, to have uniform 4x4 quadrants, uniform 2x2
// sub-windows or none, from values around the threshold. The tokens are compared
// with a model quadtree coder, every kind of token must appear, the input must be
// held off while a band is coded, at least the 8 load clocks of every window.
module tb_block_coder;
  import hsc_pkg::*;
  import hsc_ref_pkg::*;
  localparam int LEN = 32, NB = 3;
  logic    clk = 0, rst_n = 0;
  coef_t   thr = 16'sd3;
  logic    in_valid = 0, in_ready;
  coef_t   in_coef = '0;
  logic    out_valid, out_ready = 0;
  bc_tok_t out_tok;
  int      checks = 0, failures = 0;
  bc_tok_t exp_t[$];
  int      n_kind [4];
  int      stalled = 0;

  always #5 clk = ~clk;
  block_coder #(.LINE_LEN(LEN)) dut (.*);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    bc_tok_t e;
    e = exp_t.pop_front();
    checks++;
    n_kind[out_tok.kind]++;
    if (out_tok != e) begin
      failures++;
      if (failures < 10) $display("token %p expected %p", out_tok, e);
    end
  end
  always @(posedge clk) if (rst_n && !in_ready) stalled++;

  function automatic bit uni(input int w [8][8], input int r0, input int c0, input int sz);
    for (int r = r0; r < r0 + sz; r++)
      for (int c = c0; c < c0 + sz; c++)
        if (w[r][c] != w[r0][c0]) return 0;
    return 1;
  endfunction

  task automatic model(input int w [8][8]);
    if (uni(w, 0, 0, 8)) begin
      exp_t.push_back('{BC_U8, coef_t'(w[0][0])});
      return;
    end
    for (int q = 0; q < 4; q++) begin
      int r4, c4;
      r4 = (q / 2) * 4; c4 = (q % 2) * 4;
      if (uni(w, r4, c4, 4)) exp_t.push_back('{BC_U4, coef_t'(w[r4][c4])});
      else
        for (int s = 0; s < 4; s++) begin
          int r2, c2;
          r2 = r4 + (s / 2) * 2; c2 = c4 + (s % 2) * 2;
          if (uni(w, r2, c2, 2)) exp_t.push_back('{BC_U2, coef_t'(w[r2][c2])});
          else
            for (int p = 0; p < 4; p++) exp_t.push_back('{BC_RAW, coef_t'(w[r2 + p/2][c2 + p%2])});
        end
    end
  endtask

  int img [8][LEN];
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      for (int b = 0; b < NB; b++) begin
        // build the band: window kind = (b + k) % 4
        for (int k = 0; k < LEN / 8; k++) begin
          automatic int kind = (b + k) % 4;
          automatic int w [8][8];
          for (int r = 0; r < 8; r++)
            for (int c = 0; c < 8; c++) begin
              int v;
              case (kind)
                0: v = int'($urandom_range(4)) - 2;                         // below threshold
                1: v = ((r / 4) * 2 + c / 4) * 7 + int'($urandom_range(2)) - 1 + ((r/4 + c/4 == 0) ? 0 : 0);
                2: v = ((r / 2) * 4 + c / 2) * 5 - 20;
                default: v = int'($urandom_range(200)) - 100;
              endcase
              if (kind == 1 && ((r / 4) * 2 + c / 4) != 0) v = ((r / 4) * 2 + c / 4) * 7;
              img[r][k*8 + c] = v;
              w[r][c] = (iabs(v) < 3) ? 0 : v;
            end
          model(w);
        end
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < LEN; c++) begin
            in_valid = 1;
            in_coef  = coef_t'(img[r][c]);
            @(posedge clk);
            while (!in_ready) @(posedge clk);
            @(negedge clk);
          end
        in_valid = 0;
      end
      forever begin
        out_ready = ($urandom_range(4) != 0);
        @(negedge clk);
      end
    join_any
    out_ready = 1;
    wait (exp_t.size() == 0);
    repeat (4) @(negedge clk);
    checks++;
    if (out_valid) failures++;
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_kind[k] == 0) begin failures++; $display("token kind %0d never sent", k); end
    end
    checks++;
    if (stalled < NB * (LEN / 8) * 8) begin failures++; $display("input held off only %0d clocks", stalled); end
    $display("U8 %0d U4 %0d U2 %0d RAW %0d, input held %0d clocks", n_kind[0], n_kind[1], n_kind[2], n_kind[3], stalled);
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
