// tb_sobel_10p: two frames of 6 lines of 40 pixels (LINE_WORDS = 4) with random
// pixels, a bright square and a saturated area, sent with random gaps. Every output
// must equal |g1| + |g2| computed from the defining equations on the raster stream
// (zero before the first pixel), one clock after its input word.
module tb_sobel_10p;
  import hsc_pkg::*;
  import hsc_ref_pkg::*;
  localparam int LW = 4, N = LW * LANES, ROWS = 12;
  logic clk = 0, rst_n = 0, in_valid = 0;
  pix_t in_pix [LANES];
  logic out_valid;
  logic [SOBEL_W-1:0] out_g [LANES];
  int   checks = 0, failures = 0, maxg = 0;
  int   f[$];

  always #5 clk = ~clk;
  sobel_10p #(.LINE_WORDS(LW)) dut (.*);

  initial begin
    for (int i = 0; i < LANES; i++) in_pix[i] = '0;
    for (int i = 0; i < N * ROWS; i++) begin
      int x, y;
      x = i % N; y = i / N;
      if (y >= 6 && y < 9) f.push_back(1023);
      else if (x >= 12 && x < 20 && y >= 2 && y < 5) f.push_back(900);
      else f.push_back(int'($urandom_range(1023)));
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < N * ROWS / LANES; w++) begin
      while ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      for (int j = 0; j < LANES; j++) in_pix[j] = pix_t'(f[w*LANES + j]);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      for (int j = 0; j < LANES; j++) begin
        int e;
        e = sobel_at(f, w*LANES + j, N);
        if (e > maxg) maxg = e;
        checks++;
        if (int'(out_g[j]) != e) begin
          failures++;
          if (failures < 10) $display("pixel %0d: got %0d exp %0d", w*LANES+j, out_g[j], e);
        end
      end
    end
    $display("largest magnitude %0d", maxg);
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
