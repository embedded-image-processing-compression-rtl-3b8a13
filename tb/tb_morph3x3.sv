// tb_morph3x3: a binary image of 8 lines of 40 pixels with blobs and isolated
// pixels goes through an erosion and a dilation instance; every output bit is
// compared with the 3x3 AND / OR on the raster stream. Erosion must keep part of
// the blob and fewer ones than the input had.
module tb_morph3x3;
  import hsc_pkg::*;
  import hsc_ref_pkg::*;
  localparam int LW = 4, N = LW * LANES, ROWS = 8;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [LANES-1:0] in_bits = '0, ero_bits, dil_bits;
  logic ero_valid, dil_valid;
  int   checks = 0, failures = 0, kept = 0, ones = 0;
  int   f[$];

  always #5 clk = ~clk;
  morph3x3 #(.LINE_WORDS(LW), .OP(1'b0)) u_ero (.clk, .rst_n, .in_valid, .in_bits,
    .out_valid(ero_valid), .out_bits(ero_bits));
  morph3x3 #(.LINE_WORDS(LW), .OP(1'b1)) u_dil (.clk, .rst_n, .in_valid, .in_bits,
    .out_valid(dil_valid), .out_bits(dil_bits));

  initial begin
    for (int i = 0; i < N * ROWS; i++) begin
      int x, y;
      x = i % N; y = i / N;
      f.push_back(((x >= 5 && x < 14 && y >= 1 && y < 6) || (x == 30 && y == 3) ||
                   $urandom_range(15) == 0) ? 1 : 0);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < N * ROWS / LANES; w++) begin
      while ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      for (int j = 0; j < LANES; j++) in_bits[j] = f[w*LANES + j][0];
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!ero_valid || !dil_valid) failures++;
      for (int j = 0; j < LANES; j++) begin
        int i;
        i = w*LANES + j;
        checks += 2;
        if (int'(ero_bits[j]) != morph_at(f, i, N, 0)) failures++;
        if (int'(dil_bits[j]) != morph_at(f, i, N, 1)) failures++;
        if (ero_bits[j]) kept++;
        if (f[i] == 1) ones++;
      end
    end
    // the blob survives erosion, shrunk; isolated pixels do not
    checks++;
    if (kept == 0 || kept >= ones) failures++;
    $display("ones in %0d, after erosion %0d", ones, kept);
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
