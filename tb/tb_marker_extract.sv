// tb_marker_extract: three frames of 10 rows of 40 pixels with a textured
// background, a bright belt whose right end moves, and small bright textured
// markers. The marker image is compared bit by bit with a model built from the
// definitions: threshold, Sobel magnitude > edge_thr, ROI from the previous frame's
// rightmost edge, AND of the three, then 3x3 erosion.
module tb_marker_extract;
  import hsc_pkg::*;
  import hsc_ref_pkg::*;
  localparam int LW = 4, N = LW * LANES, ROWS = 10, NF = 3;
  logic clk = 0, rst_n = 0;
  pix_t bin_thr = 10'd500;
  logic [SOBEL_W-1:0] edge_thr = 13'd400;
  logic [10:0] roi_len = 11'd25, roi_y0 = 11'd1, roi_y1 = 11'd9;
  logic in_valid = 0, in_sof = 0, in_first = 0, in_last = 0;
  pix_t in_pix [LANES];
  logic thr_valid, thr_sof, thr_first, thr_last, mk_valid;
  logic [LANES-1:0] thr_bits, edge_bits, roi_bits, mk_bits;
  logic [10:0] roi_x0, roi_x1;
  int   checks = 0, failures = 0, ones = 0;
  int   f[$], m[$];
  bit   exp_mk[$];
  int   word_in = 0, word_out = 0;

  always #5 clk = ~clk;
  marker_extract #(.LINE_WORDS(LW)) dut (.*);

  always @(posedge clk) if (rst_n && mk_valid) begin
    for (int j = 0; j < LANES; j++) begin
      checks++;
      if (mk_bits[j] != exp_mk[word_out*LANES + j]) begin
        failures++;
        if (failures < 10) $display("word %0d lane %0d: got %0d", word_out, j, mk_bits[j]);
      end
      if (mk_bits[j]) ones++;
    end
    word_out++;
  end

  initial begin
    int x0 = 0, x1 = 0, right, found;
    for (int i = 0; i < LANES; i++) in_pix[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int fr = 0; fr < NF; fr++) begin
      found = 0; right = 0;
      for (int y = 0; y < ROWS; y++)
        for (int w = 0; w < LW; w++) begin
          for (int j = 0; j < LANES; j++) begin
            int x, v, i, e;
            x = w*LANES + j;
            if (y >= 7 && x < 20 + 6*fr) v = 1000;
            else if ((y >= 2 && y < 5 && x >= 8 + 3*fr && x < 11 + 3*fr) ||
                     (y >= 3 && y < 6 && x >= 22 && x < 25)) v = 600 + int'($urandom_range(423));
            else v = 100 + int'($urandom_range(40));
            in_pix[j] = pix_t'(v);
            f.push_back(v);
            i = f.size() - 1;
            e = (sobel_at(f, i, N) > 400) ? 1 : 0;
            if (e == 1) begin found = 1; if (x > right) right = x; end
            m.push_back((e == 1 && v >= 500 && x >= x0 && x <= x1 && y >= 1 && y <= 9) ? 1 : 0);
            exp_mk.push_back(morph_at(m, i, N, 0) == 1);
          end
          in_valid = 1; in_sof = (y == 0 && w == 0); in_first = (w == 0); in_last = (w == LW - 1);
          @(negedge clk);
          word_in++;
          in_valid = 0;
          if ($urandom_range(2) == 0) @(negedge clk);
        end
      if (found) begin x1 = right; x0 = (right > 25) ? right - 25 : 0; end
    end
    repeat (5) @(negedge clk);
    checks++;
    if (word_out != word_in) failures++;
    checks++;
    if (ones == 0) begin failures++; $display("no marker pixel found"); end
    $display("marker pixels %0d, roi %0d..%0d", ones, roi_x0, roi_x1);
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
