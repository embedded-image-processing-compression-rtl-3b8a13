// tb_pixel_binarize: random pixels against random thresholds (and the extremes);
// each bit must equal pixel >= thr one clock later, with the flags delayed alike.
module tb_pixel_binarize;
  import hsc_pkg::*;
  logic clk = 0, rst_n = 0;
  pix_t thr = '0;
  logic in_valid = 0, in_sof = 0, in_first = 0, in_last = 0;
  pix_t in_pix [LANES];
  logic out_valid, out_sof, out_first, out_last;
  logic [LANES-1:0] out_bits;
  int   checks = 0, failures = 0;
  logic [LANES-1:0] exp_bits;
  logic [3:0]       exp_flags;

  always #5 clk = ~clk;
  pixel_binarize dut (.*);

  initial begin
    for (int i = 0; i < LANES; i++) in_pix[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      thr      = (n < 20) ? '0 : (n < 40) ? 10'd1023 : pix_t'($urandom);
      in_valid = $urandom_range(1);
      in_sof   = $urandom_range(1);
      in_first = $urandom_range(1);
      in_last  = $urandom_range(1);
      for (int i = 0; i < LANES; i++) begin
        in_pix[i]   = ($urandom_range(3) == 0) ? thr : pix_t'($urandom);
        exp_bits[i] = (in_pix[i] >= thr);
      end
      exp_flags = {in_valid, in_valid & in_sof, in_first, in_last};
      @(negedge clk);
      checks++;
      if (out_bits != exp_bits || {out_valid, out_sof, out_first, out_last} != exp_flags) failures++;
    end
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
