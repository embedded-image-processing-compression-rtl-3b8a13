// pixel_binarize: threshold segmentation of 10 pixels per clock.
//
// Objects are coded as 1 and background as 0: a pixel becomes 1 when its grey value
// is at or above the user threshold thr, which the host sets at run time. All ten
// lanes are compared in parallel. The word flags (valid, start of frame, first and
// last word of a line) are delayed with the result. Latency: one clock.
module pixel_binarize
  import hsc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  pix_t             thr,
  input  logic             in_valid,
  input  logic             in_sof,
  input  logic             in_first,
  input  logic             in_last,
  input  pix_t             in_pix [LANES],
  output logic             out_valid,
  output logic             out_sof,
  output logic             out_first,
  output logic             out_last,
  output logic [LANES-1:0] out_bits
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      out_bits  <= '0;
    end else begin
      out_valid <= in_valid;
      out_sof   <= in_valid && in_sof;
      out_first <= in_first;
      out_last  <= in_last;
      for (int i = 0; i < LANES; i++) out_bits[i] <= (in_pix[i] >= thr);
    end
  end
endmodule
