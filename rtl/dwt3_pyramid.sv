// dwt3_pyramid: three-level 1D wavelet transform of the sensor stream, 10 pixels
// per clock (the 1D10P-DWT).
//
// Three ls1d_10p stages are cascaded as a pyramid: stage 1 transforms the pixels,
// and each following stage transforms the approximations of the one before, joined
// into 10-sample words by approx_pack. The four outputs are the detail coefficients
// of levels 1, 2 and 3 and the approximation of level 3, each as groups of 5
// coefficients with first/last-of-line flags. For a 1280-pixel line this gives
// 128 groups of D1, 64 of D2, 32 of D3 and 32 of A3 (1280 coefficients). Level 2 and
// 3 run at a half and a quarter of the input word rate. The transform is purely
// horizontal, so no line memory is needed.
//
// Pixels are taken as unsigned and widened to coefficient width. Latency: stage 1
// output two cycles after the next word, each further level adds the pack register
// and its own stage delay.
module dwt3_pyramid
  import hsc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,
  input  logic  in_last,
  input  pix_t  in_pix [LANES],
  // detail level 1..3 (index 0..2) and approximation level 3
  output logic  det_valid [3],
  output logic  det_first [3],
  output logic  det_last  [3],
  output coef_t det_data  [3][HALF],
  output logic  app_valid,
  output logic  app_first,
  output logic  app_last,
  output coef_t app_data  [HALF]
);
  coef_t s_in    [3][LANES];
  logic  s_valid [3], s_first [3], s_last [3];
  logic  a_valid [3], a_first [3], a_last [3];
  coef_t a_data  [3][HALF];

  always_comb begin
    for (int i = 0; i < LANES; i++) s_in[0][i] = coef_t'({1'b0, in_pix[i]});
    s_valid[0] = in_valid;
    s_first[0] = in_first;
    s_last[0]  = in_last;
  end

  for (genvar l = 0; l < 3; l++) begin : g_level
    ls1d_10p u_stage (
      .clk, .rst_n,
      .in_valid (s_valid[l]), .in_first(s_first[l]), .in_last(s_last[l]), .in_data(s_in[l]),
      .out_valid(a_valid[l]), .out_first(a_first[l]), .out_last(a_last[l]),
      .out_det  (det_data[l]), .out_app(a_data[l])
    );
    assign det_valid[l] = a_valid[l];
    assign det_first[l] = a_first[l];
    assign det_last[l]  = a_last[l];
    if (l < 2) begin : g_pack
      approx_pack u_pack (
        .clk, .rst_n,
        .in_valid (a_valid[l]), .in_first(a_first[l]), .in_last(a_last[l]), .in_data(a_data[l]),
        .out_valid(s_valid[l+1]), .out_first(s_first[l+1]), .out_last(s_last[l+1]),
        .out_data (s_in[l+1])
      );
    end
  end

  assign app_valid = a_valid[2];
  assign app_first = a_first[2];
  assign app_last  = a_last[2];
  assign app_data  = a_data[2];
endmodule
