// marker_extract: marker segmentation for the mouse-tracking application.
//
// From the incoming 10-pixel words two operators run in parallel: threshold
// binarisation (pixel_binarize) and the Sobel edge detector (sobel_10p), whose
// magnitude is compared with edge_thr to give an edge image. The edge image also
// drives roi_locator, which places the ROI behind the detected right edge. The
// three images are merged by a logic AND (inside ROI, bright, and on an edge) and
// the result is eroded with a 3x3 square to remove isolated pixels, giving the
// marker image. The choice of AND as the merge and of a 3x3 erosion are this
// design's; the operators and their order follow the application description.
//
// All images are aligned on the pixel stream index (Sobel and erosion results sit at
// the bottom-right of their windows). Latency: 3 clocks from input to marker bits.
// thr_* outputs give the binarised image (1 clock) for run coding.
module marker_extract
  import hsc_pkg::*;
#(
  parameter int unsigned LINE_WORDS = IMG_W / LANES
) (
  input  logic               clk,
  input  logic               rst_n,
  input  pix_t               bin_thr,
  input  logic [SOBEL_W-1:0] edge_thr,
  input  logic [10:0]        roi_len,
  input  logic [10:0]        roi_y0,
  input  logic [10:0]        roi_y1,
  input  logic               in_valid,
  input  logic               in_sof,
  input  logic               in_first,
  input  logic               in_last,
  input  pix_t               in_pix [LANES],
  output logic               thr_valid,
  output logic               thr_sof,
  output logic               thr_first,
  output logic               thr_last,
  output logic [LANES-1:0]   thr_bits,
  output logic [LANES-1:0]   edge_bits,
  output logic [LANES-1:0]   roi_bits,
  output logic [10:0]        roi_x0,
  output logic [10:0]        roi_x1,
  output logic               mk_valid,
  output logic [LANES-1:0]   mk_bits
);
  logic               s_valid;
  logic [SOBEL_W-1:0] s_g [LANES];
  logic               m_valid;
  logic [LANES-1:0]   m_bits;

  pixel_binarize u_bin (
    .clk, .rst_n, .thr(bin_thr),
    .in_valid, .in_sof, .in_first, .in_last, .in_pix,
    .out_valid(thr_valid), .out_sof(thr_sof), .out_first(thr_first), .out_last(thr_last),
    .out_bits(thr_bits)
  );

  sobel_10p #(.LINE_WORDS(LINE_WORDS)) u_sobel (
    .clk, .rst_n, .in_valid, .in_pix, .out_valid(s_valid), .out_g(s_g));

  always_comb
    for (int j = 0; j < LANES; j++) edge_bits[j] = (s_g[j] > edge_thr);

  roi_locator u_roi (
    .clk, .rst_n, .len(roi_len), .y0(roi_y0), .y1(roi_y1),
    .in_valid(thr_valid), .in_sof(thr_sof), .in_first(thr_first), .in_edge(edge_bits),
    .roi_bits, .roi_x0, .roi_x1
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid <= 1'b0;
      m_bits  <= '0;
    end else begin
      m_valid <= thr_valid;
      m_bits  <= roi_bits & thr_bits & edge_bits;
    end
  end

  morph3x3 #(.LINE_WORDS(LINE_WORDS), .OP(1'b0)) u_erode (
    .clk, .rst_n, .in_valid(m_valid), .in_bits(m_bits), .out_valid(mk_valid), .out_bits(mk_bits));

  assert property (@(posedge clk) disable iff (!rst_n) s_valid == thr_valid)
    else $error("marker_extract: binarised and edge streams out of step");
endmodule
