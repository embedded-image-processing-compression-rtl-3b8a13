// hs_camera_top: processing unit of a high-speed CMOS camera (10 pixels per clock).
//
// The sensor controller delivers 10 pixels of 10 bits per clock (66 MHz for a
// 1280 x 1024 sensor at 500 frames/s). Two processing chains run on this stream side
// by side, and the host chooses which output it reads:
//
//   compression:  dwt3_pyramid (three-level 1D wavelet, 10 pixels/clock)
//                 -> coef_fifo_bank (8 FIFOs: 4 bands x even/odd line)
//                 -> coef_serializer (one wavelet line at a time, 1 coefficient/clock)
//                 -> rle_coder   (comp_mode = 0: threshold + run-length coding)
//                    block_coder (comp_mode = 1: threshold + 8x8 quadtree block coding)
//   analysis:     marker_extract (threshold, Sobel edges, ROI, merge, erosion)
//                 -> run_extract on the binarised image (start/end of each run per row)
//
// The wavelet path accepts the full sensor rate, but its coders take one coefficient
// per clock, so a sustained input faster than that fills the coefficient FIFOs and
// sets coef_overflow (sticky). comp_mode should only change while the coefficient
// path is idle (between frames). Output streams use valid/ready; the marker image is
// a plain stream without back-pressure. Pixel words are marked by px_valid, px_sof
// (first word of a frame), px_sol and px_eol (first and last word of a line).
// The sensor itself, its controller, the USB link and the board memories are
// outside this module.
module hs_camera_top
  import hsc_pkg::*;
#(
  parameter int unsigned LINE_WORDS = IMG_W / LANES   // 10-pixel words per line (128)
) (
  input  logic               clk,
  input  logic               rst_n,
  // sensor stream
  input  logic               px_valid,
  input  logic               px_sof,
  input  logic               px_sol,
  input  logic               px_eol,
  input  pix_t               px_data [LANES],
  // host settings
  input  logic               comp_mode,    // 0: RLE, 1: block coding
  input  coef_t              coef_thr,
  input  pix_t               bin_thr,
  input  logic [SOBEL_W-1:0] edge_thr,
  input  logic [10:0]        roi_len,
  input  logic [10:0]        roi_y0,
  input  logic [10:0]        roi_y1,
  // compressed streams
  output logic               rle_valid,
  input  logic               rle_ready,
  output rle_tok_t           rle_tok,
  output logic               bc_valid,
  input  logic               bc_ready,
  output bc_tok_t            bc_tok,
  output logic               coef_overflow,
  // analysis streams
  output logic               run_valid,
  input  logic               run_ready,
  output run_evt_t           run_evt,
  output logic               run_overflow,
  output logic               mk_valid,
  output logic [LANES-1:0]   mk_bits,
  output logic [10:0]        roi_x0,
  output logic [10:0]        roi_x1
);
  // ---------------- wavelet compression ----------------
  logic  det_valid [3], det_first [3], det_last [3];
  coef_t det_data  [3][HALF];
  logic  app_valid, app_first, app_last;
  coef_t app_data  [HALF];

  dwt3_pyramid u_dwt (
    .clk, .rst_n,
    .in_valid(px_valid), .in_first(px_sol), .in_last(px_eol), .in_pix(px_data),
    .det_valid, .det_first, .det_last, .det_data,
    .app_valid, .app_first, .app_last, .app_data
  );

  logic  bw_valid [4], bw_last [4];
  coef_t bw_data  [4][HALF];
  always_comb begin
    bw_valid[BAND_A3] = app_valid;     bw_last[BAND_A3] = app_last;     bw_data[BAND_A3] = app_data;
    bw_valid[BAND_D3] = det_valid[2];  bw_last[BAND_D3] = det_last[2];  bw_data[BAND_D3] = det_data[2];
    bw_valid[BAND_D2] = det_valid[1];  bw_last[BAND_D2] = det_last[1];  bw_data[BAND_D2] = det_data[1];
    bw_valid[BAND_D1] = det_valid[0];  bw_last[BAND_D1] = det_last[0];  bw_data[BAND_D1] = det_data[0];
  end

  band_e rd_band;
  logic  rd_parity, rd_en, line_release;
  coef_t rd_data [HALF];
  logic [1:0] lines_ready;

  coef_fifo_bank #(.LINE_WORDS(LINE_WORDS)) u_bank (
    .clk, .rst_n,
    .wr_valid(bw_valid), .wr_last(bw_last), .wr_data(bw_data),
    .rd_band, .rd_parity, .rd_en, .rd_data, .line_release, .lines_ready,
    .overflow(coef_overflow)
  );

  logic  sr_valid, sr_ready, sr_eol;
  coef_t sr_coef;
  band_e sr_band;

  coef_serializer #(.LINE_WORDS(LINE_WORDS)) u_ser (
    .clk, .rst_n,
    .rd_band, .rd_parity, .rd_en, .rd_data, .line_release, .lines_ready,
    .out_valid(sr_valid), .out_ready(sr_ready), .out_coef(sr_coef), .out_band(sr_band),
    .out_eol(sr_eol)
  );

  logic rle_in_ready, bc_in_ready;
  assign sr_ready = comp_mode ? bc_in_ready : rle_in_ready;

  rle_coder u_rle (
    .clk, .rst_n, .thr(coef_thr),
    .in_valid(sr_valid && !comp_mode), .in_ready(rle_in_ready),
    .in_coef(sr_coef), .in_band(sr_band), .in_eol(sr_eol),
    .out_valid(rle_valid), .out_ready(rle_ready), .out_tok(rle_tok)
  );

  block_coder #(.LINE_LEN(LINE_WORDS * LANES)) u_bc (
    .clk, .rst_n, .thr(coef_thr),
    .in_valid(sr_valid && comp_mode), .in_ready(bc_in_ready), .in_coef(sr_coef),
    .out_valid(bc_valid), .out_ready(bc_ready), .out_tok(bc_tok)
  );

  // ---------------- marker extraction ----------------
  logic             thr_valid, thr_sof, thr_first, thr_last;
  logic [LANES-1:0] thr_bits, edge_bits, roi_bits;

  marker_extract #(.LINE_WORDS(LINE_WORDS)) u_mk (
    .clk, .rst_n, .bin_thr, .edge_thr, .roi_len, .roi_y0, .roi_y1,
    .in_valid(px_valid), .in_sof(px_sof), .in_first(px_sol), .in_last(px_eol), .in_pix(px_data),
    .thr_valid, .thr_sof, .thr_first, .thr_last, .thr_bits, .edge_bits, .roi_bits,
    .roi_x0, .roi_x1, .mk_valid, .mk_bits
  );

  run_extract u_run (
    .clk, .rst_n,
    .in_valid(thr_valid), .in_sof(thr_sof), .in_first(thr_first), .in_last(thr_last),
    .in_bits(thr_bits),
    .out_valid(run_valid), .out_ready(run_ready), .out_evt(run_evt), .overflow(run_overflow)
  );
endmodule
