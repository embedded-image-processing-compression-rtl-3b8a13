// hsc_pkg: types and constants shared by the high-speed camera processing blocks.
//
// The sensor delivers LANES (10) pixels of PIX_W (10) bits per clock, 1280 x 1024
// pixels per frame; these numbers follow the camera description. Wavelet
// coefficients are carried everywhere as COEF_W-bit two's complement values, a
// width chosen here so that three levels of the 5/3 transform of 10-bit pixels
// never overflow (the level-3 approximation stays within about -600..+2000).
package hsc_pkg;
  localparam int unsigned LANES   = 10;    // pixels per sensor word
  localparam int unsigned HALF    = 5;     // odd (or even) pixels per word
  localparam int unsigned PIX_W   = 10;    // sensor pixel width
  localparam int unsigned COEF_W  = 16;    // wavelet coefficient width
  localparam int unsigned IMG_W   = 1280;  // pixels per line
  localparam int unsigned IMG_H   = 1024;  // lines per frame
  localparam int unsigned SOBEL_W = 13;    // |g1| + |g2| width for 10-bit pixels

  typedef logic [PIX_W-1:0]         pix_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Wavelet bands in the order a rebuilt line is sent: A3 | D3 | D2 | D1.
  typedef enum logic [1:0] {
    BAND_A3 = 2'd0,
    BAND_D3 = 2'd1,
    BAND_D2 = 2'd2,
    BAND_D1 = 2'd3
  } band_e;

  // Run-length coder output token.
  typedef enum logic [1:0] {
    RLE_APPROX = 2'd0,  // approximation coefficient, sent as is
    RLE_LIT    = 2'd1,  // detail coefficient above the threshold
    RLE_RUN    = 2'd2   // run of 'value' detail coefficients below the threshold
  } rle_kind_e;

  typedef struct packed {
    rle_kind_e kind;
    logic      eol;     // last token of a wavelet line
    coef_t     value;   // coefficient, or run length for RLE_RUN
  } rle_tok_t;

  // Block coder output token (quadtree of an 8x8 window).
  typedef enum logic [1:0] {
    BC_U8  = 2'd0,  // whole 8x8 window uniform, value follows
    BC_U4  = 2'd1,  // 4x4 sub-window uniform
    BC_U2  = 2'd2,  // 2x2 sub-window uniform
    BC_RAW = 2'd3   // one coefficient of a non-uniform 2x2 sub-window
  } bc_kind_e;

  typedef struct packed {
    bc_kind_e kind;
    coef_t    value;
  } bc_tok_t;

  // Start or end of a high-level run in a binarised row.
  typedef struct packed {
    logic        is_end;  // 0: first pixel of the run, 1: last pixel of the run
    logic [10:0] x;
    logic [10:0] y;
  } run_evt_t;
endpackage
