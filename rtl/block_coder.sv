// block_coder: threshold and quadtree block coding of the wavelet image (the "+BC"
// coder).
//
// Coefficients arrive one per clock, line after line (LINE_LEN per line). Each is
// thresholded (magnitude below thr becomes 0) and written into an 8-line buffer,
// one memory per line. When the eighth line is complete the buffer is coded window
// by window (n = 8): the 64 values of an 8x8 window are loaded column by column
// (8 clocks, one value from every line memory per clock) and tested for uniformity.
// A uniform window is sent as one BC_U8 token. Otherwise each 4x4 quadrant, in the
// order top-left, top-right, bottom-left, bottom-right, is sent as BC_U4 when
// uniform, or else split into its four 2x2 sub-windows in the same order, each sent
// as BC_U2 when uniform or as four BC_RAW tokens in raster order. Uniform means all
// values equal; the value of a uniform window is its (common) value. The window
// size and the 8/4/2 splitting follow the camera description; the uniformity rule,
// the token set and the order are choices of this design.
//
// The input is stalled (in_ready low) while the buffer is being coded, so this coder
// is slower than the sensor; the coefficient FIFOs in front of it absorb the lines.
// Handshakes are valid/ready; tokens leave one per clock at most.
module block_coder
  import hsc_pkg::*;
#(
  parameter int unsigned LINE_LEN = IMG_W,  // coefficients per line, multiple of 8
  parameter int unsigned N        = 8       // window size and buffered lines
) (
  input  logic    clk,
  input  logic    rst_n,
  input  coef_t   thr,
  input  logic    in_valid,
  output logic    in_ready,
  input  coef_t   in_coef,
  output logic    out_valid,
  input  logic    out_ready,
  output bc_tok_t out_tok
);
  localparam int unsigned CW = $clog2(LINE_LEN);
  typedef enum logic [1:0] {S_FILL, S_LOAD, S_EMIT} state_e;

  coef_t          lines [N][LINE_LEN];
  coef_t          win   [N][N];
  state_e         state;
  logic [CW-1:0]  col;
  logic [$clog2(N)-1:0] row, lc;   // fill row, load column
  logic [CW-1:0]  blk_base;
  logic [1:0]     q, s, p;         // quadrant, sub-window, pixel
  logic           u8;
  logic           u4 [4];
  logic           u2 [4][4];
  coef_t          mag, thr_coef;

  assign mag      = (in_coef < 0) ? -in_coef : in_coef;
  assign thr_coef = (mag < thr) ? '0 : in_coef;
  assign in_ready = (state == S_FILL);

  // uniformity of the window, its quadrants and their 2x2 sub-windows
  function automatic logic uniform(input coef_t w [N][N], input int r0, input int c0, input int sz);
    logic u;
    u = 1'b1;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        if (r >= r0 && r < r0 + sz && c >= c0 && c < c0 + sz && w[r][c] != w[r0][c0]) u = 1'b0;
    return u;
  endfunction

  always_comb begin
    u8 = uniform(win, 0, 0, 8);
    for (int qi = 0; qi < 4; qi++) begin
      u4[qi] = uniform(win, (qi / 2) * 4, (qi % 2) * 4, 4);
      for (int si = 0; si < 4; si++)
        u2[qi][si] = uniform(win, (qi / 2) * 4 + (si / 2) * 2, (qi % 2) * 4 + (si % 2) * 2, 2);
    end
  end

  // token for the current traversal position
  bc_tok_t tok;
  logic    last_tok;
  always_comb begin
    int r, c;
    r = int'(q[1]) * 4 + int'(s[1]) * 2 + int'(p[1]);
    c = int'(q[0]) * 4 + int'(s[0]) * 2 + int'(p[0]);
    if (u8) begin
      tok      = '{kind: BC_U8, value: win[0][0]};
      last_tok = 1'b1;
    end else if (u4[q]) begin
      tok      = '{kind: BC_U4, value: win[int'(q[1]) * 4][int'(q[0]) * 4]};
      last_tok = (q == 2'd3);
    end else if (u2[q][s]) begin
      tok      = '{kind: BC_U2, value: win[int'(q[1]) * 4 + int'(s[1]) * 2][int'(q[0]) * 4 + int'(s[0]) * 2]};
      last_tok = (q == 2'd3) && (s == 2'd3);
    end else begin
      tok      = '{kind: BC_RAW, value: win[r][c]};
      last_tok = (q == 2'd3) && (s == 2'd3) && (p == 2'd3);
    end
  end

  assign out_valid = (state == S_EMIT);
  assign out_tok   = tok;

  always_ff @(posedge clk) begin
    if (state == S_FILL && in_valid) lines[row][col] <= thr_coef;
    if (state == S_LOAD)
      for (int r = 0; r < N; r++) win[r][lc] <= lines[r][blk_base + CW'(lc)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_FILL;
      col      <= '0;
      row      <= '0;
      lc       <= '0;
      blk_base <= '0;
      q        <= '0;
      s        <= '0;
      p        <= '0;
    end else begin
      unique case (state)
        S_FILL: if (in_valid) begin
          if (col == CW'(LINE_LEN - 1)) begin
            col <= '0;
            row <= row + 1'b1;
            if (row == $bits(row)'(N - 1)) begin
              state    <= S_LOAD;
              blk_base <= '0;
              lc       <= '0;
            end
          end else begin
            col <= col + 1'b1;
          end
        end
        S_LOAD: begin
          lc <= lc + 1'b1;
          if (lc == $bits(lc)'(N - 1)) begin
            state <= S_EMIT;
            q <= '0; s <= '0; p <= '0;
          end
        end
        S_EMIT: if (out_ready) begin
          if (last_tok) begin
            if (blk_base == CW'(LINE_LEN - N)) begin
              state <= S_FILL;
            end else begin
              blk_base <= blk_base + CW'(N);
              lc       <= '0;
              state    <= S_LOAD;
            end
          end else if (u4[q]) begin
            q <= q + 1'b1;
          end else if (u2[q][s]) begin
            s <= s + 1'b1;
            if (s == 2'd3) q <= q + 1'b1;
          end else begin
            p <= p + 1'b1;
            if (p == 2'd3) begin
              s <= s + 1'b1;
              if (s == 2'd3) q <= q + 1'b1;
            end
          end
        end
        default: state <= S_FILL;
      endcase
    end
  end
endmodule
