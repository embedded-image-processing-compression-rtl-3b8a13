// sobel_10p: Sobel edge magnitude of 10 pixels per clock.
//
// With f the image taken as one raster stream of N pixels per line, the output for
// the pixel at stream index i is g = |g1| + |g2| with
//   g1 = (f[i] + 2 f[i-1] + f[i-2]) - (f[i-2N] + 2 f[i-2N-1] + f[i-2N-2])
//   g2 = h[i] - h[i-2],  h[i] = a[i] + a[i-N],  a[i] = f[i] + f[i-N]
// i.e. G1 = F (1+z^-1)^2 (1 - z^-2N) and G2 = F (1+z^-N)^2 (1 - z^-2). This is the
// factorised structure that needs three line FIFOs instead of six: f -> z^-N ->
// z^-N gives f[i-N] and f[i-2N], and one more line FIFO delays a. The result is
// indexed at the bottom-right pixel of the 3x3 window, as in the defining
// equations. The 2-pixel horizontal delays cross word borders, so lanes 8 and 9 of
// the previous word of each delayed stream are kept in registers. The stream runs on
// across line and frame ends; before the line FIFOs are filled they read zero.
//
// Interface: in_valid with 10 pixels; out_valid one clock later with 10 magnitudes
// of SOBEL_W (13) bits. LINE_WORDS is N / 10.
module sobel_10p
  import hsc_pkg::*;
#(
  parameter int unsigned LINE_WORDS = IMG_W / LANES
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  pix_t               in_pix [LANES],
  output logic               out_valid,
  output logic [SOBEL_W-1:0] out_g [LANES]
);
  typedef logic [PIX_W:0]   a_t;     // f + f
  typedef logic [PIX_W+1:0] s_t;     // 4 f

  logic [LANES*PIX_W-1:0]       f_w, f1_w, f2_w;
  logic [LANES*(PIX_W+1)-1:0]   a_w, a1_w;
  pix_t f  [LANES], f2 [LANES];
  a_t   a  [LANES];
  s_t   h  [LANES];
  pix_t pf  [2], pf2 [2];    // previous word lanes 8, 9 of f and f[i-2N]
  s_t   ph  [2];             // previous word lanes 8, 9 of h

  always_comb begin
    for (int j = 0; j < LANES; j++) begin
      f_w[j*PIX_W +: PIX_W] = in_pix[j];
      f[j]  = in_pix[j];
      f2[j] = f2_w[j*PIX_W +: PIX_W];
      a[j]  = a_t'(in_pix[j]) + a_t'(f1_w[j*PIX_W +: PIX_W]);
      a_w[j*(PIX_W+1) +: PIX_W+1] = a[j];
      h[j]  = s_t'(a[j]) + s_t'(a1_w[j*(PIX_W+1) +: PIX_W+1]);
    end
  end

  line_delay #(.W(LANES*PIX_W), .DEPTH(LINE_WORDS)) u_f1 (
    .clk, .rst_n, .en(in_valid), .din(f_w), .dout(f1_w));
  line_delay #(.W(LANES*PIX_W), .DEPTH(LINE_WORDS)) u_f2 (
    .clk, .rst_n, .en(in_valid), .din(f1_w), .dout(f2_w));
  line_delay #(.W(LANES*(PIX_W+1)), .DEPTH(LINE_WORDS)) u_a1 (
    .clk, .rst_n, .en(in_valid), .din(a_w), .dout(a1_w));

  logic [SOBEL_W-1:0] g [LANES];
  always_comb begin
    typedef logic signed [SOBEL_W+1:0] d_t;
    d_t fx0, fx1, fx2, gx0, gx1, gx2, u, v, g1, g2, hx2;
    for (int j = 0; j < LANES; j++) begin
      fx0 = d_t'(f[j]);
      fx1 = (j >= 1) ? d_t'(f[j-1]) : d_t'(pf[1]);
      fx2 = (j >= 2) ? d_t'(f[j-2]) : d_t'(pf[j]);
      gx0 = d_t'(f2[j]);
      gx1 = (j >= 1) ? d_t'(f2[j-1]) : d_t'(pf2[1]);
      gx2 = (j >= 2) ? d_t'(f2[j-2]) : d_t'(pf2[j]);
      hx2 = (j >= 2) ? d_t'(h[j-2])  : d_t'(ph[j]);
      u   = fx0 + 2 * fx1 + fx2;
      v   = gx0 + 2 * gx1 + gx2;
      g1  = u - v;
      g2  = d_t'(h[j]) - hx2;
      if (g1 < 0) g1 = -g1;
      if (g2 < 0) g2 = -g2;
      g[j] = SOBEL_W'(g1 + g2);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < 2; k++) begin
        pf[k]  <= '0;
        pf2[k] <= '0;
        ph[k]  <= '0;
      end
      for (int j = 0; j < LANES; j++) out_g[j] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_g <= g;
        for (int k = 0; k < 2; k++) begin
          pf[k]  <= f[LANES-2+k];
          pf2[k] <= f2[LANES-2+k];
          ph[k]  <= h[LANES-2+k];
        end
      end
    end
  end
endmodule
