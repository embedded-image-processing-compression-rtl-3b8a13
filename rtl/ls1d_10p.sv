// ls1d_10p: one lifting-scheme 1D wavelet stage (LS_1D) working on 10 samples per clock.
//
// Each input word holds 10 consecutive samples of one line, x[10w] .. x[10w+9]. The
// split sends the five odd samples to five IP1 units and the five even samples to
// five IP2 units, so every output word carries 5 detail and 5 approximation
// coefficients of the same 10 input samples:
//   IP1 (predict) d[k] = ( -x[2k] + 2 x[2k+1] - x[2k+2] ) / 2          (taps -1/2, 1, -1/2)
//   IP2 (update)  s[k] = ( -x[2k-2] + 2 x[2k-1] + 6 x[2k] + 2 x[2k+1] - x[2k+2] ) / 8
//                                                     (taps -1/8, 1/4, 3/4, 1/4, -1/8)
// These are the 5/3 lifting filters written in direct form, as the IP1/IP2 diagrams
// of the camera's wavelet IPs show them. The divisions are arithmetic right shifts
// of the full-precision sums (rounding towards minus infinity), a choice of this
// design. Line ends are handled by symmetric extension (x[-1]=x[1], x[-2]=x[2],
// x[N]=x[N-2]), also a choice of this design.
//
// Because s[4] of a word and d[4] need the first sample of the next word, a word is
// held until the next word of the same line arrives; the last word of a line is
// finished one cycle after it arrives, whether or not a new word comes in, so back-to-
// back lines need no blanking. Outputs are registered.
//
// Interface: in_valid/in_first/in_last mark a valid word and the first and last word
// of a line. out_* carry the coefficients of one input word, with the same flags.
// Latency: two cycles after the next word of the line (or after the last word).
module ls1d_10p
  import hsc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,
  input  logic  in_last,
  input  coef_t in_data [LANES],
  output logic  out_valid,
  output logic  out_first,
  output logic  out_last,
  output coef_t out_det [HALF],
  output coef_t out_app [HALF]
);
  localparam int unsigned AW = COEF_W + 4;  // accumulator width
  typedef logic signed [AW-1:0] acc_t;

  // Held word and the two samples before it.
  coef_t h      [LANES];
  logic  h_valid, h_first, h_last;
  coef_t p8, p9;          // x[-2], x[-1] relative to the held word

  logic  emit;            // finish the held word this cycle
  coef_t nxt;             // x[10] relative to the held word
  acc_t  x [-2:10];       // extended window
  coef_t det_c [HALF];
  coef_t app_c [HALF];

  assign emit = h_valid && (h_last || in_valid);

  always_comb begin
    nxt = h_last ? h[8] : in_data[0];
    x[-2] = h_first ? acc_t'(h[2]) : acc_t'(p8);
    x[-1] = h_first ? acc_t'(h[1]) : acc_t'(p9);
    for (int i = 0; i < LANES; i++) x[i] = acc_t'(h[i]);
    x[10] = acc_t'(nxt);
    for (int k = 0; k < HALF; k++) begin
      acc_t sd, sa;
      sd = 2 * x[2*k+1] - x[2*k] - x[2*k+2];
      sa = 2 * x[2*k-1] + 6 * x[2*k] + 2 * x[2*k+1] - x[2*k-2] - x[2*k+2];
      det_c[k] = coef_t'(sd >>> 1);
      app_c[k] = coef_t'(sa >>> 3);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_valid   <= 1'b0;
      h_first   <= 1'b0;
      h_last    <= 1'b0;
      p8        <= '0;
      p9        <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      for (int i = 0; i < LANES; i++) h[i] <= '0;
      for (int k = 0; k < HALF; k++) begin
        out_det[k] <= '0;
        out_app[k] <= '0;
      end
    end else begin
      out_valid <= emit;
      if (emit) begin
        out_first <= h_first;
        out_last  <= h_last;
        out_det   <= det_c;
        out_app   <= app_c;
      end
      if (in_valid) begin
        h       <= in_data;
        h_first <= in_first;
        h_last  <= in_last;
        p8      <= h[8];
        p9      <= h[9];
        h_valid <= 1'b1;
      end else if (emit) begin
        h_valid <= 1'b0;
      end
    end
  end

  // A new line may only start after the previous one was closed by a last word.
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid && !in_first |-> h_valid && !h_last)
    else $error("ls1d_10p: word without first flag outside a line");
endmodule
