// rle_coder: threshold and run-length coding of a wavelet line (the "+RLE" coder).
//
// Input is the serial coefficient stream of one wavelet line at a time (A3, D3, D2,
// D1). Approximation (A3) coefficients are passed on unchanged as RLE_APPROX tokens.
// A detail coefficient whose magnitude is below thr is taken as zero; zeros are
// counted and a run of them is sent as one RLE_RUN token whose value is the run
// length. A detail coefficient at or above the threshold is sent as an RLE_LIT
// token. Runs never cross a line end; the last token of a line has eol set. The
// token format and the "magnitude below thr" rule are choices of this design.
//
// Handshakes are valid/ready on both sides; the output is a register. A literal that
// ends a run needs two tokens: the run is sent first while the input is held.
module rle_coder
  import hsc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  coef_t    thr,         // detail threshold (>= 0)
  input  logic     in_valid,
  output logic     in_ready,
  input  coef_t    in_coef,
  input  band_e    in_band,
  input  logic     in_eol,
  output logic     out_valid,
  input  logic     out_ready,
  output rle_tok_t out_tok
);
  logic [COEF_W-1:0] run;
  logic              can_out, is_zero, literal, hold, emit;
  coef_t             mag;
  rle_tok_t          tok;

  assign can_out = !out_valid || out_ready;
  assign mag     = (in_coef < 0) ? -in_coef : in_coef;
  assign is_zero = (in_band != BAND_A3) && (mag < thr);
  assign literal = !is_zero;
  assign hold    = literal && (run != 0);            // send pending run first
  assign in_ready = can_out && !hold;

  always_comb begin
    emit = 1'b0;
    tok  = '{kind: RLE_RUN, eol: 1'b0, value: '0};
    if (in_valid && can_out) begin
      if (hold) begin
        emit = 1'b1;
        tok  = '{kind: RLE_RUN, eol: 1'b0, value: coef_t'(run)};
      end else if (is_zero) begin
        if (in_eol) begin
          emit = 1'b1;
          tok  = '{kind: RLE_RUN, eol: 1'b1, value: coef_t'(run + 1'b1)};
        end
      end else begin
        emit = 1'b1;
        tok  = '{kind: (in_band == BAND_A3) ? RLE_APPROX : RLE_LIT, eol: in_eol, value: in_coef};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run       <= '0;
      out_valid <= 1'b0;
      out_tok   <= '0;
    end else begin
      if (can_out) begin
        out_valid <= emit;
        if (emit) out_tok <= tok;
      end
      if (in_valid && can_out) begin
        if (hold)                 run <= '0;
        else if (is_zero && !in_eol) run <= run + 1'b1;
        else if (is_zero)          run <= '0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) out_valid && !out_ready |=> out_valid && $stable(out_tok))
    else $error("rle_coder: output changed while stalled");
endmodule
