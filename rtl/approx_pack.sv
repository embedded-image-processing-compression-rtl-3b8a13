// approx_pack: forms 10-sample words for the next wavelet level from approximations.
//
// A wavelet stage yields 5 approximation coefficients per input word. The next stage
// again takes 10 samples per word, so two successive groups of 5 of the same line
// are joined: the first group becomes lanes 0..4 and the second lanes 5..9. The
// first/last flags of the line are carried over. A line must therefore contain an
// even number of groups (true for any line length that is a multiple of 40 pixels).
// Output is registered and valid for one cycle after every second input group.
module approx_pack
  import hsc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,
  input  logic  in_last,
  input  coef_t in_data [HALF],
  output logic  out_valid,
  output logic  out_first,
  output logic  out_last,
  output coef_t out_data [LANES]
);
  coef_t lo [HALF];
  logic  have, lo_first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have      <= 1'b0;
      lo_first  <= 1'b0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      for (int i = 0; i < HALF; i++) lo[i] <= '0;
      for (int i = 0; i < LANES; i++) out_data[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (!have || in_first) begin
          lo       <= in_data;
          lo_first <= in_first;
          have     <= 1'b1;
        end else begin
          for (int i = 0; i < HALF; i++) begin
            out_data[i]        <= lo[i];
            out_data[i + HALF] <= in_data[i];
          end
          out_valid <= 1'b1;
          out_first <= lo_first;
          out_last  <= in_last;
          have      <= 1'b0;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid && in_last |-> have && !in_first)
    else $error("approx_pack: odd number of groups in a line");
endmodule
