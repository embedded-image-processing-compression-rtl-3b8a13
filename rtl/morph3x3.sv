// morph3x3: binary erosion or dilation with a 3x3 square, 10 pixels per clock.
//
// Built the same way as the Sobel operator: the bit stream of N pixels per line is
// delayed by one and two lines in line FIFOs (10 bits wide), and the two previous
// columns come from lanes 8 and 9 of the previous word of each row. With OP = 0
// (erosion) a result bit is the AND of the 3x3 window, which removes isolated 1s;
// with OP = 1 (dilation) it is the OR. As in sobel_10p the result is indexed at the
// bottom-right pixel of the window, and the stream runs on across line ends; pixels
// above the first line read as 0.
// Interface: in_valid with 10 bits; out_valid one clock later.
module morph3x3
  import hsc_pkg::*;
#(
  parameter int unsigned LINE_WORDS = IMG_W / LANES,
  parameter bit          OP         = 1'b0          // 0: erosion, 1: dilation
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [LANES-1:0] in_bits,
  output logic             out_valid,
  output logic [LANES-1:0] out_bits
);
  logic [LANES-1:0] r1, r2;                      // one and two lines above
  logic [1:0]       p0, p1, p2;                  // previous word lanes 8, 9 per row
  logic [LANES-1:0] res;

  line_delay #(.W(LANES), .DEPTH(LINE_WORDS)) u_l1 (
    .clk, .rst_n, .en(in_valid), .din(in_bits), .dout(r1));
  line_delay #(.W(LANES), .DEPTH(LINE_WORDS)) u_l2 (
    .clk, .rst_n, .en(in_valid), .din(r1), .dout(r2));

  always_comb begin
    logic [LANES+1:0] x0, x1, x2;   // bit k+2 is column j = k
    x0 = {in_bits, p0};
    x1 = {r1, p1};
    x2 = {r2, p2};
    for (int j = 0; j < LANES; j++) begin
      logic [8:0] w;
      w = {x0[j +: 3], x1[j +: 3], x2[j +: 3]};
      res[j] = OP ? |w : &w;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bits  <= '0;
      p0 <= '0; p1 <= '0; p2 <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_bits <= res;
        p0 <= in_bits[LANES-1 -: 2];
        p1 <= r1[LANES-1 -: 2];
        p2 <= r2[LANES-1 -: 2];
      end
    end
  end
endmodule
