// line_delay: z^-N delay of one image line for a stream of parallel pixel words.
//
// A circular memory of DEPTH words of W bits (one line of 10-pixel words; W = 100
// bits for raw 10-bit pixels). On every enabled clock the word written DEPTH enables
// earlier is read and replaced by the new one. Until the memory has been filled
// once after reset, the output is zero, so the image is taken as zero above its
// first line. dout is combinational from the memory and valid in the clock where en
// is high.
module line_delay #(
  parameter int unsigned W     = 100,
  parameter int unsigned DEPTH = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] ptr;
  logic          filled;

  assign dout = filled ? mem[ptr] : '0;

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr    <= '0;
      filled <= 1'b0;
    end else if (en) begin
      if (ptr == AW'(DEPTH - 1)) begin
        ptr    <= '0;
        filled <= 1'b1;
      end else begin
        ptr <= ptr + 1'b1;
      end
    end
  end
endmodule
