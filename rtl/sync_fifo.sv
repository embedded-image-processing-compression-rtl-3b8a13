// sync_fifo: single-clock first-in first-out buffer with show-ahead read.
//
// DEPTH entries of W bits held in one memory array (a block RAM in the camera's FPGA).
// rd_data always shows the oldest entry while the FIFO is not empty; rd_en removes
// it. A write into a full FIFO is dropped and raises overflow for one cycle; a read
// from an empty FIFO is ignored. Any DEPTH of 1 or more works.
module sync_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [W-1:0]               wr_data,
  input  logic                       rd_en,
  output logic [W-1:0]               rd_data,
  output logic                       empty,
  output logic                       full,
  output logic                       overflow,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign empty    = (count == 0);
  assign full     = (count == CW'(DEPTH));
  assign do_wr    = wr_en && !full;
  assign do_rd    = rd_en && !empty;
  assign overflow = wr_en && full;
  assign rd_data  = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end
endmodule
