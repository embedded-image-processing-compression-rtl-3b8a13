// coef_fifo_bank: the eight coefficient FIFOs that rebuild a wavelet line.
//
// The pyramid produces its four outputs (D1, D2, D3, A3) at the same time and at
// different rates, so a line of the wavelet image cannot be sent as it is made.
// Each band is written into its own FIFO; two sets of four FIFOs are used, one for
// even and one for odd lines, so that one line can be read while the next is being
// written. Every FIFO entry is a group of 5 coefficients. Each band input keeps its
// own line parity, toggled on the last group of a line. A line is complete when its
// A3 and D3 groups have been written (level 3 finishes last); lines_ready counts
// complete lines not yet released by the reader.
//
// Read side: the reader selects band and parity; rd_data shows the head of that
// FIFO (show-ahead) and rd_en pops it; line_release frees a line. overflow is
// sticky and set when any FIFO receives a group while full (input faster than the
// reader). Depths: D1 LINE_WORDS groups, D2 half of that, D3 and A3 a quarter,
// which is exactly one line per FIFO.
module coef_fifo_bank
  import hsc_pkg::*;
#(
  parameter int unsigned LINE_WORDS = IMG_W / LANES  // sensor words per line (128)
) (
  input  logic  clk,
  input  logic  rst_n,
  // band inputs, index = band_e (A3, D3, D2, D1)
  input  logic  wr_valid [4],
  input  logic  wr_last  [4],
  input  coef_t wr_data  [4][HALF],
  // reader
  input  band_e rd_band,
  input  logic  rd_parity,
  input  logic  rd_en,
  output coef_t rd_data [HALF],
  input  logic  line_release,
  output logic  [1:0] lines_ready,
  output logic  overflow
);
  localparam int unsigned GW = HALF * COEF_W;

  logic          par   [4];
  logic          f_wr  [8], f_rd [8], f_empty [8], f_full [8], f_ovf [8];
  logic [GW-1:0] f_din [8], f_dout [8];
  logic          line_done;

  for (genvar f = 0; f < 8; f++) begin : g_fifo
    localparam int unsigned B = f % 4;
    localparam int unsigned D = (B == 3) ? LINE_WORDS : (B == 2) ? LINE_WORDS / 2 : LINE_WORDS / 4;
    logic [$clog2(D+1)-1:0] cnt;
    sync_fifo #(.W(GW), .DEPTH(D)) u_fifo (
      .clk, .rst_n,
      .wr_en(f_wr[f]), .wr_data(f_din[f]),
      .rd_en(f_rd[f]), .rd_data(f_dout[f]),
      .empty(f_empty[f]), .full(f_full[f]), .overflow(f_ovf[f]), .count(cnt)
    );
    assign f_wr[f]  = wr_valid[B] && (par[B] == (f / 4 == 1));
    assign f_rd[f]  = rd_en && (int'(rd_band) == B) && (rd_parity == (f / 4 == 1));
    for (genvar i = 0; i < HALF; i++) begin : g_pack
      assign f_din[f][i*COEF_W +: COEF_W] = wr_data[B][i];
    end
  end

  always_comb begin
    logic [GW-1:0] sel;
    sel = f_dout[{rd_parity, rd_band}];
    for (int i = 0; i < HALF; i++) rd_data[i] = coef_t'(sel[i*COEF_W +: COEF_W]);
  end

  assign line_done = wr_valid[BAND_A3] && wr_last[BAND_A3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 4; b++) par[b] <= 1'b0;
      lines_ready <= '0;
      overflow    <= 1'b0;
    end else begin
      for (int b = 0; b < 4; b++)
        if (wr_valid[b] && wr_last[b]) par[b] <= !par[b];
      lines_ready <= lines_ready + 2'(line_done) - 2'(line_release);
      for (int f = 0; f < 8; f++)
        if (f_ovf[f]) overflow <= 1'b1;
    end
  end
endmodule
