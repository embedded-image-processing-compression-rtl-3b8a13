// run_extract: row-wise run coding of a binarised image.
//
// Only the first and the last column of every run of 1s of a row are sent, with the
// row number. Ten bits arrive per clock, so a word can hold up to ten run limits.
// Per word the start mask (1 after 0) and the end mask (0 after 1, marking the end
// at the column before) are formed, with a 0 assumed left of the first column; a
// run still open at the last word of a row ends at the last column. Words holding
// limits are written into one FIFO (one block RAM), and a serializer behind it
// sends the limits one per clock, in column order, as run_evt_t events with a
// valid/ready handshake. overflow is sticky, set when a word is lost because the
// FIFO was full. Rows are counted from in_sof; columns from in_first.
module run_extract
  import hsc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_sof,
  input  logic             in_first,
  input  logic             in_last,
  input  logic [LANES-1:0] in_bits,
  output logic             out_valid,
  input  logic             out_ready,
  output run_evt_t         out_evt,
  output logic             overflow
);
  localparam int unsigned MW = 2 * LANES + 1;           // end0,start0,...,end9,start9,last_end
  localparam int unsigned EW = 11 + 11 + MW;            // y, word base x, mask

  logic [10:0]    xw, yc, x_cur, y_cur;                 // word base column, row
  logic           prev_bit;
  logic [MW-1:0]  mask;
  logic           f_empty, f_full, f_ovf, f_rd;
  logic [EW-1:0]  f_dout;
  logic [$clog2(FIFO_DEPTH+1)-1:0] f_cnt;

  // current word position
  always_comb begin
    x_cur = in_first ? '0 : xw;
    y_cur = (in_first && in_sof) ? '0 : (in_first ? yc + 1'b1 : yc);
  end

  always_comb begin
    logic left;
    mask = '0;
    for (int j = 0; j < LANES; j++) begin
      left = (j == 0) ? (in_first ? 1'b0 : prev_bit) : in_bits[j-1];
      mask[2*j]     = left && !in_bits[j];   // run ended at column j-1
      mask[2*j + 1] = !left && in_bits[j];   // run starts at column j
    end
    mask[MW-1] = in_last && in_bits[LANES-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xw       <= '0;
      yc       <= '0;
      prev_bit <= 1'b0;
      overflow <= 1'b0;
    end else begin
      if (in_valid) begin
        xw       <= x_cur + 11'(LANES);
        yc       <= y_cur;
        prev_bit <= in_bits[LANES-1];
      end
      if (f_ovf) overflow <= 1'b1;
    end
  end

  sync_fifo #(.W(EW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en  (in_valid && (mask != '0)),
    .wr_data({y_cur, x_cur, mask}),
    .rd_en  (f_rd),
    .rd_data(f_dout),
    .empty  (f_empty),
    .full   (f_full),
    .overflow(f_ovf),
    .count  (f_cnt)
  );

  // serializer: take the lowest pending limit of the head word
  logic [MW-1:0] done;    // limits of the head word already sent
  logic [MW-1:0] pend;
  int            idx;
  always_comb begin
    pend = f_dout[MW-1:0] & ~done;
    idx  = 0;
    for (int b = MW - 1; b >= 0; b--) if (pend[b]) idx = b;
  end

  logic [MW-1:0] pend_after;
  always_comb begin
    pend_after = pend;
    pend_after[idx] = 1'b0;
  end

  assign out_valid = !f_empty;
  assign f_rd      = out_valid && out_ready && (pend_after == '0);

  always_comb begin
    logic [10:0] bx;
    bx = f_dout[MW +: 11];
    out_evt.y = f_dout[MW + 11 +: 11];
    if (idx == MW - 1) begin
      out_evt.is_end = 1'b1;
      out_evt.x      = bx + 11'(LANES - 1);
    end else if (idx % 2 == 0) begin
      out_evt.is_end = 1'b1;
      out_evt.x      = bx + 11'(idx / 2) - 1'b1;
    end else begin
      out_evt.is_end = 1'b0;
      out_evt.x      = bx + 11'(idx / 2);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      done <= '0;
    else if (out_valid && out_ready) done <= f_rd ? '0 : (done | (pend ^ pend_after));
  end
endmodule
