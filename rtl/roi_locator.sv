// roi_locator: region of interest from the right edge of the tracked animal.
//
// During a frame the rightmost column holding an edge pixel is tracked (the nose of
// the mouse, found with the edge detector). At the start of the next frame the ROI
// columns become [right - len, right], len being the known body length set by the
// host, and the ROI rows are the host's [y0, y1]. The ROI found in one frame is
// applied to the following one. If a frame holds no edge pixel the previous ROI is
// kept. roi_bits marks, combinationally, which pixels of the current input word
// lie inside the ROI. Column and row counters follow in_first and in_sof.
module roi_locator
  import hsc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [10:0]      len,
  input  logic [10:0]      y0,
  input  logic [10:0]      y1,
  input  logic             in_valid,
  input  logic             in_sof,
  input  logic             in_first,
  input  logic [LANES-1:0] in_edge,
  output logic [LANES-1:0] roi_bits,
  output logic [10:0]      roi_x0,
  output logic [10:0]      roi_x1
);
  logic [10:0] xw, yc, x_cur, y_cur, right, word_right;
  logic        found, new_frame, word_hit;

  assign new_frame = in_valid && in_sof && in_first;

  always_comb begin
    x_cur = in_first ? '0 : xw;
    y_cur = (in_first && in_sof) ? '0 : (in_first ? yc + 1'b1 : yc);
    word_hit   = (in_edge != '0);
    word_right = x_cur;
    for (int j = 0; j < LANES; j++) if (in_edge[j]) word_right = x_cur + 11'(j);
    for (int j = 0; j < LANES; j++)
      roi_bits[j] = (x_cur + 11'(j) >= roi_x0) && (x_cur + 11'(j) <= roi_x1) &&
                    (y_cur >= y0) && (y_cur <= y1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xw     <= '0;
      yc     <= '0;
      right  <= '0;
      found  <= 1'b0;
      roi_x0 <= '0;
      roi_x1 <= '0;
    end else if (in_valid) begin
      xw <= x_cur + 11'(LANES);
      yc <= y_cur;
      if (new_frame) begin
        if (found) begin
          roi_x1 <= right;
          roi_x0 <= (right > len) ? right - len : '0;
        end
        found <= word_hit;
        right <= word_right;
      end else if (word_hit && (!found || word_right > right)) begin
        found <= 1'b1;
        right <= word_right;
      end
    end
  end
endmodule
