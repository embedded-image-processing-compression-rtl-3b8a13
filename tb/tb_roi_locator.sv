// tb_roi_locator: frames of 8 rows of 40 pixels, each with an edge pixel placed at
// a chosen rightmost column (plus edges further left). After each frame the ROI
// columns must be [right - len, right] (clipped at 0), the ROI mask of every word
// of the next frame must match the rectangle with rows [y0, y1], and a frame
// without edges must keep the previous ROI.
module tb_roi_locator;
  import hsc_pkg::*;
  localparam int LW = 4, N = LW * LANES, ROWS = 8;
  logic clk = 0, rst_n = 0;
  logic [10:0] len = 11'd12, y0 = 11'd2, y1 = 11'd5;
  logic in_valid = 0, in_sof = 0, in_first = 0;
  logic [LANES-1:0] in_edge = '0, roi_bits;
  logic [10:0] roi_x0, roi_x1;
  int   checks = 0, failures = 0;
  int   ex0 = 0, ex1 = 0;

  always #5 clk = ~clk;
  roi_locator dut (.*);

  task automatic frame(input int right);
    for (int y = 0; y < ROWS; y++)
      for (int w = 0; w < LW; w++) begin
        in_valid = 1;
        in_sof   = (y == 0 && w == 0);
        in_first = (w == 0);
        for (int j = 0; j < LANES; j++) begin
          int x;
          x = w*LANES + j;
          in_edge[j] = (right >= 0) && ((x == right && y == 4) || (x < right && $urandom_range(9) == 0));
        end
        #1;
        for (int j = 0; j < LANES; j++) begin
          int x;
          x = w*LANES + j;
          checks++;
          if (roi_bits[j] != (x >= ex0 && x <= ex1 && y >= 2 && y <= 5)) failures++;
        end
        @(negedge clk);
      end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    ex0 = 0; ex1 = 0;
    frame(30);   // before any edge: ROI is column 0 only
    ex0 = 18; ex1 = 30;
    frame(8);    // ROI found in the first frame
    ex0 = 0; ex1 = 8;
    frame(-1);   // ROI of frame 2: x1 = 8, x0 clipped to 0
    frame(25);   // frame 3 had no edge: ROI kept
    in_valid = 1; in_sof = 1; in_first = 1; in_edge = '0;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (roi_x0 != 11'd13 || roi_x1 != 11'd25) begin failures++; $display("roi %0d..%0d", roi_x0, roi_x1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
