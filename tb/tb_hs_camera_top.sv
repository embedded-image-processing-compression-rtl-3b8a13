// tb_hs_camera_top: end-to-end test of the camera processing unit at a reduced size
// (lines of 40 pixels, frames of 24 lines), including the overflow frame.
module tb_hs_camera_top;
  hs_camera_tb_core #(.LW(4), .ROWS(24), .OVF_FRAME(1'b1), .WATCHDOG(200000)) u_core ();
endmodule
