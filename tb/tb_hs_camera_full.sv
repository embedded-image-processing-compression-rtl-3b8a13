// tb_hs_camera_full: end-to-end test of the camera processing unit at its default
// size, 1280 x 1024 pixels: three frames, coded with the run-length coder, the block
// coder and the run-length coder again, with every output checked.
module tb_hs_camera_full;
  hs_camera_tb_core #(.LW(128), .ROWS(1024), .OVF_FRAME(1'b0), .WATCHDOG(40000000)) u_core ();
endmodule
