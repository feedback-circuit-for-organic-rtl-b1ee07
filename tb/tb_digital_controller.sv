// tb_digital_controller - end-to-end test of the display controller with a
// small camera image (32x32 pixels) so that the run is short; the controller
// itself is at its default size.  See dc_system_test for what is checked.
module tb_digital_controller;
  dc_system_test #(
    .IMG_W(32), .IMG_H(32), .LINE_BLANK(8), .FRAME_BLANK(64),
    .ROUNDS(3), .FULL_SCENARIO(1'b1), .MAX_FRAMES(8000)
  ) t ();
endmodule
