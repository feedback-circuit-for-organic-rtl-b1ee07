// tb_digital_controller_full - the controller at its default size with a
// full-size camera: 256x256 pixels per frame, 4 clocks per pixel and enough
// blanking for 410,000 clocks per frame (24.6 MHz at 60 frames/s).  Runs one
// complete operation: ambient measurement, calibration of all 25 LEDs and
// one round of row-by-row feedback.  See dc_system_test.
module tb_digital_controller_full;
  dc_system_test #(
    .IMG_W(256), .IMG_H(256), .LINE_BLANK(256), .FRAME_BLANK(82312),
    .ROUNDS(1), .FULL_SCENARIO(1'b0), .MAX_FRAMES(4000)
  ) t ();
endmodule
