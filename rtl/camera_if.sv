// camera_if - front end for the camera's timing signals.
//
// The camera supplies the system clock (24.6 MHz), a write-enable W/E whose
// falling edge marks a valid pixel value (about 6.1 MHz, one pixel every ~4
// clocks) and a frame-sync pulse whose rising edge starts a frame (60 Hz,
// 256x256 usable pixels per frame).  Since all three come from the camera's
// own clock domain they are only registered here, not synchronised.
//
// Outputs, all single-cycle strobes in the clk domain:
//   frame_start  first clock with frame sync high (rising edge of frm)
//   frame_end    first clock with frame sync low again (falling edge of frm);
//                the frame detectors advance on this strobe
//   pix_valid    first clock with W/E low after it was high; pix_data holds
//                the pixel value sampled on that same clock.  Pixels are
//                ignored while frame sync is high.
// Latency: two clocks from the camera pins to the strobes.
module camera_if #(
  parameter int unsigned PIX_W = 8
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             frm,
  input  logic             we,
  input  logic [PIX_W-1:0] pix_in,
  output logic             frame_start,
  output logic             frame_end,
  output logic             pix_valid,
  output logic [PIX_W-1:0] pix_data
);

  logic frm_q, frm_q2, we_q, we_q2;

  always_ff @(posedge clk) begin
    if (reset) begin
      frm_q    <= 1'b0;
      frm_q2   <= 1'b0;
      we_q     <= 1'b1;
      we_q2    <= 1'b1;
      pix_data <= '0;
    end else begin
      frm_q    <= frm;
      frm_q2   <= frm_q;
      we_q     <= we;
      we_q2    <= we_q;
      pix_data <= pix_in;
    end
  end

  assign frame_start = frm_q & ~frm_q2;
  assign frame_end   = ~frm_q & frm_q2;
  assign pix_valid   = we_q2 & ~we_q & ~frm_q;

endmodule
