// auto_max_finder - brightest pixel of each camera frame.
//
// While a frame streams in, every valid pixel is compared with the running
// maximum; a pixel equal to or above it replaces it, so among equal maxima
// the last one in scan order wins.  The pixel address is the pixel's index
// in the frame (row-major, 0 .. 65535 for a 256x256 frame), counted from the
// frame start.  At each frame_start the maximum and its address of the frame
// just finished are copied to max_val / max_addr and the running values are
// cleared, so the outputs change once per frame and hold for a full frame.
// This is how the original design describes the block; the shared-clock strobe
// interface (frame_start, pix_valid) is this design's.
module auto_max_finder #(
  parameter int unsigned PIX_W  = 8,
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              frame_start,
  input  logic              pix_valid,
  input  logic [PIX_W-1:0]  pix_data,
  output logic [PIX_W-1:0]  max_val,
  output logic [ADDR_W-1:0] max_addr
);

  logic [PIX_W-1:0]  run_val;
  logic [ADDR_W-1:0] run_addr;
  logic [ADDR_W-1:0] pix_addr;

  always_ff @(posedge clk) begin
    if (reset) begin
      run_val  <= '0;
      run_addr <= '0;
      pix_addr <= '0;
      max_val  <= '0;
      max_addr <= '0;
    end else if (frame_start) begin
      max_val  <= run_val;
      max_addr <= run_addr;
      run_val  <= '0;
      run_addr <= '0;
      pix_addr <= '0;
    end else if (pix_valid) begin
      pix_addr <= pix_addr + 1'b1;
      if (pix_data >= run_val) begin
        run_val  <= pix_data;
        run_addr <= pix_addr;
      end
    end
  end

endmodule
