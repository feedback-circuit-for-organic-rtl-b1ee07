// value_finder - camera value of one chosen pixel, once per frame.
//
// Counts the valid pixels of each frame and captures the one whose index
// equals addr.  At each frame_start the value captured during the frame just
// finished is presented on val and the capture register is cleared (a pixel
// never seen reads as 0).  While en is low val is forced to 0, as in the
// original design; the pixel counter keeps running regardless so that enabling the
// block mid-frame does not misalign the addresses (this design's choice).
// addr must be stable over a frame; one value_finder serves each column.
module value_finder #(
  parameter int unsigned PIX_W  = 8,
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              en,
  input  logic              frame_start,
  input  logic              pix_valid,
  input  logic [PIX_W-1:0]  pix_data,
  input  logic [ADDR_W-1:0] addr,
  output logic [PIX_W-1:0]  val
);

  logic [ADDR_W-1:0] pix_addr;
  logic [PIX_W-1:0]  cap;

  always_ff @(posedge clk) begin
    if (reset) begin
      pix_addr <= '0;
      cap      <= '0;
      val      <= '0;
    end else begin
      if (frame_start) begin
        pix_addr <= '0;
        cap      <= '0;
        val      <= en ? cap : '0;
      end else begin
        if (pix_valid) begin
          pix_addr <= pix_addr + 1'b1;
          if (pix_addr == addr) cap <= pix_data;
        end
        if (!en) val <= '0;
      end
    end
  end

endmodule
