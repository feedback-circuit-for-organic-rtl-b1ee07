// addr_finder - waits for the brightest-pixel address to settle.
//
// Sampled once per frame (tick).  While en is high the incoming address is
// compared with the one seen at the previous tick: a match advances a
// counter, a change restarts it and takes the new address.  When the counter
// has reached STEADY_CNT (the address matched on STEADY_CNT consecutive
// ticks) the next tick sets found and puts the address on addr_out, and both
// hold for as long as en stays high.  Dropping en clears found, addr_out and
// the counter at the next tick.  This keeps the controller from storing an
// address seen while the lit LED was still changing.  Counting on frame
// ticks and STEADY_CNT = 2 follow the original design; the clear of the held
// address on disable is also the original design's.
module addr_finder #(
  parameter int unsigned ADDR_W     = 16,
  parameter int unsigned STEADY_CNT = 2
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              tick,
  input  logic              en,
  input  logic [ADDR_W-1:0] addr_in,
  output logic              found,
  output logic [ADDR_W-1:0] addr_out
);

  localparam int unsigned CW = $clog2(STEADY_CNT + 1);

  logic [ADDR_W-1:0] cur;
  logic [CW-1:0]     count;

  always_ff @(posedge clk) begin
    if (reset) begin
      cur      <= '0;
      count    <= '0;
      found    <= 1'b0;
      addr_out <= '0;
    end else if (tick) begin
      if (en) begin
        if (count == CW'(STEADY_CNT)) begin
          addr_out <= cur;
          found    <= 1'b1;
        end else if (addr_in == cur) begin
          count <= count + 1'b1;
        end else begin
          count <= '0;
          cur   <= addr_in;
        end
      end else begin
        found    <= 1'b0;
        addr_out <= '0;
        count    <= '0;
      end
    end
  end

endmodule
