// steady_noref_det - detects that a value has stopped changing.
//
// Used while measuring the ambient light: val is the frame maximum with all
// LEDs off.  Sampled once per frame (tick).  While en is high, a val equal
// to the previous one advances a counter and a different one restarts it;
// once the counter reaches STEADY_CNT (15, so 16 equal frames) steady rises
// at the next tick and holds until en drops, which clears steady and the
// counter at the next tick.  Unlike steady_det it compares the value only
// with itself, not with a reference.
module steady_noref_det #(
  parameter int unsigned PIX_W      = 8,
  parameter int unsigned STEADY_CNT = 15
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             tick,
  input  logic             en,
  input  logic [PIX_W-1:0] val,
  output logic             steady
);

  localparam int unsigned CW = $clog2(STEADY_CNT + 1);

  logic [PIX_W-1:0] cur;
  logic [CW-1:0]    count;

  always_ff @(posedge clk) begin
    if (reset) begin
      cur    <= '0;
      count  <= '0;
      steady <= 1'b0;
    end else if (tick) begin
      if (en) begin
        if (count == CW'(STEADY_CNT)) begin
          steady <= 1'b1;
        end else if (val == cur) begin
          count <= count + 1'b1;
        end else begin
          count <= '0;
          cur   <= val;
        end
      end else begin
        steady <= 1'b0;
        count  <= '0;
      end
    end
  end

endmodule
