// all_off_det - detects that every LED has gone dark.
//
// val is the frame maximum and ambient the ambient threshold (steady ambient
// maximum plus a margin).  Sampled once per frame (tick).  While en is high a
// frame with val <= ambient advances a counter and a brighter frame restarts
// it; when the counter has reached STEADY_CNT the next tick raises steady,
// which holds until en drops (cleared, with the counter, at the next tick).
// The comparison and the per-frame counting follow the original design; the count
// of 15 (16 dark frames, the same as the ambient detector) is this design's
// choice.
module all_off_det #(
  parameter int unsigned PIX_W      = 8,
  parameter int unsigned STEADY_CNT = 15
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             tick,
  input  logic             en,
  input  logic [PIX_W-1:0] ambient,
  input  logic [PIX_W-1:0] val,
  output logic             steady
);

  localparam int unsigned CW = $clog2(STEADY_CNT + 1);

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (reset) begin
      count  <= '0;
      steady <= 1'b0;
    end else if (tick) begin
      if (en) begin
        if (count == CW'(STEADY_CNT)) steady <= 1'b1;
        else if (val <= ambient)      count  <= count + 1'b1;
        else                          count  <= '0;
      end else begin
        steady <= 1'b0;
        count  <= '0;
      end
    end
  end

endmodule
