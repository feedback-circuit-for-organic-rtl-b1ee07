// steady_det - detects that one column's feedback loop has settled.
//
// val is the camera value of the LED the column loop is driving and ref the
// brightness reference.  Sampled once per frame (tick).  While en is high a
// frame in which val is within TOL codes of ref, or at or below the ambient
// threshold (an LED asked to be darker than the camera can see), advances a
// counter; any other frame restarts it.  When the counter has reached
// STEADY_CNT (127, i.e. 128 settled frames) the next tick raises steady,
// which holds until en drops; dropping en clears steady and the counter at
// the next tick.  The window of +/-1 code, the ambient escape and the count
// follow the original design; the difference is taken without wrap-around here.
module steady_det #(
  parameter int unsigned PIX_W      = 8,
  parameter int unsigned STEADY_CNT = 127,
  parameter int unsigned TOL        = 1
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             tick,
  input  logic             en,
  input  logic [PIX_W-1:0] ambient,
  input  logic [PIX_W-1:0] ref_val,
  input  logic [PIX_W-1:0] val,
  output logic             steady
);

  localparam int unsigned CW = $clog2(STEADY_CNT + 1);

  logic [CW-1:0]    count;
  logic [PIX_W-1:0] diff;
  logic             settled;

  always_comb begin
    diff    = (val >= ref_val) ? (val - ref_val) : (ref_val - val);
    settled = (diff <= PIX_W'(TOL)) || (val <= ambient);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      count  <= '0;
      steady <= 1'b0;
    end else if (tick) begin
      if (en) begin
        if (count == CW'(STEADY_CNT)) steady <= 1'b1;
        else if (settled)             count  <= count + 1'b1;
        else                          count  <= '0;
      end else begin
        steady <= 1'b0;
        count  <= '0;
      end
    end
  end

endmodule
