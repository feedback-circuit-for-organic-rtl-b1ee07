// row_decoder - row-select bus of the pixel array.
//
// row_sel bit r-1 is high when row r is connected to the column feedback
// loops.  sel_all forces every bit high (used while all LEDs are being
// switched off); otherwise, when en is high, only the bit of row_no (counted
// from 1) is high, and when en is low, or row_no is 0 or above ROWS, none is.
// Purely combinational.  The active-high polarity is that of the
// controller's outputs in the original design; the PMOS row switches in the pixel
// conduct on a low gate, so an inverting level shifter is assumed between
// the two.
module row_decoder #(
  parameter int unsigned ROWS = 5,
  localparam int unsigned RW  = $clog2(ROWS + 1)
) (
  input  logic            en,
  input  logic            sel_all,
  input  logic [RW-1:0]   row_no,
  output logic [ROWS-1:0] row_sel
);

  always_comb begin
    row_sel = '0;
    if (sel_all) begin
      row_sel = '1;
    end else if (en) begin
      for (int r = 1; r <= ROWS; r++) begin
        if (row_no == RW'(r)) row_sel[r-1] = 1'b1;
      end
    end
  end

endmodule
