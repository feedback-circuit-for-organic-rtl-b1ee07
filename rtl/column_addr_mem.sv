// column_addr_mem - "column memory": camera pixel address of each LED of one
// column, one word per row.
//
// Single-port memory of DEPTH words of ADDR_W bits with one address bus, a
// write enable and an unregistered read port, as in the original design (5 words of
// 16 bits).  A write happens on the rising clock edge while we is high; the
// read data follows the address combinationally, so a word written in one
// cycle is readable in the next.  addr is the row index counted from 0 (the
// controller passes row number - 1).  Contents are not reset; the controller
// writes every word during calibration before it reads any.
module column_addr_mem #(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned DEPTH  = 5,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [ADDR_W-1:0] din,
  output logic [ADDR_W-1:0] dout
);

  logic [ADDR_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (int'(addr) < DEPTH)) mem[addr] <= din;
  end

  assign dout = (int'(addr) < DEPTH) ? mem[addr] : '0;

endmodule
