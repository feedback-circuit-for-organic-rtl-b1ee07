// tb_column_addr_mem - self-checking test of column_addr_mem.
//
// Writes random words to random rows, keeps a reference copy, and checks
// every word after each write; a cycle with we low must not write.
module tb_column_addr_mem;
  localparam int ADDR_W = 16, DEPTH = 5;
  logic clk = 0, we = 0;
  logic [2:0] addr = 0;
  logic [ADDR_W-1:0] din = 0, dout;
  logic [ADDR_W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  column_addr_mem #(.ADDR_W(ADDR_W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    @(negedge clk);
    for (int r = 0; r < DEPTH; r++) begin
      addr = 3'(r); din = ADDR_W'(r * 1111); we = 1;
      model[r] = din;
      @(negedge clk);
    end
    we = 0;
    for (int k = 0; k < 200; k++) begin
      addr = 3'($urandom_range(DEPTH - 1));
      din = ADDR_W'($urandom);
      we = $urandom_range(1) == 1;
      if (we) model[addr] = din;
      @(negedge clk);
      we = 0;
      for (int r = 0; r < DEPTH; r++) begin
        addr = 3'(r);
        #1 check(dout == model[r], $sformatf("row %0d: %0h vs %0h", r, dout, model[r]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
