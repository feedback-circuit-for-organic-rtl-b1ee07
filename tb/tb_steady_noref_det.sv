// tb_steady_noref_det - self-checking test of steady_noref_det.
//
// A value must repeat on 16 consecutive ticks (one load plus 15 matches)
// before the following tick raises steady; any change restarts the count;
// dropping en clears steady.
module tb_steady_noref_det;
  localparam int PIX_W = 8;
  logic clk = 0, reset = 1, tick = 0, en = 0, steady;
  logic [PIX_W-1:0] val = 0;
  int checks = 0, failures = 0;

  steady_noref_det #(.PIX_W(PIX_W)) dut (.*);

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

  task automatic frame(input int v);
    val = PIX_W'(v);
    @(negedge clk) tick = 1;
    @(negedge clk) tick = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    en = 1;
    frame(9);                               // load
    for (int i = 0; i < 15; i++) begin frame(9); check(!steady, "counting"); end
    frame(12); check(steady, "steady after 16 equal frames");
    en = 0; frame(12); check(!steady, "cleared");
    en = 1;
    frame(20);
    for (int i = 0; i < 10; i++) frame(20);
    frame(21); check(!steady, "change");
    for (int i = 0; i < 15; i++) begin frame(21); check(!steady, "recount"); end
    frame(21); check(steady, "steady again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
