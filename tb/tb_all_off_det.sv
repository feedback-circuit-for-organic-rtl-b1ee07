// tb_all_off_det - self-checking test of all_off_det.
//
// With ambient = 12: 15 frames at or below 12 advance the count, the next
// tick raises steady; a brighter frame restarts the count; en low clears.
module tb_all_off_det;
  localparam int PIX_W = 8;
  logic clk = 0, reset = 1, tick = 0, en = 0, steady;
  logic [PIX_W-1:0] val = 0, ambient = 12;
  int checks = 0, failures = 0;

  all_off_det #(.PIX_W(PIX_W)) dut (.*);

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
    for (int i = 0; i < 10; i++) begin frame((i % 2 != 0) ? 12 : 3); check(!steady, "dark a"); end
    frame(13); check(!steady, "bright frame");
    for (int i = 0; i < 15; i++) begin frame(11); check(!steady, "dark b"); end
    frame(200); check(steady, "steady after 15 dark frames");
    frame(200); check(steady, "holds");
    en = 0; frame(0); check(!steady, "cleared by disable");
    en = 1;
    for (int i = 0; i < 15; i++) frame(12);
    frame(0); check(steady, "val equal to ambient counts as dark");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
