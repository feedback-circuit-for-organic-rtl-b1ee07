// tb_steady_det - self-checking test of steady_det.
//
// ref = 100, ambient = 10.  Values 99..101 and values <= 10 count as settled,
// anything else restarts the count; 127 settled frames then one more tick
// raise steady; the +/-1 window must not wrap at ref = 0 or 255.
module tb_steady_det;
  localparam int PIX_W = 8;
  logic clk = 0, reset = 1, tick = 0, en = 0, steady;
  logic [PIX_W-1:0] val = 0, ambient = 10, ref_val = 100;
  int checks = 0, failures = 0;

  steady_det #(.PIX_W(PIX_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    automatic int pick[5] = '{99, 100, 101, 4, 10};
    repeat (3) @(negedge clk);
    reset = 0;
    en = 1;
    for (int i = 0; i < 60; i++) frame(pick[i % 5]);
    frame(102); check(!steady, "102 is outside the window");
    for (int i = 0; i < 60; i++) frame(100);
    frame(98); check(!steady, "98 is outside the window");
    frame(11); check(!steady, "11 is above ambient");
    for (int i = 0; i < 127; i++) begin frame(pick[i % 5]); check(!steady, "counting"); end
    frame(150); check(steady, "steady after 127 settled frames");
    en = 0; frame(100); check(!steady, "cleared by disable");
    // window at the top of the range: ref 255 accepts 254/255 only
    en = 1; ref_val = 255; ambient = 0;
    for (int i = 0; i < 127; i++) frame((i % 2 != 0) ? 254 : 255);
    frame(0); check(steady, "window at 255");
    en = 0; frame(0); en = 1;
    ref_val = 0;
    for (int i = 0; i < 100; i++) frame(1);
    frame(255); check(!steady, "255 is not within 1 of 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
