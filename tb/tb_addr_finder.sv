// tb_addr_finder - self-checking test of addr_finder.
//
// Directed sequences of per-frame addresses with hand-worked expectations:
// an address must be seen unchanged on three consecutive ticks (the first
// tick loads it, two more match) before the next tick raises found; a change
// restarts the wait; input changes between ticks are ignored; found and the
// address hold while enabled and clear when en drops.
module tb_addr_finder;
  localparam int ADDR_W = 16;
  logic clk = 0, reset = 1, tick = 0, en = 0, found;
  logic [ADDR_W-1:0] addr_in = 0, addr_out;
  int checks = 0, failures = 0;

  addr_finder #(.ADDR_W(ADDR_W)) dut (.*);

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
      $display("FAIL %s (found=%0b addr_out=%0d)", what, found, addr_out);
    end
  endtask

  // present an address, wait a few idle cycles (with a glitch on the input
  // that must be ignored), then one tick
  task automatic frame(input int a);
    addr_in = ADDR_W'(a + 1000);
    repeat (3) @(negedge clk);
    addr_in = ADDR_W'(a);
    tick = 1;
    @(negedge clk) tick = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    en = 1;
    frame(500); check(!found, "1st sample");
    frame(500); check(!found, "2nd sample");
    frame(500); check(!found, "3rd sample");
    frame(777); check(found && addr_out == 500, "found after 3 equal samples");
    frame(321); check(found && addr_out == 500, "holds while enabled");
    en = 0;
    frame(0); check(!found && addr_out == 0, "cleared by disable");
    en = 1;
    frame(42); check(!found, "a");
    frame(43); check(!found, "restart on change");
    frame(43); check(!found, "b");
    frame(44); check(!found, "restart again");
    frame(44); check(!found, "c");
    frame(44); check(!found, "d");
    frame(44); check(found && addr_out == 44, "found 44");
    // no tick: nothing changes
    en = 0;
    repeat (5) @(negedge clk);
    check(found && addr_out == 44, "no change without tick");
    frame(1); check(!found, "cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
