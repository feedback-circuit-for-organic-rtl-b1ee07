// tb_auto_max_finder - self-checking test of auto_max_finder.
//
// Streams random frames (random length, random gaps between pixels, random
// values with deliberate ties) and checks, after each following frame_start,
// that max_val / max_addr are the maximum of the previous frame and the
// index of its last occurrence, and that they then hold through the frame.
module tb_auto_max_finder;
  localparam int PIX_W = 8, ADDR_W = 16;
  logic clk = 0, reset = 1, frame_start = 0, pix_valid = 0;
  logic [PIX_W-1:0] pix_data = 0, max_val;
  logic [ADDR_W-1:0] max_addr;
  int checks = 0, failures = 0;
  int prev_val = 0, prev_addr = 0;

  auto_max_finder #(.PIX_W(PIX_W), .ADDR_W(ADDR_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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
    int n, exp_val, exp_addr;
    repeat (3) @(posedge clk);
    reset <= 0;
    @(negedge clk) frame_start = 1;
    @(negedge clk) frame_start = 0;
    for (int f = 0; f < 40; f++) begin
      n = (f == 0) ? 1 : 1 + $urandom_range(300);
      exp_val = -1; exp_addr = 0;
      for (int i = 0; i < n; i++) begin
        repeat ($urandom_range(2)) @(negedge clk);
        // inputs change on the falling edge, the block samples on the rising
        pix_data = (f % 5 == 3) ? PIX_W'(7) : PIX_W'($urandom_range(255));
        pix_valid = 1;
        @(negedge clk);
        pix_valid = 0;
        if (int'(pix_data) >= exp_val) begin
          exp_val = int'(pix_data);
          exp_addr = i;
        end
        if (f > 0) check(max_val == PIX_W'(prev_val) && max_addr == ADDR_W'(prev_addr),
                         $sformatf("hold frame %0d", f));
      end
      frame_start = 1;
      @(negedge clk) frame_start = 0;
      check(int'(max_val) == exp_val, $sformatf("max_val frame %0d: %0d vs %0d", f, max_val, exp_val));
      check(int'(max_addr) == exp_addr, $sformatf("max_addr frame %0d: %0d vs %0d", f, max_addr, exp_addr));
      prev_val = exp_val; prev_addr = exp_addr;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
