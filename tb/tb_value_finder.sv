// tb_value_finder - self-checking test of value_finder.
//
// Random frames with random gaps; for each frame a random target address
// (sometimes beyond the frame, which must read as 0).  After the next
// frame_start, val must equal the pixel presented at that index.  With en
// low val must be 0, and enabling mid-frame must not misalign the count.
module tb_value_finder;
  localparam int PIX_W = 8, ADDR_W = 16;
  logic clk = 0, reset = 1, en = 1, frame_start = 0, pix_valid = 0;
  logic [PIX_W-1:0] pix_data = 0, val;
  logic [ADDR_W-1:0] addr = 0;
  int checks = 0, failures = 0;

  value_finder #(.PIX_W(PIX_W), .ADDR_W(ADDR_W)) dut (.*);

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
    int n, exp_val;
    bit en_next;
    repeat (3) @(negedge clk);
    reset = 0;
    frame_start = 1;
    @(negedge clk) frame_start = 0;
    for (int f = 0; f < 60; f++) begin
      n = 1 + $urandom_range(200);
      addr = ADDR_W'((f % 7 == 6) ? n + 5 : $urandom_range(n - 1));
      exp_val = 0;
      // frames 20..29: disabled during the first half, enabled mid-frame
      en = !(f >= 20 && f < 30);
      for (int i = 0; i < n; i++) begin
        repeat ($urandom_range(2)) @(negedge clk);
        pix_data = PIX_W'($urandom_range(255));
        pix_valid = 1;
        @(negedge clk);
        pix_valid = 0;
        if (i == int'(addr)) exp_val = int'(pix_data);
        if (!en) check(val == 0, $sformatf("val forced to 0 when disabled, frame %0d", f));
        if (f >= 20 && f < 30 && i == n / 2) en = 1;
      end
      en_next = !(f >= 19 && f < 29);
      en = en_next;
      frame_start = 1;
      @(negedge clk) frame_start = 0;
      if (en) check(int'(val) == exp_val, $sformatf("frame %0d addr %0d: %0d vs %0d", f, addr, val, exp_val));
      else    check(val == 0, $sformatf("frame %0d disabled val %0d", f, val));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
