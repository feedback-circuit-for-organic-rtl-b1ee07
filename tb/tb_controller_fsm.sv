// tb_controller_fsm - self-checking test of controller_fsm.
//
// Plays the part of the detectors and finders: walks the machine through
// ambient measurement, the calibration of all 25 LEDs (checking the row and
// column order, the one-hot memory write and the column outputs at each
// step), two full rounds of row-by-row feedback (checking row wrap-around,
// that column outputs follow the value finders and the reference follows
// ref_in) and finally a reset from the Feedback state.
module tb_controller_fsm;
  import oled_fb_pkg::*;
  localparam int ROWS = 5, COLS = 5, PIX_W = 8;
  logic clk = 0, reset = 1;
  logic [PIX_W-1:0] max_val = 0, ref_in = 8'd100, ambient, ref_out;
  logic steady_noref = 0, addr_found = 0, all_off = 0;
  logic [COLS-1:0] col_steady = 0, mem_we;
  logic [COLS-1:0][PIX_W-1:0] col_val = 0, pix_out;
  ctrl_state_e state;
  logic [2:0] row_no, col_no;
  logic sel_all, dec_en, en_steady_noref, en_addr_finder, en_all_off;
  logic en_value_finder, en_steady;
  int checks = 0, failures = 0;

  controller_fsm #(.ROWS(ROWS), .COLS(COLS), .PIX_W(PIX_W)) dut (.*);

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
      $display("FAIL %s (state=%s row=%0d col=%0d)", what, state.name(), row_no, col_no);
    end
  endtask

  task automatic step(input int n = 1);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    logic [COLS-1:0][PIX_W-1:0] exp_pix;
    step(3);
    check(state == ST_IDLE && sel_all, "idle during reset");
    reset = 0;
    step();
    check(state == ST_GET_AMBIENT && en_steady_noref && sel_all, "GetAmbient");
    step();
    check(pix_out == {COLS{8'hFF}} && ref_out == 8'h20, "all off, calibration reference");
    max_val = 8'd9;
    step(4);
    check(state == ST_GET_AMBIENT, "waits for steady ambient");
    steady_noref = 1;
    step();
    steady_noref = 0;
    check(state == ST_SET_PIX && ambient == 8'd11, "ambient = max + 2");
    for (int c = 1; c <= COLS; c++)
      for (int r = 1; r <= ROWS; r++) begin
        check(state == ST_SET_PIX && row_no == 3'(r) && col_no == 3'(c) && dec_en && !sel_all,
              $sformatf("SetPix r%0d c%0d", r, c));
        step();
        exp_pix = {COLS{8'hFF}};
        exp_pix[c-1] = 8'h00;
        check(pix_out == exp_pix, "only the LED's column is driven on");
        max_val = 8'h38;                    // not yet above the threshold
        step(3);
        check(state == ST_SET_PIX, "0x38 is not above the threshold");
        max_val = 8'h39;
        step();
        check(state == ST_FIND_ADDR && en_addr_finder, "FindAddr");
        step(2);
        addr_found = 1;
        step();
        check(state == ST_STORE_ADDR && mem_we == COLS'(1 << (c - 1)), "StoreAddr writes this column");
        step();
        addr_found = 0;
        max_val = 8'd5;
        check(state == ST_SW_ALL_OFF && mem_we == 0 && en_all_off, "SwAllOff");
        step();
        check(pix_out == {COLS{8'hFF}}, "all outputs off again");
        step(2);
        all_off = 1;
        step();
        all_off = 0;
      end
    for (int round = 0; round < 2; round++)
      for (int r = 1; r <= ROWS; r++) begin
        check(state == ST_FEEDBACK && row_no == 3'(r) && en_steady && en_value_finder && dec_en,
              $sformatf("Feedback row %0d", r));
        for (int c = 0; c < COLS; c++) col_val[c] = 8'(10 * r + c + 40 * round);
        ref_in = 8'(100 + round);
        step(2);
        check(pix_out == col_val && ref_out == ref_in, "outputs follow value finders");
        col_steady = 5'b01111;
        step(3);
        check(state == ST_FEEDBACK, "waits for every column");
        col_steady = '1;
        step();
        check(state == ST_FEED_RESET && !dec_en && !en_steady && en_value_finder, "FeedReset");
        step(2);
        check(pix_out == col_val, "FeedReset holds the outputs");
        col_steady = 5'b00100;
        step(2);
        check(state == ST_FEED_RESET, "waits for all detectors to clear");
        col_steady = '0;
        step();
      end
    check(state == ST_FEEDBACK && row_no == 3'd1, "back at row 1");
    reset = 1;
    step();
    reset = 0;
    check(state == ST_IDLE && sel_all && row_no == 0 && col_no == 1, "reset from Feedback");
    step(2);
    check(pix_out == {COLS{8'hFF}} && ref_out == 8'h20, "outputs off after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
