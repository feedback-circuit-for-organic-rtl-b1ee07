// dc_system_test - end-to-end test bench body for digital_controller.
//
// Connects the controller, at its default size (5x5 LEDs, 8-bit values,
// 16-bit pixel addresses), to led_array_model (column drivers, LED array and
// camera) and runs the whole system:
//   1. reset, ambient measurement, calibration of all 25 LEDs: the stored
//      camera addresses must equal the model's LED positions and the ambient
//      threshold must be the brightest ambient pixel + 2;
//   2. ROUNDS rounds of row-by-row feedback; whenever a row is released
//      (Feedback -> FeedReset) every LED of that row must be seen by the
//      camera within +/-1 code of the reference.  Round 2 lowers the
//      reference (a grey-level change);
//   3. with FULL_SCENARIO, round 3 covers the LEDs of row 2 in front of the
//      camera for 40 frames while that row is being driven: the loop must
//      overdrive them, and after uncovering bring them back to the reference;
//      finally a reset during feedback must return to Idle with every row
//      selected and every column output at the off code.
// Every state change is checked against the transitions of the controller's
// state diagram, and the residence times against the controller's pacing:
// StoreAddr one clock, GetAmbient and SwAllOff at least 16 frames, a row in
// Feedback at least 128 frames.  Each mechanism (every state, each calibrated LED, the
// row wrap-around, the reference change, the overdrive of covered LEDs,
// the reset) is counted, and one that never happened counts as a failure.
module dc_system_test #(
  parameter int IMG_W        = 32,
  parameter int IMG_H        = 32,
  parameter int LINE_BLANK   = 8,
  parameter int FRAME_BLANK  = 64,
  parameter int ROUNDS       = 3,
  parameter bit FULL_SCENARIO = 1'b1,
  parameter int MAX_FRAMES   = 6000
) ();
  import oled_fb_pkg::*;
  localparam int ROWS = 5, COLS = 5;
  localparam int REF_A = 100, REF_B = 60;

  logic clk = 0, reset = 1;
  logic frm, we;
  logic [7:0] pix_in, ref_in = 8'(REF_A), ref_out;
  logic [ROWS-1:0] row_sel;
  logic [COLS-1:0][7:0] pix_out;
  logic [2:0] state, row_no;
  logic [ROWS*COLS-1:0] hide = '0;
  int frame_no;
  int checks = 0, failures = 0;
  int visits [8];
  int leds_ok = 0, rows_settled = 0, row_wraps = 0, ref_changes = 0;
  int overdrives = 0, resets_seen = 0;

  digital_controller dut (
    .clk, .reset, .frm, .we, .pix_in, .ref_in,
    .row_sel, .pix_out, .ref_out, .state, .row_no
  );

  led_array_model #(
    .ROWS(ROWS), .COLS(COLS), .IMG_W(IMG_W), .IMG_H(IMG_H),
    .LINE_BLANK(LINE_BLANK), .FRAME_BLANK(FRAME_BLANK)
  ) plant (
    .clk, .row_sel, .pix_out, .ref_out, .hide, .frm, .we, .pix_in, .frame_no
  );

  // stored calibration addresses
  logic [15:0] stored [COLS][ROWS];
  for (genvar c = 0; c < COLS; c++) begin : g_peek
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      assign stored[c][r] = dut.g_col[c].u_mem.mem[r];
    end
  end

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (frame %0d state %0d row %0d)", what, frame_no, state, row_no);
    end
  endtask

  task automatic finish();
    string names [8] = '{"Idle", "GetAmbient", "SetPix", "FindAddr", "StoreAddr",
                         "SwAllOff", "FeedReset", "Feedback"};
    for (int s = 0; s < 8; s++) begin
      $display("  state %-10s entered %0d times", names[s], visits[s]);
      check(visits[s] > 0, $sformatf("state %s never entered", names[s]));
    end
    $display("  LEDs calibrated at the right address %0d, rows settled %0d, row wraps %0d",
             leds_ok, rows_settled, row_wraps);
    $display("  reference changes %0d, covered-LED overdrives %0d, resets %0d, frames %0d",
             ref_changes, overdrives, resets_seen, frame_no);
    check(leds_ok == ROWS * COLS, "every LED calibrated");
    check(rows_settled >= ROUNDS * ROWS, "every row settled in every round");
    check(row_wraps >= 1, "row number wrapped from the last row to the first");
    if (ROUNDS >= 2) check(ref_changes >= 1, "reference change");
    if (FULL_SCENARIO) begin
      check(overdrives >= 1, "covered LEDs overdriven");
      check(resets_seen >= 1, "reset during feedback");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // watchdog, in camera frames
  initial begin
    wait (frame_no >= MAX_FRAMES);
    $display("watchdog: stopped after %0d frames", frame_no);
    failures++;
    finish();
  end

  // state transitions must follow the state diagram
  logic [2:0] prev_state = 3'b110;   // so that the Idle entered at reset is counted
  always @(posedge clk) begin
    prev_state <= state;
    if (state != prev_state) begin
      visits[state]++;
      if (!reset && state != 3'(ST_IDLE)) begin
        unique case (ctrl_state_e'(prev_state))
          ST_IDLE:        check(state == 3'(ST_GET_AMBIENT), "Idle -> GetAmbient");
          ST_GET_AMBIENT: check(state == 3'(ST_SET_PIX), "GetAmbient -> SetPix");
          ST_SET_PIX:     check(state == 3'(ST_FIND_ADDR), "SetPix -> FindAddr");
          ST_FIND_ADDR:   check(state == 3'(ST_STORE_ADDR), "FindAddr -> StoreAddr");
          ST_STORE_ADDR:  check(state == 3'(ST_SW_ALL_OFF), "StoreAddr -> SwAllOff");
          ST_SW_ALL_OFF:  check(state == 3'(ST_SET_PIX) || state == 3'(ST_FEEDBACK), "SwAllOff exit");
          ST_FEEDBACK:    check(state == 3'(ST_FEED_RESET), "Feedback -> FeedReset");
          ST_FEED_RESET:  check(state == 3'(ST_FEEDBACK), "FeedReset -> Feedback");
          default: ;
        endcase
      end
    end
  end

  // residence times: StoreAddr lasts one clock; GetAmbient and SwAllOff
  // need 16 frames of their detector, Feedback 128 settled frames
  int enter_frame = 0, enter_clk = 0, clk_no = 0;
  int timing_checked = 0;
  always @(posedge clk) begin
    clk_no <= clk_no + 1;
    if (state != prev_state) begin
      if (!reset) begin
        unique case (ctrl_state_e'(prev_state))
          ST_STORE_ADDR: check(clk_no - enter_clk == 1,
                               $sformatf("StoreAddr lasted %0d clocks", clk_no - enter_clk));
          ST_GET_AMBIENT: check(frame_no - enter_frame >= 16,
                                $sformatf("GetAmbient lasted %0d frames", frame_no - enter_frame));
          ST_SW_ALL_OFF: check(frame_no - enter_frame >= 16,
                               $sformatf("SwAllOff lasted %0d frames", frame_no - enter_frame));
          ST_FEEDBACK: check(frame_no - enter_frame >= 128,
                             $sformatf("Feedback row held %0d frames", frame_no - enter_frame));
          default: ;
        endcase
        timing_checked++;
      end
      enter_frame = frame_no;
      enter_clk = clk_no;
    end
  end

  // row wrap-around during feedback
  logic [2:0] prev_row = 0;
  always @(posedge clk) begin
    prev_row <= row_no;
    if (state == 3'(ST_FEEDBACK) && prev_row == 3'd5 && row_no == 3'd1) row_wraps++;
  end

  initial begin
    int r, target, frames_in;
    repeat (5) @(negedge clk);
    reset = 0;

    // ---- calibration
    wait (state == 3'(ST_FEEDBACK));
    $display("calibration done at frame %0d", frame_no);
    check(dut.ambient == 8'(plant.max_ambient() + 2),
          $sformatf("ambient threshold %0d, brightest ambient pixel %0d", dut.ambient, plant.max_ambient()));
    for (int rr = 0; rr < ROWS; rr++)
      for (int c = 0; c < COLS; c++) begin
        check(int'(stored[c][rr]) == plant.led_addr_tab[rr][c],
              $sformatf("LED r%0d c%0d stored at %0d, is at %0d", rr + 1, c + 1, stored[c][rr],
                        plant.led_addr_tab[rr][c]));
        if (int'(stored[c][rr]) == plant.led_addr_tab[rr][c]) leds_ok++;
      end

    // ---- feedback rounds
    for (int round = 0; round < ROUNDS; round++) begin
      target = (round == 1) ? REF_B : REF_A;
      if (int'(ref_in) != target) begin
        ref_in = 8'(target);
        ref_changes++;
      end
      for (int k = 0; k < ROWS; k++) begin
        wait (state == 3'(ST_FEEDBACK));
        @(negedge clk);
        r = int'(row_no);
        check(r == k + 1, $sformatf("row %0d fed back in turn %0d", r, k + 1));
        check(row_sel == 5'(1 << (r - 1)), "only the fed-back row is selected");
        if (FULL_SCENARIO && round == 2 && r == 2) begin
          for (int c = 0; c < COLS; c++) hide[(r - 1) * COLS + c] = 1'b1;
          frames_in = frame_no;
          wait (frame_no >= frames_in + 40);
          begin
            automatic bit all_over = 1;
            for (int c = 0; c < COLS; c++)
              if (plant.level(r - 1, c) < real'(target + 20)) all_over = 0;
            check(all_over, "covered LEDs are driven harder");
            if (all_over) overdrives++;
          end
          hide = '0;
        end
        wait (state == 3'(ST_FEED_RESET));
        @(negedge clk);
        for (int c = 0; c < COLS; c++) begin
          automatic int d = plant.seen(r - 1, c) - target;
          check(d >= -1 && d <= 1, $sformatf("round %0d LED r%0d c%0d seen at %0d, reference %0d",
                                             round, r, c + 1, plant.seen(r - 1, c), target));
        end
        rows_settled++;
        $display("round %0d row %0d settled at frame %0d", round, r, frame_no);
      end
    end

    // ---- reset during feedback
    if (FULL_SCENARIO) begin
      wait (state == 3'(ST_FEEDBACK));
      @(negedge clk);
      reset = 1;
      @(negedge clk);
      @(negedge clk);
      check(state == 3'(ST_IDLE) && row_sel == '1, "reset returns to Idle, all rows selected");
      check(pix_out == {COLS{8'hFF}} && ref_out == 8'h20, "outputs back at the off codes");
      resets_seen++;
      reset = 0;
      repeat (4) @(negedge clk);
      check(state == 3'(ST_GET_AMBIENT), "calibration restarts");
    end
    finish();
  end
endmodule
