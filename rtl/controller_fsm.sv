// controller_fsm - state machine of the display controller.
//
// Calibration (GetAmbient .. SwAllOff) finds, LED by LED, which camera pixel
// sees it; feedback (Feedback / FeedReset) then closes each column's loop on
// one row at a time.
//
//   Idle        all column outputs at PIX_OFF, reference REF_CAL, every row
//               selected: every LED is driven dark.  Always left next clock.
//   GetAmbient  waits for the frame maximum to be steady (steady_noref);
//               then ambient := that maximum + AMB_MARGIN.
//   SetPix      selects row row_no only and puts PIX_ON on column col_no:
//               that LED alone lights.  Left when max_val > SETPIX_THRESH.
//   FindAddr    waits for addr_found (the bright spot's address settled).
//   StoreAddr   one clock: mem_we[col_no] writes the address at row row_no.
//   SwAllOff    all column outputs back to PIX_OFF; waits for all_off.  Then
//               either the next LED (row_no+1, or row 1 of the next column)
//               goes back to SetPix, or, after row ROWS of column COLS,
//               Feedback is entered with row_no back at 1.
//   Feedback    each column output follows its value_finder (the camera
//               value of the LED in the selected row), reference = ref_in;
//               left when every column's steady_det reports settled.
//   FeedReset   row select dropped, steady detectors disabled; when all have
//               cleared, row_no advances (ROWS wraps to 1) and Feedback is
//               re-entered.  This repeats until reset.
// A high reset sends the machine to Idle at the next clock from any state.
//
// Row and column numbers count from 1; the counters change only on a state
// change, as in the original design: entering Feedback or SetPix advances the row
// (SetPix also moves to the next column after the last row), reset sets the
// row to 0 and the column to 1.
//
// The state sequence, the conditions, the fixed codes and the counter rules
// follow the original design.  This design's own choices: synchronous reset;
// column outputs, reference and ambient are registered (one clock behind
// the state), where the original design decodes them from the state; the
// ambient sum saturates at the top code; state codes as in oled_fb_pkg.
module controller_fsm
  import oled_fb_pkg::*;
#(
  parameter int unsigned ROWS  = 5,
  parameter int unsigned COLS  = 5,
  parameter int unsigned PIX_W = 8,
  localparam int unsigned RW   = $clog2(ROWS + 1),
  localparam int unsigned CLW  = $clog2(COLS + 1)
) (
  input  logic                       clk,
  input  logic                       reset,
  // status from the detectors and finders
  input  logic [PIX_W-1:0]           max_val,
  input  logic                       steady_noref,
  input  logic                       addr_found,
  input  logic                       all_off,
  input  logic [COLS-1:0]            col_steady,
  input  logic [COLS-1:0][PIX_W-1:0] col_val,
  input  logic [PIX_W-1:0]           ref_in,
  // state and counters
  output ctrl_state_e                state,
  output logic [RW-1:0]              row_no,
  output logic [CLW-1:0]             col_no,
  output logic [PIX_W-1:0]           ambient,
  // array outputs
  output logic [COLS-1:0][PIX_W-1:0] pix_out,
  output logic [PIX_W-1:0]           ref_out,
  // module enables
  output logic                       sel_all,
  output logic                       dec_en,
  output logic                       en_steady_noref,
  output logic                       en_addr_finder,
  output logic                       en_all_off,
  output logic                       en_value_finder,
  output logic                       en_steady,
  output logic [COLS-1:0]            mem_we
);

  ctrl_state_e next;
  logic        last_led;

  assign last_led = (row_no == RW'(ROWS)) && (col_no == CLW'(COLS));

  // next state
  always_comb begin
    next = state;
    if (reset) begin
      next = ST_IDLE;
    end else begin
      unique case (state)
        ST_IDLE:        next = ST_GET_AMBIENT;
        ST_GET_AMBIENT: if (steady_noref) next = ST_SET_PIX;
        ST_SET_PIX:     if (max_val > PIX_W'(SETPIX_THRESH)) next = ST_FIND_ADDR;
        ST_FIND_ADDR:   if (addr_found) next = ST_STORE_ADDR;
        ST_STORE_ADDR:  next = ST_SW_ALL_OFF;
        ST_SW_ALL_OFF:  if (all_off) next = last_led ? ST_FEEDBACK : ST_SET_PIX;
        ST_FEEDBACK:    if (&col_steady) next = ST_FEED_RESET;
        ST_FEED_RESET:  if (~|col_steady) next = ST_FEEDBACK;
        default:        next = ST_IDLE;
      endcase
    end
  end

  // state, counters and registered outputs
  always_ff @(posedge clk) begin
    if (reset) begin
      state   <= ST_IDLE;
      row_no  <= '0;
      col_no  <= CLW'(1);
      ambient <= '0;
      pix_out <= {COLS{PIX_W'(PIX_OFF)}};
      ref_out <= PIX_W'(REF_CAL);
    end else begin
      state <= next;

      if (next != state) begin
        unique case (next)
          ST_FEEDBACK: row_no <= (row_no == RW'(ROWS)) ? RW'(1) : row_no + 1'b1;
          ST_SET_PIX: begin
            if (row_no == RW'(ROWS)) begin
              row_no <= RW'(1);
              col_no <= col_no + 1'b1;
            end else begin
              row_no <= row_no + 1'b1;
            end
          end
          default: ;
        endcase
      end

      if (state == ST_GET_AMBIENT && steady_noref)
        ambient <= (max_val > PIX_W'({PIX_W{1'b1}} - AMB_MARGIN)) ? '1
                                                                  : max_val + PIX_W'(AMB_MARGIN);

      unique case (state)
        ST_IDLE, ST_SW_ALL_OFF: begin
          pix_out <= {COLS{PIX_W'(PIX_OFF)}};
          ref_out <= PIX_W'(REF_CAL);
        end
        ST_SET_PIX: begin
          for (int c = 0; c < COLS; c++)
            if (col_no == CLW'(c + 1)) pix_out[c] <= PIX_W'(PIX_ON);
          ref_out <= PIX_W'(REF_CAL);
        end
        ST_FEEDBACK: begin
          pix_out <= col_val;
          ref_out <= ref_in;
        end
        default: ;   // GetAmbient, FindAddr, StoreAddr, FeedReset hold
      endcase
    end
  end

  // enables decoded from the state
  always_comb begin
    sel_all         = (state == ST_IDLE) || (state == ST_GET_AMBIENT);
    dec_en          = (state == ST_SET_PIX) || (state == ST_FIND_ADDR) ||
                      (state == ST_STORE_ADDR) || (state == ST_SW_ALL_OFF) ||
                      (state == ST_FEEDBACK);
    en_steady_noref = (state == ST_GET_AMBIENT);
    en_addr_finder  = (state == ST_FIND_ADDR) || (state == ST_STORE_ADDR) ||
                      (state == ST_SW_ALL_OFF);
    en_all_off      = (state == ST_SW_ALL_OFF);
    en_value_finder = (state == ST_FEEDBACK) || (state == ST_FEED_RESET);
    en_steady       = (state == ST_FEEDBACK);
    mem_we          = '0;
    if (state == ST_STORE_ADDR)
      for (int c = 0; c < COLS; c++)
        if (col_no == CLW'(c + 1)) mem_we[c] = 1'b1;
  end

  // exactly one column memory is written per calibrated LED
  a_one_write: assert property (@(posedge clk) disable iff (reset)
                                (state == ST_STORE_ADDR) |-> $onehot(mem_we));
  // the calibration counters stay in range
  a_counters: assert property (@(posedge clk) disable iff (reset)
                               (row_no <= RW'(ROWS)) && (col_no >= CLW'(1)) &&
                               (col_no <= CLW'(COLS)));

endmodule
