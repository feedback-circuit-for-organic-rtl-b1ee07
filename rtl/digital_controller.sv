// digital_controller - controller of a display whose LED brightness is held
// by optical feedback, one feedback loop shared by each column.
//
// A camera looks at the ROWS x COLS LED array.  The controller first
// calibrates: it measures the ambient light, lights the LEDs one at a time,
// and stores in a per-column memory the camera pixel address at which each
// LED appears.  It then runs the feedback: it connects one row at a time to
// the column drivers (row_sel), sends each column driver the camera value of
// that row's LED (pix_out) together with the brightness reference
// (ref_out = ref_in), waits until every column's value has settled at the
// reference, and moves on to the next row, for ever.  The analog column
// driver (a DAC pair and an integrating op-amp) and the pixel sample-and-hold
// sit outside this block.
//
// Interface (names of the original design's controller diagram):
//   clk       camera base clock (24.6 MHz); reset high restarts calibration
//   frm       camera frame sync, rising edge starts a frame (60 Hz)
//   we        camera write enable, falling edge = pixel value valid
//   pix_in    camera pixel value; ref_in brightness reference
//   row_sel   one-hot row select, active high; all high in Idle/GetAmbient
//   pix_out   per column: feedback value for the column driver's DAC
//   ref_out   reference for the column drivers' reference DAC
//   state     status code of the state machine; row_no current row (from 1)
// Timing: everything advances at most once per camera frame; a row is held
// until all columns have been within +/-1 code of ref_in for 128 frames.
//
// The structure (one max finder, address finder, ambient and all-off
// detectors, and per column a memory, a value finder and a steady
// detector) is the original design's; camera_if, which turns the camera's edges into
// clock-enable strobes, is this design's own way of doing the edge-triggered
// parts in one clock domain.
module digital_controller
  import oled_fb_pkg::*;
#(
  parameter int unsigned ROWS   = 5,
  parameter int unsigned COLS   = 5,
  parameter int unsigned PIX_W  = 8,
  parameter int unsigned ADDR_W = 16,
  localparam int unsigned RW    = $clog2(ROWS + 1)
) (
  input  logic                       clk,
  input  logic                       reset,
  input  logic                       frm,
  input  logic                       we,
  input  logic [PIX_W-1:0]           pix_in,
  input  logic [PIX_W-1:0]           ref_in,
  output logic [ROWS-1:0]            row_sel,
  output logic [COLS-1:0][PIX_W-1:0] pix_out,
  output logic [PIX_W-1:0]           ref_out,
  output logic [2:0]                 state,
  output logic [RW-1:0]              row_no
);

  localparam int unsigned MAW = (ROWS > 1) ? $clog2(ROWS) : 1;

  logic              frame_start, frame_end, pix_valid;
  logic [PIX_W-1:0]  pix_data;
  logic [PIX_W-1:0]  max_val, ambient;
  logic [ADDR_W-1:0] max_addr, found_addr;
  logic              steady_noref, addr_found, all_off;
  logic [COLS-1:0]   col_steady, mem_we;
  logic [COLS-1:0][PIX_W-1:0]  col_val;
  logic [COLS-1:0][ADDR_W-1:0] led_addr;
  logic              sel_all, dec_en, en_steady_noref, en_addr_finder;
  logic              en_all_off, en_value_finder, en_steady;
  ctrl_state_e       st;
  logic [MAW-1:0]    mem_addr;

  camera_if #(.PIX_W(PIX_W)) u_cam (
    .clk, .reset, .frm, .we, .pix_in,
    .frame_start, .frame_end, .pix_valid, .pix_data
  );

  auto_max_finder #(.PIX_W(PIX_W), .ADDR_W(ADDR_W)) u_max (
    .clk, .reset, .frame_start, .pix_valid, .pix_data, .max_val, .max_addr
  );

  addr_finder #(.ADDR_W(ADDR_W)) u_addr (
    .clk, .reset, .tick(frame_end), .en(en_addr_finder),
    .addr_in(max_addr), .found(addr_found), .addr_out(found_addr)
  );

  steady_noref_det #(.PIX_W(PIX_W)) u_amb (
    .clk, .reset, .tick(frame_end), .en(en_steady_noref), .val(max_val),
    .steady(steady_noref)
  );

  all_off_det #(.PIX_W(PIX_W)) u_off (
    .clk, .reset, .tick(frame_end), .en(en_all_off), .ambient, .val(max_val),
    .steady(all_off)
  );

  // row numbers count from 1; memory words from 0
  assign mem_addr = MAW'(row_no - 1'b1);

  for (genvar c = 0; c < COLS; c++) begin : g_col
    column_addr_mem #(.ADDR_W(ADDR_W), .DEPTH(ROWS)) u_mem (
      .clk, .we(mem_we[c]), .addr(mem_addr), .din(found_addr),
      .dout(led_addr[c])
    );

    value_finder #(.PIX_W(PIX_W), .ADDR_W(ADDR_W)) u_val (
      .clk, .reset, .en(en_value_finder), .frame_start, .pix_valid, .pix_data,
      .addr(led_addr[c]), .val(col_val[c])
    );

    steady_det #(.PIX_W(PIX_W)) u_std (
      .clk, .reset, .tick(frame_end), .en(en_steady), .ambient,
      .ref_val(ref_in), .val(col_val[c]), .steady(col_steady[c])
    );
  end

  controller_fsm #(.ROWS(ROWS), .COLS(COLS), .PIX_W(PIX_W)) u_fsm (
    .clk, .reset, .max_val, .steady_noref, .addr_found, .all_off, .col_steady,
    .col_val, .ref_in, .state(st), .row_no, .col_no(), .ambient, .pix_out,
    .ref_out, .sel_all, .dec_en, .en_steady_noref, .en_addr_finder,
    .en_all_off, .en_value_finder, .en_steady, .mem_we
  );

  row_decoder #(.ROWS(ROWS)) u_dec (
    .en(dec_en), .sel_all, .row_no, .row_sel
  );

  assign state = st;

endmodule
