// oled_fb_pkg - types and constants shared by the OLED optical-feedback
// display controller.
//
// The controller state codes are the 3-bit status codes the controller drives
// on its state output while running (Idle 000 ... Feedback 111).  FeedReset
// is given the otherwise unused code 110 so that every state is distinct on
// the status output; that code is this design's choice.
//
// The fixed pixel codes are the ones the calibration procedure uses:
//   PIX_OFF   "11111111"  feedback value that makes a column driver turn its
//                         LED off (it looks brighter than any reference)
//   PIX_ON    "00000000"  feedback value that makes the driver turn it fully on
//   REF_CAL   "00100000"  reference used during calibration
//   SETPIX_THRESH "00111000" frame maximum above which an LED counts as lit
//   AMB_MARGIN 2          ambient threshold = steady ambient maximum + 2
package oled_fb_pkg;

  typedef enum logic [2:0] {
    ST_IDLE        = 3'b000,
    ST_GET_AMBIENT = 3'b001,
    ST_SET_PIX     = 3'b010,
    ST_FIND_ADDR   = 3'b011,
    ST_STORE_ADDR  = 3'b100,
    ST_SW_ALL_OFF  = 3'b101,
    ST_FEED_RESET  = 3'b110,
    ST_FEEDBACK    = 3'b111
  } ctrl_state_e;

  localparam logic [7:0] PIX_OFF       = 8'hFF;
  localparam logic [7:0] PIX_ON        = 8'h00;
  localparam logic [7:0] REF_CAL       = 8'h20;
  localparam logic [7:0] SETPIX_THRESH = 8'h38;
  localparam int unsigned AMB_MARGIN   = 2;

endpackage
