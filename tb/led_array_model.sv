// led_array_model - behavioural model (testbench only) of everything around
// the digital controller: the column drivers, the pixel array and the camera.
//
// Analog side, updated once per camera frame at the rising edge of frame
// sync.  Each column driver (reference DAC, feedback DAC, integrating op-amp
// with its RC compensation) is modelled as a discrete-time integrator: for
// every row whose row_sel bit is high, the brightness of the LED in that row
// and column moves by K(r,c) * (ref_out - pix_out[c]) per frame and is
// clamped to 0 .. BMAX; rows not selected hold their brightness, as the
// pixel's hold capacitor does.  K differs from LED to LED (0.09 .. 0.17 per
// frame, about the loop crossover of 10.5 rad/s at 60 frames/s), emulating
// the non-uniform LED efficiencies the feedback has to correct.
//
// Camera side: IMG_W x IMG_H pixels per frame, read out row-major after a
// frame-sync pulse of FRM_CLKS clocks; each pixel lasts CLK_PER_PIX clocks
// with W/E high for the first half and low (value valid) for the second;
// LINE_BLANK clocks follow each line and FRAME_BLANK clocks each frame.  The
// image shows the brightness of CAM_DELAY frames ago (frame buffering).  LED
// (r,c) is seen at pixel address led_addr(r,c), with half its brightness on
// the next pixel; all other pixels show a fixed ambient pattern of 0 ..
// AMB_MAX.  hide[r*COLS+c] hides an LED from the camera (its pixel then
// shows only ambient), as an object placed in front of the array would.
module led_array_model #(
  parameter int ROWS        = 5,
  parameter int COLS        = 5,
  parameter int IMG_W       = 32,
  parameter int IMG_H       = 32,
  parameter int CLK_PER_PIX = 4,
  parameter int LINE_BLANK  = 8,
  parameter int FRAME_BLANK = 64,
  parameter int FRM_CLKS    = 8,
  parameter int CAM_DELAY   = 1,
  parameter int AMB_MAX     = 6,
  parameter real BMAX       = 250.0
) (
  input  logic                   clk,
  input  logic [ROWS-1:0]        row_sel,
  input  logic [COLS-1:0][7:0]   pix_out,
  input  logic [7:0]             ref_out,
  input  logic [ROWS*COLS-1:0]   hide,
  output logic                   frm,
  output logic                   we,
  output logic [7:0]             pix_in,
  output int                     frame_no
);

  localparam int FRAME_CLKS = FRM_CLKS + IMG_H * (IMG_W * CLK_PER_PIX + LINE_BLANK) + FRAME_BLANK;

  real bright [ROWS][COLS];
  real kgain  [ROWS][COLS];
  int  shown  [CAM_DELAY+1][ROWS][COLS];
  int  led_addr_tab [ROWS][COLS];
  int  cnt = 0;

  // LED positions: a grid inside the image, away from the edges
  function automatic int led_addr(input int r, input int c);
    int y = (IMG_H / (ROWS + 1)) * (r + 1) + (c % 2);
    int x = (IMG_W / (COLS + 1)) * (c + 1) - 1 + (r % 2);
    return y * IMG_W + x;
  endfunction

  function automatic int ambient_at(input int p);
    int unsigned h = 32'(p) * 32'd2654435761;
    return int'((h >> 16) % (AMB_MAX + 1));
  endfunction

  // per-pixel images, rebuilt at each frame start: ambient pattern and the
  // LED spots the camera currently shows (-1 where there is none)
  int amb_img  [IMG_W*IMG_H];
  int spot_img [IMG_W*IMG_H];

  function automatic int cam_value(input int p);
    int v = (spot_img[p] > amb_img[p]) ? spot_img[p] : amb_img[p];
    return (v > 255) ? 255 : v;
  endfunction

  function automatic int max_ambient();
    int m = 0;
    for (int p = 0; p < IMG_W * IMG_H; p++)
      if (amb_img[p] > m) m = amb_img[p];
    return m;
  endfunction

  // value the camera currently shows for LED (r,c), as a testbench would read it
  function automatic int seen(input int r, input int c);
    return shown[CAM_DELAY][r][c];
  endfunction

  function automatic real level(input int r, input int c);
    return bright[r][c];
  endfunction

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        bright[r][c] = 0.0;
        kgain[r][c] = 0.09 + 0.08 * real'((r * 7 + c * 3) % 11) / 10.0;
        led_addr_tab[r][c] = led_addr(r, c);
        for (int d = 0; d <= CAM_DELAY; d++) shown[d][r][c] = 0;
      end
    for (int p = 0; p < IMG_W * IMG_H; p++) begin
      amb_img[p]  = ambient_at(p);
      spot_img[p] = -1;
    end
    frm = 0; we = 1; pix_in = 0; frame_no = 0;
  end

  // camera timing: position counters advanced by one clock at a time
  int ph = 0, col = 0, line = 0, pidx = 0;
  typedef enum {SYNC, ACTIVE, HBLANK, VBLANK} phase_e;
  phase_e phase = SYNC;

  always @(posedge clk) begin
    cnt <= (cnt == FRAME_CLKS - 1) ? 0 : cnt + 1;
    if (cnt == 0) begin
      // new frame: analog step, then the camera buffer shifts
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          if (row_sel[r]) begin
            bright[r][c] = bright[r][c] + kgain[r][c] * (real'(ref_out) - real'(pix_out[c]));
            if (bright[r][c] < 0.0) bright[r][c] = 0.0;
            if (bright[r][c] > BMAX) bright[r][c] = BMAX;
          end
          for (int d = CAM_DELAY; d > 0; d--) shown[d][r][c] = shown[d-1][r][c];
          shown[0][r][c] = $rtoi(bright[r][c] + 0.5);
        end
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          spot_img[led_addr_tab[r][c]]     = hide[r*COLS+c] ? -1 : shown[CAM_DELAY][r][c];
          spot_img[led_addr_tab[r][c] + 1] = hide[r*COLS+c] ? -1 : shown[CAM_DELAY][r][c] / 2;
        end
      frame_no <= frame_no + 1;
      phase = SYNC; ph = 0; col = 0; line = 0; pidx = 0;
    end
    we <= 1'b1;
    frm <= (phase == SYNC);
    unique case (phase)
      SYNC: begin
        if (++ph == FRM_CLKS) begin phase = ACTIVE; ph = 0; end
      end
      ACTIVE: begin
        if (ph == 0) pix_in <= 8'(cam_value(pidx));
        we <= (ph < CLK_PER_PIX / 2);
        if (++ph == CLK_PER_PIX) begin
          ph = 0; pidx++;
          if (++col == IMG_W) begin
            col = 0; line++;
            phase = (LINE_BLANK > 0) ? HBLANK : ((line == IMG_H) ? VBLANK : ACTIVE);
          end
        end
      end
      HBLANK: begin
        if (++ph == LINE_BLANK) begin
          ph = 0;
          phase = (line == IMG_H) ? VBLANK : ACTIVE;
        end
      end
      VBLANK: ;
    endcase
  end

endmodule
