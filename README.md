# Optical-feedback controller for an LED/OLED active-matrix display

Organic LEDs age unevenly: after a few thousand hours two pixels driven with
the same current no longer give the same light, and a display built from
them loses its uniformity. The remedy modelled here is to **measure the
light itself and close a feedback loop around it**. A light sensor (here a
camera looking at the array) reports how bright each pixel is, and a column
driver adjusts that pixel's drive until the measured brightness equals a
digital reference.

A loop per pixel would be too expensive. Instead there is **one loop per
column, time-shared by the pixels of that column**. One row at a time is
connected to the column drivers. Each driver then regulates the pixel of that
row in its column. When the row is released, every pixel keeps its drive
voltage on a hold capacitor until its row is served again. This is the same
row-by-row refresh that an ordinary active-matrix panel uses.

This repository holds the synthesizable RTL of the **digital controller** of
such a system. It was built as a 5x5 LED demonstrator around a CPLD. The
controller:

1. **calibrates**: it learns which camera pixel sees which LED, by lighting the
   LEDs one at a time and finding the bright spot;
2. **closes the loops**: in turn, it selects each row and sends every column
   driver two things: the camera's reading of that row's LED and the
   brightness reference. It waits until every column has settled, then moves
   to the next row, without end.

The analog parts (DACs, integrating op-amps, pixel sample-and-holds, LEDs)
and the camera are outside the RTL. The testbenches contain a behavioural
model of them.

## The system around the controller

```
             ref_in ─┐
                     ▼
   camera ──► digital_controller ──pix_out[c]──► DAC ─┐   (feedback, +)
  (clk, frm,         │          ──ref_out────► DAC ─┤   (reference, -)
   we, pix_in)       │                              ▼
       ▲             │                  integrating op-amp (one per column)
       │             │                              │
       │             └──row_sel[r]──► row switch ───┤ (one per pixel)
       │                                             ▼
       │                               hold cap ─► driving transistor ─► LED
       └──────────────── light ◄─────────────────────────────────────────┘
```

Each column driver integrates `ref - feedback`. When the camera value of the
selected LED is below the reference, the driver raises that LED's drive. When
it is above, it lowers it. The controller has two "forcing" codes that the
calibration relies on:

| code on `pix_out[c]` | effect on the selected LED of column c |
|---|---|
| `8'hFF` (off code) | looks brighter than any reference: LED driven dark |
| `8'h00` (on code)  | looks darker than the reference: LED driven fully on |

During calibration the reference output is fixed at `8'h20`. During feedback
it follows `ref_in`.

## Camera interface and frame timing

The camera sets the pace of everything:

* `clk`: the camera's 24.6 MHz base clock, which is also the system clock;
* `we`: write enable at about 6.1 MHz. Its **falling edge** marks a valid
  pixel value on `pix_in`;
* `frm`: frame sync at 60 Hz. Its **rising edge** starts a frame of 256x256
  pixels, read out row-major. A pixel's index in the frame (0..65535) is its
  16-bit **camera address**.

`camera_if` registers these signals and turns the edges into single-cycle
strobes: `frame_start`, `frame_end` (falling edge of `frm`) and `pix_valid`.
No second clock domain is needed. Pixels that arrive while `frm` is high are
ignored.

Every decision the controller makes is based on **whole frames**. The two
finders scan each frame and publish their result at the next `frame_start`:

* `auto_max_finder` finds the brightest pixel and its address. When several
  pixels share the maximum, the last one wins.
* `value_finder` (one per column) reads the value at a given address.

The detectors advance **once per frame**, on `frame_end`. Each waits for a
condition to hold over a run of consecutive frames:

| detector | used in | condition per frame | frames needed |
|---|---|---|---|
| `steady_noref_det` | GetAmbient | frame maximum equal to the previous one | 16 |
| `addr_finder` | FindAddr | brightest-pixel address unchanged | 3 (+1 tick to report) |
| `all_off_det` | SwAllOff | frame maximum ≤ ambient threshold | 16 |
| `steady_det` (per column) | Feedback | value within ±1 of `ref_in`, or ≤ ambient threshold | 128 |

In each detector, a frame that fails the condition restarts the count. The
detector's output stays high while it is enabled, and clears at the first
frame tick after it is disabled.

## Calibration and feedback: the state machine

`controller_fsm` has eight states:

```
reset ─► Idle ─► GetAmbient ─► SetPix ─► FindAddr ─► StoreAddr ─► SwAllOff ─┐
                    (steady)   (max>0x38)  (found)     (1 clock)   (all off)│
                                  ▲                                          │
                                  └────────── more LEDs to calibrate ◄───────┤
                                                                             │
                          FeedReset ◄─(all columns steady)─ Feedback ◄─ last LED
                              └──────(all detectors cleared, next row)──►┘
```

* **Idle**: every row is selected and every column gets the off code, so
  every LED goes dark. Idle always moves to GetAmbient on the next clock.
  Reset returns here from any state.
* **GetAmbient**: the LEDs stay dark while the brightest pixel in view is
  watched. Once it has been constant for 16 frames, the **ambient threshold**
  is set to that value + 2. This is the dimmest level the controller will
  treat as light from an LED.
* **SetPix**: only row `row_no` is selected and only column `col_no` gets the
  on code, so exactly one LED lights. The state ends once the frame maximum
  exceeds `0x38`.
* **FindAddr**: the controller waits until the brightest pixel's address has
  been the same for several frames, so that no address is taken while the
  spot is still changing.
* **StoreAddr**: in one clock, the address is written into column `col_no`'s
  memory at word `row_no - 1`.
* **SwAllOff**: all columns get the off code again. The state waits until the
  frame maximum has stayed at or below the ambient threshold for 16 frames.
  Then the next LED is chosen: rows 1..5 of column 1, then column 2, and so
  on. After LED (5,5), the machine enters Feedback with `row_no = 1`.
* **Feedback**: row `row_no` is selected. Each column's `value_finder`
  watches the stored address of that row's LED, and its reading goes straight
  to `pix_out[c]`. `ref_out` follows `ref_in`. The row is released once all
  five `steady_det`s report settled.
* **FeedReset**: the row select is dropped and the steady detectors are
  disabled. Once all five have cleared, the row number advances (5 wraps to
  1) and Feedback resumes.

The row and column counters change only on state changes. Entering Feedback
advances the row. Entering SetPix advances the row, or after row 5 goes back
to row 1 of the next column. The `state` output gives the state code:
Idle 000, GetAmbient 001, SetPix 010, FindAddr 011, StoreAddr 100,
SwAllOff 101, FeedReset 110, Feedback 111.

**What the timing means.** A row is held until all its columns have been
settled for 128 frames, which is at least 2.1 s at 60 frames/s. A full pass
over the 5 rows therefore takes more than 10 s. This pacing suits the
demonstrator: the camera adds about three frames of delay to the loop, and
the analog loop's crossover frequency was set accordingly low (about 1.7 Hz).
An integrated version with an on-pixel photodiode instead of a camera would
need a much faster loop and a different sequencer.

A covered LED reads as dark. Its driver therefore pushes it harder, and
because a reading at or below the ambient threshold counts as "settled", the
row still completes. When the LED is uncovered it is too bright. The next
time its row is served, the loop pulls it back to the reference.

## Modules

| file | what it is |
|---|---|
| `rtl/oled_fb_pkg.sv` | state enum and the fixed codes (off, on, calibration reference, lit threshold, ambient margin) |
| `rtl/digital_controller.sv` | top: wires everything below; ports as described above |
| `rtl/camera_if.sv` | camera edge detection into strobes |
| `rtl/auto_max_finder.sv` | brightest pixel of each frame and its address |
| `rtl/addr_finder.sv` | waits for the brightest-pixel address to settle |
| `rtl/steady_noref_det.sv` | ambient-level steadiness |
| `rtl/all_off_det.sv` | all-LEDs-dark detection |
| `rtl/column_addr_mem.sv` | per-column memory of LED camera addresses (5 x 16 bits, synchronous write, combinational read) |
| `rtl/value_finder.sv` | per-column camera value of one address |
| `rtl/steady_det.sv` | per-column loop-settled detection |
| `rtl/row_decoder.sv` | one-hot row select; all-rows and no-row cases |
| `rtl/controller_fsm.sv` | the state machine, counters, column and reference outputs |

Top-level parameters (the defaults are the demonstrator's): `ROWS = 5`,
`COLS = 5`, `PIX_W = 8` (pixel, reference and column values), and
`ADDR_W = 16` (camera address, for 256x256 pixels). The detector counts are
parameters of the detector modules; the defaults are in the table above.

The whole controller comes to roughly 400 word-level cells, 394 flip-flop bits
and 400 memory bits.

## Decisions beyond the original description

The controller follows the original CPLD design: its state sequence and
conditions, the fixed codes, the counter rules, the detector conditions and
counts, and the 5-word column memories. These points are this
implementation's own:

* **One clock domain.** In the original, the finders are clocked by the
  camera clock and the detectors by the frame signal. Here everything runs on
  `clk`, and the edges become strobes (`camera_if`). This adds two clocks of
  latency, which is negligible next to a frame.
* **Synchronous reset** clears every register. Calibration then restarts from
  Idle.
* **Registered outputs.** The original decodes the column outputs and the
  reference from the state, and they hold in the states that do not assign
  them. Here they are registers that change one clock after the state does.
* **All-off count.** The original text says only "for a sufficient number
  of" cycles. Here it is 16 frames, the same as the ambient detector.
* **Row-select polarity.** The controller drives `row_sel` **active high**:
  one bit high selects a row, all low selects none. The pixel's PMOS row
  switch conducts on a low gate, so a level-shifting inverter is assumed
  between the controller and the array.
* **FeedReset state code.** FeedReset gets its own code, 110. In the original
  it shows the same code as Idle.
* **Ambient threshold** saturates at 255, where the original would wrap
  around.
* **Steady window** (±1 code) is computed without wrap-around at 0 and 255.
* **value_finder** counts pixels even while disabled, so that enabling it in
  mid-frame cannot misalign addresses.
* **Column memory** word = row number - 1. Rows count from 1, and this way
  five words hold rows 1..5.

## Simulation

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and ends. Each has a watchdog. Example with
plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/oled_fb_pkg.sv \
    tb/tb_digital_controller.sv --top-module tb_digital_controller \
    -y rtl -y tb +libext+.sv -o sim && ./obj_dir/sim
```

Unit testbenches:

* `tb_auto_max_finder`: random frames, including ties;
* `tb_value_finder`: random addresses, including ones outside the frame and
  enabling in mid-frame;
* `tb_addr_finder`, `tb_steady_noref_det`, `tb_all_off_det`, `tb_steady_det`:
  directed sequences with hand-worked expectations, including the window
  edges;
* `tb_column_addr_mem`: random writes against a reference copy;
* `tb_row_decoder`: exhaustive;
* `tb_controller_fsm`: the whole calibration of 25 LEDs, two feedback
  rounds and a reset, with the detectors played by the testbench.

System testbenches use the controller at its default size. They connect it to
`tb/led_array_model.sv`, a behavioural model of the column drivers, the LED
array and the camera:

* Each driver is a discrete integrator, updated once per frame with a
  per-LED gain between 0.09 and 0.17. This corresponds to a loop crossover
  near 10.5 rad/s at 60 frames/s. The gain differs from LED to LED, to stand
  for aged OLEDs.
* Unselected rows hold their level.
* The camera shows the array one frame late, on a fixed ambient pattern of
  0..6.
* Any LED can be hidden from the camera.

`tb/dc_system_test.sv` drives the whole system. It checks:

* the ambient threshold;
* that the stored address of every LED matches the model;
* that the camera sees every LED of a released row within ±1 of the
  reference;
* every state transition against the state diagram;
* the pacing: StoreAddr lasts one clock, GetAmbient and SwAllOff at least
  16 frames, and each row stays in Feedback for at least 128 frames.

It also counts each mechanism and fails if any never occurs: every state,
the row wrap, a reference change, the overdrive of hidden LEDs, and a reset
during feedback.

* `tb_digital_controller`: 32x32-pixel camera image, so that it runs in
  seconds. Calibration, three feedback rounds (reference 100, then 60, then
  100 with row 2 hidden for 40 frames), then a reset.
* `tb_digital_controller_full`: the real camera format (256x256 pixels,
  4 clocks per pixel, 410,000 clocks per frame). Calibration plus one
  feedback round, about 1,800 frames, or some 750 million clocks; it takes a
  few minutes.

## Limits

* Only the digital controller is RTL. The camera, the DACs, the op-amp
  column drivers with their RC compensation, and the pixel circuits are
  analog or bought-in parts. They exist only as the simplified testbench
  model described above, which does not reproduce transistor
  non-linearities, noise or op-amp dynamics.
* The model's LED spots are one pixel (plus a half-bright neighbour). A real
  camera sees larger, noisier spots, and the brightest-pixel address may then
  take longer to settle.
* The controller's pacing (128 settled frames per row) is tied to the slow
  camera-based loop. It is not a design for a large panel refreshed at
  60 Hz.
