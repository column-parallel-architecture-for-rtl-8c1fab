# Column-parallel pupil-centroid engine for a line-of-sight image sensor

In an infrared image of an eye, the pupil shows up as a dark disc. Its centre
tells you where the eye is looking. Rapid eye movements (saccades) can reach
about 700 degrees per second, so a sensor that follows them has to compute that
centre hundreds of times per second with a latency well under one frame.

This RTL computes the centroid of the dark pixels of every frame:

    cx = sum(x * p) / sum(p)        cy = sum(y * p) / sum(p)

Here `p` is 1 for a pixel darker than a threshold. The double sums are split so
that a VGA (640 × 480) frame costs only `NY + NX = 1120` clock cycles:

1. **Row phase (Y direction).** Every column has its own small processing
   element (PE). Rows are read out one per cycle. In each row step, all PEs add
   the pixel's three terms in parallel: `p`, `x*p` and `y*p`.
2. **Column phase (X direction).** The PEs are then selected one per cycle by a
   one-hot `XSEL` signal. Three shared buses carry the selected column's results
   to three accumulators outside the array.
3. **Division.** Two sequential dividers turn the three frame sums into `cx`
   and `cy`. Each result has 4 fraction bits (sub-pixel resolution). The
   dividers run while the next frame's row phase is already going on.

The clock rate needed is `F * (NY + NX)`. At 500 frames/s and VGA size that is
560 kHz. The per-column hardware grows only with `log2` of the image size, so
the PE fits in a pixel pitch.

## The column processing element

`column_pe` is one column. It holds a comparator and three ripple-carry
accumulators:

| circuit | module | per-row addend | width at 640 × 480 | largest value |
|---|---|---|---|---|
| S  | `s_column`  | `p`     | 9  | `NY` = 480 |
| SX | `sx_column` | `x & p` | 19 | `(NX-1)·NY` = 306 720 |
| SY | `sy_column` | `y & p` | 17 | `NY(NY-1)/2` = 114 960 |

Each accumulator is a chain of one-bit cells: `su_cell`, `sxu_cell` and
`syu_cell`. A cell holds a full adder (`fa_1bit`), a one-bit register and a bus
driver. The cells are chained carry-out to carry-in, so W cells form a W-bit
ripple-carry adder wrapped around a W-bit register. Because `p` is a single bit,
the product `x*p` needs no multiplier: each SX cell ANDs its bit of the column
coordinate with `p`. Each SY cell does the same with its bit of the row number,
which is broadcast to all columns. In S, `p` enters on the carry-in of bit 0.

Three details of the cells are this design's own choices:

- **Frame restart without a clear cycle.** The `first` input (high on row 0)
  forces the register operand of the adder to 0, so the first row overwrites
  the last frame's value. A frame therefore stays exactly `NY + NX` steps long.
  The column registers have no reset: each frame writes them before they are
  read.
- **Readout bus.** A physical sensor would drive a shared bus through tri-state
  buffers. Here each cell drives `xsel & q`, and the top ORs the buses of all
  columns together. The value is the same because only one column is selected
  at a time. An assertion in `timing_controller` checks that `xsel` is one-hot
  or zero.
- **Comparator.** The comparator (`column_comparator`) takes a digitised pixel
  value (`PW` = 8 bits, larger = brighter). It sets `p = pix < threshold`.
  A chip would compare the analogue pixel voltage instead.

## Frame timing

`timing_controller` sequences the frame:

```
cycle:     0   1  ...  R-1 | R    R+1  ...  R+NX-1 | R+NX
phase:     ROW ROW      ROW | COL  COL       COL    | ROW (next frame)
row_sel:   0   1  ...  R-1 |
xsel:                       | 1<<0 1<<1 ... 1<<NX-1
frame_done:                                         | 1
```

- `R` is `num_rows`. `0` means all `NY` rows. A smaller value reads only the
  first `R` rows, which is how the 640 × 64 and 640 × 175 readouts run on the
  same array.
- While `run` is high, frames follow each other with no gap. Leaving idle costs
  one cycle.
- `frame_done` pulses in the cycle after the last column step. In that same
  cycle `area`, `sum_x` and `sum_y` appear on the top's outputs and both
  dividers start.
- The dividers (`centroid_divider`, restoring, one quotient bit per cycle)
  deliver `cx` and `cy` together with `centroid_valid`. This happens
  `NW + FRAC + 1` cycles after `frame_done` (32 cycles at VGA size, where `NW`
  is the 27-bit sum width).
- `pupil_found` is 0 when no pixel was below the threshold. `cx` and `cy` are
  then meaningless.
- An assertion in the top checks that a new frame never finishes while the
  dividers are still busy. At VGA size the frame is 35 times longer than the
  division, so this never happens.

## Top-level interface (`los_sensor_top`)

| port | dir | width (default) | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of the control state, accumulators and dividers |
| `run` | in | 1 | run frames continuously while high |
| `num_rows` | in | 9 | row window (0 = all 480) |
| `threshold` | in | 8 | comparator level |
| `row_pix` | in | 640 × 8 | pixel values of row `row_sel`, column `i` at index `i` |
| `row_sel`, `row_read` | out | 9, 1 | row the pixel array must present; high during the row phase |
| `frame_done` | out | 1 | `area`, `sum_x`, `sum_y` updated |
| `area`, `sum_x`, `sum_y` | out | 19, 27, 27 | frame sums |
| `centroid_valid`, `pupil_found` | out | 1, 1 | centroid strobe; area was non-zero |
| `cx`, `cy` | out | 14, 13 | centroid, unsigned fixed point with 4 fraction bits |

The pixel array is outside the RTL. It is an array of analogue active-pixel
sensors: each pixel is reset, integrates photocurrent for an exposure time and
is read out row by row. Whatever plays that role must put row `row_sel` on
`row_pix` combinationally in the same cycle. The testbenches model this with a
function of (frame, x, y).

Parameters: `NX` = 640 and `NY` = 480 set the array size. `PW` = 8 is the pixel
width and `FRAC` = 4 the number of centroid fraction bits. Every other width is
derived in `los_pkg` from the worst case of an all-dark frame. The 16 × 16
prototype size is simply `NX = NY = 16`.

## Where this departs from the original architecture, and what is assumed

- The architecture was proposed for a CMOS image sensor with analogue pixels
  and analogue column comparators. Here the comparator is digital and the pixel
  array is outside the RTL. This matches the way the architecture was emulated
  on an FPGA behind a high-speed camera.
- The source gives the per-column maximum of SY in two different ways. This
  design uses `NY(NY-1)/2` (the sum of row numbers 0..NY-1), not
  `NY(NX-1)/2`. Coordinates start at 0.
- Per-column widths are "bits to hold the maximum". For example, S needs 9 bits
  to hold 480.
- The widths of the frame sums, the divider's structure, the fraction bits, the
  pixel width, the row window and the handling of a frame with no pupil are this
  design's own choices. The source says only that two divisions per frame are
  needed and are cheap.
- The pixel reset and exposure timing and the eyelid-occlusion calibration are
  not part of the RTL.

## Files

| file | content |
|---|---|
| `rtl/los_pkg.sv` | width functions, phase enum |
| `rtl/fa_1bit.sv` | full adder |
| `rtl/su_cell.sv`, `rtl/sxu_cell.sv`, `rtl/syu_cell.sv` | one-bit accumulator cells |
| `rtl/s_column.sv`, `rtl/sx_column.sv`, `rtl/sy_column.sv` | W-bit column accumulators |
| `rtl/column_comparator.sv` | pupil flag |
| `rtl/column_pe.sv` | one column |
| `rtl/column_accumulator.sv` | X-direction adder and register |
| `rtl/timing_controller.sv` | frame sequencer, XSEL |
| `rtl/centroid_divider.sv` | restoring divider |
| `rtl/los_sensor_top.sv` | the whole engine |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_los_sensor_top.sv` | end-to-end test at 16 × 16 |
| `tb/tb_los_saccade.sv` | eye-tracking scene at 40 × 30: fixations and saccades, centroids checked against the drawn pupil centre |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself; a
watchdog ends a hung run. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/los_pkg.sv tb/tb_los_sensor_top.sv \
          --top-module tb_los_sensor_top -Mdir obj_top && obj_top/Vtb_los_sensor_top
```

Replace the testbench name to run any other test. `tb_los_sensor_top` generates
a synthetic eye image for each frame: a dark disc of random centre and radius on
a bright, noisy background. They include one frame that is entirely dark (the
largest sums) and one with no pupil. The test computes the sums and the
quotients directly from the image. It also counts the design's mechanisms and
fail if any of them never happened:

- back-to-back frames
- a restart from idle
- a row window
- an empty frame
- a centroid delivered
- the exact `rows + NX` frame period

`tb_los_sensor_top` runs at 16 × 16, the size of the first integrated
prototype. To run it at the default 640 × 480 size, set its localparams to
`NX = 640` and `NY = 480`, its row windows to 64 and 175 rows and its
watchdog to 100 ms. That
configuration has been simulated and passes all checks. The catch is the build:
Verilator turns the 640 columns of bit-level cells into about 240 MB of C++,
which takes about 30 CPU-minutes to compile, while the simulation itself runs in
seconds. The column PE, the controller, the accumulator and the divider are
unit-tested at their full 640 × 480 sizes.

`tb_los_saccade` plays a short synthetic eye-movement sequence: a fixation, a
four-frame saccade, another fixation and a jump back. The pupil disc is
centred on a half-pixel grid, so its exact centroid is known in closed form.
The test checks each frame's `cx` and `cy` against it, to the last fraction
bit. It also checks that every result arrives before the next frame has been
read out, and that a velocity threshold on the reported track flags exactly the
saccade frames.

The unit tests use random stimulus plus the worst-case values that set each
width. The comparator test is exhaustive. The controller test checks
every cycle of several frames.
