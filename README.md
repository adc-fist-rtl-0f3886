# ADC-free event detection and stochastic object tracking for an image sensor

An always-on vision sensor spends most of its energy in analog-to-digital
converters. This design (after the ADC-FIST architecture) removes them. To
notice that something moved, it reads only two bits from one pixel in every
9 x 9 box. To process the regions where something moved, it turns each pixel's
bit-line voltage into a pulse train. The duty cycle of that train carries the
pixel value. A 9 x 9 Gabor filter is then computed with stochastic computing:
AND gates multiply, counters add, and one subtractor at the end applies the
sign. Nothing in the datapath is a multi-bit multiplier or an ADC.

The RTL here covers everything digital between the pixel array and whatever
uses the filtered regions. The two analog front ends, the sense amplifiers and
the pulse-width converters, come as behavioural models with the real parts'
ports. The pixel array stays outside the design.

## The sensor at a glance

| | default | meaning |
|---|---|---|
| pixel array | 2048 x 1024 | 32 x 16 regions of 64 x 64 pixels |
| event sampling | one pixel per 9 x 9 box | 227 x 113 boxes, 2 bits each |
| tracking buses | 8 | at most 8 regions processed at once |
| kernel | 9 x 9 | signed, loaded by command |
| bit-stream length N | 2^1 .. 2^10, default 64 | set at run time (precision) |
| parallelism | 8 x 4096 pixels | one SPE output per pixel of each active region |

A frame has two phases:

1. **Event detection.** The controller scans the 113 rows of boxes, one row per
   cycle. The row decoder raises only the centre row of the box row. The sense
   amplifiers resolve the two most significant bits of the 227 box-centre
   pixels. `event_detection_engine` compares them with the values stored from
   the previous frame and overwrites those values. A region gets an event flag
   when any box whose centre lies inside it changed.
2. **Object tracking.** If tracking is enabled and some region changed, the
   flagged regions are processed in *passes*. A pass covers up to eight regions
   of one region row, one per bus. Each pass resets the ramps, runs N
   accumulate cycles and returns 8 x 4096 signed filter outputs.

With tracking enabled and event detection off, a frame processes all 512
regions. With `continuous` set, frames repeat until a stop command.

## Stochastic convolution: how a pass computes the filter

This is the part that needs the most explanation.

**Pixel streams.** Every pixel of an active region feeds its own converter
(`abc`). A converter is a ramp generator and a comparator. Its output is high
while the bit-line level plus the ramp is at or above the reference. The ramp
restarts at the start of the pass and reaches full scale after exactly N clocks.
A pixel at level `v` (of 256) is therefore high for `floor(v*N/256)` clock
cycles, all at the end of the period. The SPE samples this pulse on the system
clock, which gives a bit stream of N bits whose count of ones is the pixel
value.

**Weight streams.** One `weight_stream_gen` serves all eight SPEs. Each of the
81 coefficients is stored as a sign and a 10-bit magnitude `m` (value
`m/1024`). At phase `k` of the pass, the tap's stream is 1 when the
bit-reversed `k`, left-aligned to 10 bits, is below `m`. Bit reversal spreads
the ones evenly over the period. This matters because the pixel stream is one
solid burst. A weight stream that was also a burst would overlap it almost
completely or not at all, and the AND would no longer be a product. A tap's
stream goes to `w_pos` if the coefficient is positive and to `w_neg` if it is
negative.

**Multiply, accumulate, subtract.** For every output pixel, the SPE ANDs the 81
sampled pixel bits of its 9 x 9 window with the 81 weight bits. It counts the
products of positive taps into one accumulator and those of negative taps into
another. At the end, `result = pos - neg`. The window is zero-padded at the
region border, so each region gives 64 x 64 outputs. The accumulators are 17
bits wide (81 x 1024 fits) and the result is 18 bits signed.

**Reading the result.** `result / N` approximates `sum(w * v/256)` over the
window, with `w` in [-1, 1). The error falls as N grows. In the end-to-end
tests, the mean absolute error at N = 1024 is 0.5 % (full-size image) to
1.1 % (reduced image) of the mean output magnitude. At N = 64 (64 cycles, 64 ns at 1 GHz) the result is coarse but
usable. This trade of time for precision is what the precision command sets.

**Pass timing.** Counted from the cycle that resets the ramps:

```
cycle 0        ramp_rst, accumulators cleared, weight phase -> 0
cycles 1..N    spe_en: pulses and weights sampled (last on cycle N)
cycle N+1      last product accumulated
cycle N+2      result_valid (results stay until the next pass starts)
```

Add one scheduling cycle before each pass. A pass costs N + 4 cycles: 68
cycles at N = 64.

## Buses and passes

The eight column buses are shared. Regions in columns `c`, `c+8`, `c+16` and
`c+24` all use bus `c mod 8`. Row lines run across the whole array, so all
regions of a pass must lie in the same region row. `roi_scheduler` copies the
event map and walks it row by row. For each bus it offers the leftmost region
still pending in the current row. When the pass finishes it retires those
regions, and a row with more pending regions gets another pass. Each empty row
costs one cycle. The number of passes in a row is therefore the largest number
of flagged regions on one bus. While a pass runs, `pass_row`, `roi_col` and
`roi_en` tell the pixel array which regions to put on the buses.

## Event detection details

- The frame memory holds 227 x 113 two-bit words (51,302 bits), one per box.
  It is written one box row per cycle.
- A box belongs to the region that holds its centre pixel, `(9*i + 4) / 64`.
  Box rows and regions do not line up, so a region receives 7 or 8 boxes per
  side.
- The first frame after reset only stores samples and raises no event. This
  keeps the random power-up memory contents from triggering tracking.
- The event test is "the 2-bit sample changed". There is no threshold and no
  count of changed boxes.

## Command port

One command is taken per cycle while `cmd_valid` is high:

| `cmd_op` | name | effect |
|---|---|---|
| 0 | NOP | |
| 1 | SET_MODE | `cmd_data[0]` event detection, `[1]` tracking, `[2]` continuous |
| 2 | SET_PREC | `cmd_data[3:0]` = log2 N, 1..10; anything else is refused |
| 3 | LOAD_W | `cmd_addr` = tap (row*9 + col), `cmd_data[10]` sign, `[9:0]` magnitude |
| 4 | START | start a frame (mode and N are sampled now) |
| 5 | STOP | end after the current frame |

A refused command pulses `cmd_error`. After reset both engines are on, N is 64
and all coefficients are zero. The Gabor coefficients themselves are not fixed
in hardware. The testbenches load a Gabor kernel with sigma 2.5, wavelength 5
and aspect 0.5, scaled so that its largest magnitude is 1023.

## Top-level interface (`adc_fist_top`)

| port | dir | size (default) | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `cmd_*` | in | 1 / 3 / 7 / 16 | command port above; `cmd_error` out |
| `row_en` | out | 1024 | row lines to the pixel array |
| `ede_level` | in | 227 x 8 | box-centre levels of the raised row, valid in the same cycle |
| `pass_active`, `pass_row`, `roi_col`, `roi_en` | out | 1, 4, 8 x 5, 8 | current pass |
| `roi_level` | in | 8 x 4096 x 8 | levels of every pixel of each bus's region, held for the pass |
| `event_map`, `ede_frame_done` | out | 16 x 32, 1 | flags of the last scan |
| `result`, `result_valid` | out | 8 x 4096 x 18 signed, 1 | filter outputs, row-major per region |
| `frame_done`, `busy` | out | 1 | frame status |

Levels are 8-bit codes that stand for analog voltages: code `v` means `v/256`
of the reference. The pixel array has no logic, so it appears only as these
ports. In the testbenches it is modelled from a test image. Only the
box-centre pixels need power during event detection; `pass_active` marks the
cycles in which the other pixels must be powered and read.

## What is logic and what is a model

- `abc` (ramp and comparator bank) and `sense_amp_array` (2-bit comparator
  bank) are behavioural models of analog circuits. They simulate and lint
  cleanly. In silicon they would be custom analog cells.
- All other modules are synthesizable RTL.
- The downstream "digital accelerator" of the original architecture is not
  specified, so the results simply leave the top.

## Choices made where the architecture leaves things open

- Event detection reads one centre pixel per 9 x 9 box. The original
  description also mentions reading only a region's central pixels. The
  per-box reading is the more specific of the two, so it is the one built.
- How the coefficients become bit streams (a bit-reversed counter compared
  with the magnitude) and the coefficient format.
- Zero padding at region borders; accumulator widths.
- The scheduler's service order. Tracking every region when event detection
  is off. Continuous mode.
- The command set, its encoding and reset values.
- The 8-bit level code used by the models, the shared ramp per converter bank,
  and the 1/4, 1/2, 3/4 thresholds of the sense amplifiers.
- The cycle-level sequence of the controller. The pass adds 3 cycles of reset
  and pipeline to the N cycles of the stream, plus 1 scheduling cycle.

Power, area and the comparison with ADC-based sensors are circuit-level
results. They cannot be reproduced from RTL and are not claimed here.

## Files

`rtl/`

- `adc_fist_pkg.sv`: sizes, command codes, `weight_t`, `mode_t`
- `adc_fist_top.sv`: the whole back end
- `command_decoder.sv`, `sensor_timing_ctrl.sv`, `row_ctrl.sv`: control
- `sense_amp_array.sv` (model), `event_detection_engine.sv`: event detection
- `roi_scheduler.sv`: passes of up to eight regions
- `abc.sv` (model), `weight_stream_gen.sv`, `spe.sv`: stochastic tracking path

`tb/` holds one self-checking testbench per module, `<module>_tb.sv`. There
are also two end-to-end tests:

- `adc_fist_top_tb.sv` runs a reduced array of 16 x 3 regions of 8 x 8 pixels
  with 3 x 3 boxes and the full kernel. It finishes in under a second of
  simulation.
- `adc_fist_top_full_tb.sv` runs the full 2048 x 1024 sensor at the default
  parameters. It needs about 2 minutes to build and 20 s to run.

Both end-to-end tests run six frames:

1. a priming frame;
2. three objects appear, two of them on the same bus, which forces a second
   pass in that row;
3. a quiet frame;
4. the objects leave, run at N = 1024 with an accuracy check;
5. tracking alone over every region at N = 4;
6. continuous event detection, ended by a stop command.

`adc_fist_precision_sweep_tb.sv` runs the precision workload. Two rows of
eight full 64 x 64 regions are filtered at N = 64, 128, 256, 512 and 1024.
For each length it prints the pass time, the mean error and the PSNR against
the exact convolution. It requires the error to fall with N and to stay below
1 % of the peak output at N = 1024. On its test scene the mean error falls
from 0.58 % of the peak output at N = 64 (PSNR 42.7 dB) to 0.33 %, 0.19 %,
0.18 % and 0.04 % (PSNR 65.4 dB) at N = 1024.

The two end-to-end tests check every event flag and every SPE output
bit-exactly. The expected values are computed independently in the testbench from the image and the
converter and weight-stream definitions. They also check the pass length and
count each mechanism.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and ends itself. A
watchdog stops it if it hangs. For example:

```
verilator --binary --timing --assert -Irtl rtl/adc_fist_pkg.sv \
    tb/adc_fist_top_tb.sv --top-module adc_fist_top_tb -o sim
./obj_dir/sim
```

Use the same pattern for any `<module>_tb`. The package must come first; the
other modules are found through `-Irtl`. To try other sizes, change the
parameters on the `adc_fist_top` instance in `adc_fist_top_tb.sv`.
`RROWS` and `RCOLS` must each be at least 2, because the row and column
index ports would otherwise have zero width.

The full-size design lints in about a minute. Coarse synthesis of the full
design unrolls 8 x 4096 windows of 81 taps (about 2.6 million AND terms and
65,536 accumulators). That is slow with open-source synthesis tools, so
synthesize at reduced `RSIZE` to explore the cost.
