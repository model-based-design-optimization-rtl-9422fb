# Balanced-pipeline Sobel edge detector

This is a streaming edge detector for RGB video. Each clock takes in one colour
pixel. For every pixel whose 3×3 neighbourhood lies inside the frame, the
detector outputs a binary edge decision and the gradient magnitude.

Two ideas shape the design:

- **No multipliers.** The standard Sobel detector needs 18 kernel
  multiplications and a square root. Both can be dropped:
  - Six of the kernel weights are zero, and the rest are ±1 or ±2.
  - A weight of 2 is a one-bit shift.
  - Grouping terms of the same sign leaves ten adders and subtractors.
    In each weighted sum, the two unit-weight pixels are added first, then
    the doubled middle pixel.
  - The magnitude `sqrt(Gx² + Gy²)` is replaced by `|Gx| + |Gy|`.
- **Balanced pipeline.** The chain is cut into small data-flow steps of similar
  delay, with a register after each step. The clock period is then set by the
  slowest small step, not by the slowest large function such as "Sobel" or
  "gradient and threshold". Registering only between the three large functions
  leaves one long stage (the gradient and threshold step) that limits the clock.
  Balancing removes that limit.

The line buffers come in two versions, chosen by a parameter:

- **Registers** (`USE_RAM = 0`, the default): fastest, but costs about 1600
  8-bit registers at 800 pixels per line.
- **Block RAM** (`USE_RAM = 1`): far fewer flip-flops, at some cost in speed.

Beside the detector, the top level holds two small circuits. They illustrate
the rules the pipeline was built by:

- A loop whose unrolling trades adders for latency.
- A loop with feedback, which cannot be pipelined.

## The pixel path

```
in_rgb ─► rgb2gray ─► line buffers ─► window3x3 ─► sobel ─────────► grad_thresh ──► out_edge
          (1 cycle)   reg or RAM (1)   (1)         sums (1), diffs (1)  |.| (1), add/cmp/switch (1)  out_mag
```

| stage | module | work in the stage | registered result |
|---|---|---|---|
| 1 | `rgb2gray` | `(R + 2G + B) >> 2` | 8-bit gray pixel |
| 2 | `linebuf_reg` / `linebuf_ram` | read the two stored lines at this column | column of 3 pixels |
| 3 | `window3x3` | shift the column into the window; raster position | 3×3 window, valid/sof/eol |
| 4 | `sobel` | four weighted sums `p + 2q + r` (2 adds each) | right, left, bottom, top sums |
| 5 | `sobel` | `Gx = right − left`, `Gy = bottom − top` | signed 11-bit Gx, Gy |
| 6 | `grad_thresh` | `abs(Gx)`, `abs(Gy)` | two 11-bit magnitudes |
| 7 | `grad_thresh` | `mag = abs(Gx) + abs(Gy)`, `edge = mag > threshold` | edge bit, magnitude |

Latency is **7 cycles**. Count from the clock edge that accepts pixel (x, y).
Seven edges later, the result appears for the window centred on (x−1, y−1).
There is no back-pressure, and every stage carries its own valid bit. Idle
input cycles therefore travel through the pipeline as bubbles, and the latency
stays 7 whatever the gaps. Throughput is one result per clock.

### Kernels and arithmetic

The window is `win[r][c]`, where row 0 is the top row and column 0 is the left
column.

```
Gx = (P13 + 2·P23 + P33) − (P11 + 2·P21 + P31)      right column − left column
Gy = (P31 + 2·P32 + P33) − (P11 + 2·P12 + P13)      bottom row − top row
```

Value ranges:

- Each weighted sum is at most 1020, so it fits in 10 bits.
- Gx and Gy lie in [−1020, 1020], so they fit a signed 11-bit value.
- The magnitude lies in [0, 2040], so it fits 11 bits unsigned.

The datapath has eight adders for the sums and two subtractors for the
differences, and no multipliers. The kernel orientation is the usual one. A
detector that only thresholds `|Gx| + |Gy|` gives the same edge map under any
sign convention.

The gray conversion weights (1/4, 1/2, 1/4) are this design's choice. They use
one shift and two adders and keep green dominant, as luminance does. To use
other shift-and-add weights, edit `rgb2gray.sv`. The reference model in
`tb/edge_ref_pkg.sv` must follow the same change.

## Line buffers: registers or RAM

Both versions have the same ports and the same one-cycle timing. Each outputs
a column with three entries:

- `out_col[2]`: the incoming pixel.
- `out_col[1]`: the pixel one row above it.
- `out_col[0]`: the pixel two rows above it.

**`linebuf_reg`** is one shift register of `2·WIDTH` pixels that advances on
each valid pixel. Taps at depths `WIDTH` and `2·WIDTH` give the two upper rows.
It has no address logic and the shortest paths, but it is large: at
`WIDTH = 800` it holds 1600 × 8 bits. On FPGAs such a chain usually maps to
shift-register LUTs.

**`linebuf_ram`** has two line memories of `WIDTH` pixels, addressed by a
column counter. On each valid pixel, both memories are read at the column, and
then written:

- The newer line RAM takes the incoming pixel.
- The older line RAM takes what the newer one held.

This read-before-write cascade keeps the rows one and two above always
available. `in_sof` resets the column counter.

During the first two rows of a frame, the upper entries of a column are stale.
`window3x3` discards those windows.

## Frame format and borders

- **Input.** Pixels arrive in raster order. `in_valid` qualifies each pixel.
  `in_sof` is high with the first pixel of a frame, and it resynchronises the
  position counters and the RAM column counter. Lines must be exactly `WIDTH`
  pixels. `HEIGHT` only bounds the row counter: a frame may end early, as long
  as the next one starts with `in_sof`.
- **Output.** Only interior pixels produce results, so each frame gives
  `(WIDTH−2) × (HEIGHT−2)` results, in raster order.
  - `out_sof` marks the first result of a frame, the pixel at (1, 1).
  - `out_eol` marks the last result of each row.
  - There is no padding and no result for border pixels. A design that needs a
    full-size output image must fill the one-pixel border itself.
- **Threshold.** `threshold` is a run-time input. It is sampled in the last
  stage, so a change takes effect on results that are in stage 6 at that
  moment.

## The two example circuits

**`unroll_accum`** sums four values into one accumulator register. With
`ADDERS` adders it handles `ADDERS` loop iterations per clock, so `done` comes
`4 / ADDERS` cycles after `start`:

| `ADDERS` | latency |
|---|---|
| 1 | 4 cycles |
| 2 | 2 cycles |
| 4 | 1 cycle (the default) |

The operands are captured on `start`. The width of the sum is `DW + 2` bits.

**`gcd_sub`** runs `while (a != b) if (a > b) a -= b; else b -= a;`, which
computes gcd(a, b):

- **One iteration per clock.** Each comparison needs the previous subtraction,
  so the loop cannot be pipelined.
- **One shared subtractor.** The two branches never run in the same iteration,
  so they share one subtractor. Multiplexers put the larger operand on its left
  input.
- **Zero operands.** An operand of zero ends the loop at once, and the result
  is the other operand. Without this, the loop would never end.
- **Timing.** `done` comes one cycle after the last subtraction.

These two circuits do not connect to the detector. In `mbd_cdfg_top` they only
have their own `acc_*` and `gcd_*` ports.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `WIDTH` | 800 | top, `edge_detector`, line buffers, `window3x3` | pixels per line |
| `HEIGHT` | 600 | top, `edge_detector`, `window3x3` | rows per frame (bounds the row counter) |
| `USE_RAM` | 0 | top, `edge_detector` | 0: register line buffers, 1: RAM line buffers |
| `ADDERS` | 4 | top, `unroll_accum` | adders of the unrolled loop (must divide 4) |
| `N`, `DW` | 4, 16 | `unroll_accum`, `gcd_sub` | loop length, operand width |

Shared types (`rgb_t`, `pix_t`, `col_t`, `win_t`, `grad_t`, `mag_t`) and widths
are in `rtl/edge_pkg.sv`. The default width of 800 pixels matches a register
budget of about 1615 eight-bit registers for the register version: two lines of
800, plus the window and pipeline registers. The 600-line height is an
assumption, an SVGA frame.

## Choices and departures

These points are this design's own choices, not fixed by the method:

- **Stage boundaries.** This design registers after every small operation
  group. The method only asks that the stages be of about equal delay, and
  suggests a coarser split for some FPGAs: gray conversion, the Sobel adders
  and the absolute value in one stage of about 3.5 ns on a Zynq-7010. The
  finer split here costs a few more registers and meets the same goal.
- **RAM organisation.** The RAM version reported for the original
  implementation uses four block RAMs. Here two line memories are used. A tool
  may split or merge them.
- **Gray weights and border handling.** See above.
- **Comparison.** The comparison is strict (`mag > threshold`).
- **Reset.** Reset is asynchronous and active low on all control and pipeline
  registers. Line-buffer contents are not reset: the window logic never uses
  them before they are written.
- **Protocol checks.** Assertions in `edge_detector` check that `out_sof` and
  `out_eol` only appear with `out_valid`.

Nothing here has been timed on an FPGA. The stage delays in the table above
are a design intent, not a measured result.

## Verification

Every module in `rtl/` has a self-checking testbench in `tb/` (`tb_<module>.sv`).
Each testbench prints `TB_RESULT checks=N failures=M` and stops itself through
a watchdog if the design hangs. The reference results come from
`tb/edge_ref_pkg.sv`, which uses the full Sobel kernels with
multiplications, not the RTL's shift-and-add form.

| testbench | what it checks |
|---|---|
| `tb_rgb2gray`, `tb_sobel`, `tb_grad_thresh` | random and extreme inputs; values and exact latency (1, 2, 2 cycles) |
| `tb_linebuf_reg`, `tb_linebuf_ram` | three frames with random gaps; each column against a stored copy of the frame |
| `tb_window3x3` | window contents, which positions are valid, sof/eol |
| `tb_edge_detector` | both buffer versions side by side, 4 frames, random gaps; every result, count and 7-cycle latency |
| `tb_unroll_accum` | 1, 2 and 4 adders; sums and 4/2/1-cycle latency |
| `tb_gcd_sub` | results, and cycle count = number of subtractions + 1 |
| `tb_mbd_cdfg_top` | end to end on both buffer versions with the examples running concurrently. It counts each mechanism: idle input cycles, frame restarts, dropped border pixels, edge and non-edge results, both buffer styles, 1- and 4-cycle sums, multi-step loops, zero-operand exit |
| `tb_full_size` | the top at its default parameters: one 800×600 frame, all 477 204 results checked (about 10 s) |
| `tb_full_size_ram` | the same frame with the RAM line buffers at full width |

To run one test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/edge_pkg.sv tb/edge_ref_pkg.sv tb/tb_edge_detector.sv --top-module tb_edge_detector
./obj_dir/Vtb_edge_detector
```

To lint the design:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/edge_pkg.sv rtl/mbd_cdfg_top.sv
```

The lint reports one warning, `SYNCASYNCNET` on `rst_n`. It comes from the
`disable iff` reset term of the assertions and has no hardware meaning.
