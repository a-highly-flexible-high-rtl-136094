# Real-time noise cancelling for a high-speed CMOS camera

High-speed CMOS image sensors read all columns in parallel, each column
through its own amplifier and ADC. Two kinds of noise dominate their
images: uncorrelated noise (temporal and fixed-pattern, pixel by pixel) and
a gain error that differs from column to column and shows as vertical
stripes. This RTL removes both in the camera's pixel path, before the frames
reach the DRAM frame buffer, at the sensor's full data rate: eight 10-bit
pixels per clock, 1.6 Gpixel/s at 200 MHz, using only on-chip memory.

```
            +-----------------+      +-------------------------------------------+
 in_beat -->| pyramid_filter  |----->| column_gain                               |--> out_beat
 (8 px/clk) | 3x3 (1 2 1)/16  |      |  colsum_accum -> coef_calc -> coef memory |
            | 2 line buffers  |      |                     |                     |
            +-----------------+      |  gain_comp (8 multipliers) <--+           |
                                     +-------------------------------------------+
```

The top module is `noise_cancel` (`rtl/noise_cancel.sv`). The two stages
can be switched on and off independently, per frame.

## Pixel stream

Everything travels as `nc_pkg::beat_t`: eight horizontally adjacent pixels
of one line (`px[0]` is the leftmost) plus three flags, `sof` on the first
beat of a frame, `eol` on the last beat of each line and `eof` on the last
beat of the frame. Frame size is not configured anywhere. It follows from
the flags and may be any region of interest up to `MAX_W` x `MAX_H`
(1280 x 1024, the sensor's full size). Widths are whole beats: multiples of
8 pixels.

The input has valid/ready. The output has valid only: the block is a
pipeline and nothing downstream may stall it. `in_ready` drops in three
cases:

* for one clock at the end of every line (the filter's drain clock, below);
* for the filter's last-line flush, one beat per clock for a line's width,
  after `eof`;
* while a new frame's `sof` beat is held back, until both stages are idle.
  With column gain compensation on, that includes the coefficient
  calculation after every frame.

So a filtered frame of `Wd` beats by `H` lines is taken in `Wd*H + H - 2`
clocks. With both stages on, the next frame can start about
`Wd + 2*W + 60` clocks after `eof`, with `W` the width in pixels.

## Stage 1: pyramidal filter (`pyramid_filter`)

Smooths with the 3x3 kernel

```
        1 2 1
 1/16 * 2 4 2
        1 2 1
```

All weights are powers of two, so the filter has no multipliers. It is split
into a vertical pass `v = top + 2*mid + bottom` and a horizontal pass
`(v[c-1] + 2*v[c] + v[c+1] + 8) >> 4`, which rounds to nearest.

Two line buffers hold the previous two input lines, one 8-pixel word per
address. While input line `r` arrives, the vertical pass for output line
`r-1` is formed from both buffers and the incoming word, and the buffers
shift down.

The horizontal pass needs the first pixel of the next word. So output word
`j` of a line leaves when word `j+1` has been summed vertically. The last
word of the line has no successor: it leaves in an extra *drain* clock,
with its right edge replicated, during which `in_ready` is low. The last
output line also has no line below it. After `eof` the filter reads its
line buffers once more and emits that line, with the bottom row replicated.
All four image borders replicate the edge pixels.

Latency is one line plus two clocks. A frame with the filter off passes
with one clock of latency.

## Stage 2: column gain compensation (`column_gain`)

The idea is to find each column's gain error from the column sums.
Scene content varies slowly from column to column. A gain error varies from
one column to the next, so it adds high-frequency content to the column sum
profile. For each column `i`:

1. `s(i)`: the sum of column `i` over the frame (`colsum_accum`).
2. `s_ref(i)`: a low-pass filtered `s`, from a 16th-order FIR (`lp_fir`).
   The 17 taps form a triangle, 1, 2, ..., 9, ..., 2, 1.
3. `c(i) = s_ref(i) / s(i)`: the raw correction. It is 1.0 where `s(i) = 0`.
4. `dh(i) = |s(i+2) + 2 s(i+1) - 2 s(i-1) - s(i-2)|`: a smoothed horizontal
   derivative of the sums (`hdyn_est`). Near a real vertical edge in the
   scene, `c(i)` would "correct" the edge and paint light and dark stripes,
   so the correction must be weakened there.
5. `ck(i) = 1 + w(i) (c(i) - 1)` with `w(i) = 1 - dh(i)/max(dh)`: full
   correction in flat regions, none at the strongest edge.

Columns beyond the image border are replaced by the edge column. The
formula for `ck` is the one place where the design's intent and its
equation disagree. The equation in the method's description weights by
`dh/max(dh)` itself, which would correct most at edges. The stated intent
is to attenuate at edges, and that is the default. Parameter
`DYN_ATTEN = 0` selects the other weighting. On the 512 x 512 workload below
the default gives 30.5 dB PSNR, the other weighting 29.3 dB.

### Frame schedule

No external memory is used, so a frame cannot wait for its own
coefficients. Instead, **the coefficients measured on frame N correct frame
N+1**:

* During a frame, `colsum_accum` adds every pixel to its column's sum. It
  uses 8 memory lanes with a read-modify-write per beat. The first line
  overwrites instead of adding, so no clearing pass is needed. Back-to-back
  updates of one word are forwarded.
* Two clocks after `eof`, `coef_calc` runs two passes, one column per clock.
  * Pass 1 streams the sums, with edges replicated, through a 17-sum
    window. The FIR and the dynamics estimator read that window. A pipelined
    divider forms `c(i)`. `c(i)` and `dh(i)` go into two local memories,
    and the maximum of `dh` is tracked.
  * Pass 2 reads `c(i)` and `dh(i)` back, divides `dh` by its maximum in
    the same divider, and writes `ck(i)` into the coefficient memory inside
    `gain_comp`.

  The whole calculation takes exactly `2*ncols + 56` clocks.
* `gain_comp` multiplies the eight pixels of every beat of the next frame
  by their columns' coefficients. Eight multipliers work in parallel, and
  each result is rounded to nearest and saturated at 1023. Latency is two
  clocks.

Two rules keep the pieces apart. The top holds the next `sof` until the
calculation has finished, so the memories are never shared in time.
`coef_valid` says whether any coefficients exist. The first enabled frame
after reset, or after a frame with the stage off, is measured but passes
uncorrected. If a frame is wider than the one that was measured, its extra
columns pass uncorrected.

This hold is what column gain compensation costs in frame rate. At 200 MHz
and full width it adds about 13 us per frame.

### Number formats

| quantity | format |
|---|---|
| pixel | unsigned 10 bit |
| column sum `s` | unsigned 20 bit (10 bit x 1024 lines, cannot overflow) |
| FIR output | unsigned 27 bit, gain 81, removed by dividing by `81*s(i)` |
| `c`, `ck` | unsigned Q2.14, 16 bit; `c` saturates just below 4.0 |
| `dh` | unsigned 22 bit, twice the textbook estimate (the factor cancels) |
| `dh / max(dh)` | Q2.14, at most 1.0 |

`(c - 1) * w` is shifted right arithmetically, which rounds toward minus
infinity.

## Module list

| file | what it is |
|---|---|
| `nc_pkg.sv` | beat type, pixel and coefficient formats |
| `noise_cancel.sv` | top: filter, then column gain, frame hold, enables |
| `pyramid_filter.sv` | 3x3 pyramidal filter with line buffers |
| `column_gain.sv` | column gain stage: sums, calculation, correction, control |
| `colsum_accum.sv` | column sums in dual-port memory |
| `coef_calc.sv` | two-pass coefficient calculation |
| `lp_fir.sv` | 17-tap triangular low-pass over column sums |
| `hdyn_est.sv` | horizontal dynamics estimator |
| `pipe_div.sv` | pipelined restoring divider, one result per clock |
| `gain_comp.sv` | coefficient memory and eight fixed-point multipliers |
| `dp_ram.sv` | simple dual-port RAM, registered read |

Top-level parameters: `MAX_W` = 1280, `MAX_H` = 1024, `ORDER` = 16 and
`DYN_ATTEN` = 1.

On-chip memory at the defaults is about 120 kbit:

* filter line buffers: 2 x 160 x 80 bit;
* column sums: 1280 x 20 bit;
* coefficients: 1280 x 16 bit;
* `c`: 1280 x 16 bit;
* `dh`: 1280 x 22 bit.

## Simulating

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. `tb/nc_ref_pkg.sv` holds the reference
models, written from the equations: filter, coefficients and gain. For
example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/nc_pkg.sv tb/nc_ref_pkg.sv \
  rtl/*.sv tb/tb_noise_cancel.sv --top tb_noise_cancel -Mdir obj && obj/Vtb_noise_cancel
```

`tb_noise_cancel` runs the top at its default parameters. It sends frames
with every combination of the two enables, ending with two full
1280 x 1024 frames (about 15 s of simulation). It checks every output pixel
against the reference. It also checks that each mechanism occurs at least
once:

* the drain clock per line;
* the flush;
* the frame hold;
* both bypasses;
* a measured frame;
* a corrected frame.

`tb_workload_512` measures image quality on a 512 x 512 synthetic scene.
The scene gets Gaussian noise of variance 0.005 of full scale and a fixed
per-column gain error of the same variance. It reports PSNR against the
clean scene:

| output | PSNR |
|---|---|
| noisy input | 21.8 dB |
| filter only | 28.9 dB |
| filter and column gain | 30.5 dB |

It fails if either stage gains less than expected (3 dB for the filter,
1 dB for the column gain stage).

The block testbenches also check timing:

* the filter's flush latency;
* the divider's latency of 17 clocks;
* the calculation time of `2*ncols + 56` clocks;
* the two-clock latency of the gain stage.

## How far to trust it, and where it departs

* Every output pixel of every testbench matches the reference bit for bit.
  The reference shares the design's number formats, so the tests verify the
  arithmetic described here. They do not test image quality.
* The design has not been synthesised for an FPGA or timed. The source
  design ran at 200 MHz on a Virtex-4 with deep pipelining. This RTL
  splits the 17-tap FIR over two pipeline stages. It forms each filter
  pass, each divider stage and each multiplier output in a single cycle.
  Some of these may need more pipeline registers to reach 200 MHz. The filter's line buffers are read
  combinationally (distributed RAM). The other memories have registered
  reads (block RAM).
* Choices of this RTL, not given by the method:
  * the FIR tap values;
  * the fixed-point formats;
  * rounding and saturation;
  * edge replication;
  * the stream framing and drain clock;
  * the two-pass schedule;
  * applying coefficients to the following frame;
  * invalidating the coefficients when the stage is switched off;
  * leaving unmeasured columns of a wider frame uncorrected;
  * filter-then-gain order, with sums taken from the filtered image.
* The coefficient calculation here handles one column per clock. At full
  width it therefore costs about 1.6% of a full frame's time, and every
  region of interest of the sensor keeps real time. An implementation with
  a slower calculation would limit real-time column correction to smaller
  widths.
* The surrounding camera system is not included: sensor interface and
  control, bus-master acquisition peripheral, DDR2 frame buffer and
  processor. `noise_cancel` expects a clean beat stream and produces one.
