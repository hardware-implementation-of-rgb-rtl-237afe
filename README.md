# RGB-to-HSL conversion at one pixel per clock

Colour-based image analysis (object detection by colour, for instance) works
far better on hue, saturation and luminance than on raw red, green and blue.
In software, converting a pixel costs many instructions: a maximum and a
minimum, a case split on the dominant channel and two divisions. This RTL does
the whole conversion in hardware, one pixel every clock, so a video stream can
be converted as it arrives.

The design follows the thesis *Hardware Implementation of RGB to HSL Converter
Using FPGA*. That work builds the converter twice, and compares the two versions:

* a **parallel** converter. The whole computation is one combinational cone in
  front of a single output register, so the latency is one clock.
* a **7-stage pipelined** converter. Same arithmetic, cut into seven register
  stages, so the clock can be much faster and the latency is seven clocks.

Both are here. They produce bit-identical results, and `rgb2hsl_top` runs them
side by side on one input stream. The thesis states the two architectures, the
one-clock latency of the parallel one, the seven stages of the pipeline and the
rate of one pixel per clock. The number formats, the rounding, what each
pipeline stage does and the divider structure are this design's own choices.
They are listed under "Choices made here" below.

## The arithmetic

Inputs are 8-bit channels R, G, B (0..255). With

```
mx  = max(R,G,B)     mn = min(R,G,B)
d   = mx - mn        sum = mx + mn        F = 255
```

the outputs are

```
L = floor(sum / 2)                                   0..255
S = 0                              if d == 0
    floor(F*d / sum)               if sum <= F       (lower half of lightness)
    floor(F*d / (2F - sum))        if sum >  F       (upper half)       0..255
H = 0                              if d == 0
    floor((base*d + 60*(x-y)) / d)                   0..359 degrees
```

where the channel holding the maximum picks the 60-degree sector:

| maximum | x - y | base                    | hue range      |
|---------|-------|-------------------------|----------------|
| R       | G - B | 0, or 360 when G < B    | 0..60, 300..359 |
| G       | B - R | 120                     | 60..180        |
| B       | R - G | 240                     | 180..300       |

Ties for the maximum go to R, then G, then B. This matches the usual
software definition of HSL, with S and L scaled to 0..255 and H in whole
degrees. The `base` term keeps the hue dividend non-negative. Without it, the
red sector needs a signed division followed by a wrap around 360. With it,
both dividers are plain unsigned dividers, and every quotient is known to fit:
the hue quotient is below 360 (9 bits), and the saturation quotient is at most
255, because the divisor is never smaller than `d`.

## Parallel converter (`rgb2hsl_parallel`)

This is a direct transcription of the formulas. A comparator tree finds the
maximum, the minimum and the dominant channel. Then come the sum, the
difference, the hue dividend and the saturation divisor, and two `/` operators,
one for hue and one for saturation. Grey
pixels bypass both dividers. The result is registered once. The cost is a long
combinational path: two full dividers settle within a single clock period.

## Pipelined converter (`rgb2hsl_pipeline`)

The same computation, spread over `STAGES` registers (default 7). The dividers
are what makes the critical path long. So they are rewritten as restoring
dividers, one subtract-and-compare step per quotient bit, and those steps are
shared out over the middle stages:

| stage | work |
|-------|------|
| 1 | maximum, minimum, dominant channel; magnitude and sign of x - y |
| 2 | d, sum, L; hue dividend `base*d ± 60*abs(x-y)`; saturation dividend `255*d` and divisor |
| 3 | hue quotient bits 8..6, saturation bits 7..6 |
| 4 | hue bits 5..4, saturation bits 5..4 |
| 5 | hue bits 3..2, saturation bits 3..2 |
| 6 | hue bits 1..0, saturation bits 1..0 |
| 7 | H and S forced to 0 for grey pixels; output register |

A restoring step for quotient bit *i* compares the partial remainder with
`divisor << i`. If the remainder is at least as large, it subtracts and sets
the bit. After all steps the quotient is exactly the floor of the division. The
results therefore equal the parallel converter's, bit for bit.

For other values of `STAGES` (at least 4), the `STAGES-3` divider stages share
the bit steps evenly: step *j* (0 = most significant bit) of a Q-bit quotient
goes to divider stage `floor(j*(STAGES-3)/Q)`. Values 4, 5, 7 and 12 have been
simulated. Past 12 stages some divider stages do no work and only add latency.

The pipeline never stalls. A valid bit travels with every pixel, and empty
slots pass through as bubbles. Each stage's state is one packed struct, so
adding a field to carry, for example, video sync bits alongside the pixel
means editing one typedef.

## Interface and timing

All three modules use the types in `hsl_pkg`:

```
rgb_t = { r[7:0], g[7:0], b[7:0] }          24 bits
hsl_t = { h[8:0], s[7:0], l[7:0] }          25 bits, h in degrees 0..359
```

`rgb2hsl_parallel` and `rgb2hsl_pipeline` have the same ports:

| port | dir | width | |
|------|-----|-------|---|
| `clk` | in | 1 | pixel clock, rising edge |
| `rst_n` | in | 1 | asynchronous, active-low; clears all registers |
| `in_valid`, `in_pix` | in | 1, 24 | pixel, sampled on every rising edge |
| `out_valid`, `out_pix` | out | 1, 25 | result, 1 clock (parallel) or `STAGES` clocks (pipeline) after its pixel |

`rgb2hsl_top` (parameter `PIPE_STAGES = 7`) feeds one `in_valid`/`in_pix`
to both converters. It brings out their results as `par_valid`/`par_pix` and
`pipe_valid`/`pipe_pix`. On the thesis's board the pixels come from a CCTV
camera, and the results go to a VGA display, an RS-232 link to a PC and an
SD card. None of those board-level parts is in this RTL. Their connections are
the top's ports.

After synthesis with the Yosys coarse flow, the parallel converter is 57
word-level cells and 26 flip-flops (two divider cells). The pipelined one is
235 cells and 348 flip-flops. Timing on a real FPGA has not been measured. The
thesis reports operation up to 150 MHz. From general experience, the parallel
path with its two dividers is much slower than the pipelined one.

## Choices made here

The thesis does not specify the following, and each was decided for this RTL:

* 8 bits per channel (`hsl_pkg::CHAN_W`); hue as whole degrees in 9 bits;
  S and L on the input's 0..255 scale.
* Floor rounding everywhere, ties to R then G then B, and H = S = 0 for greys.
* What each pipeline stage computes, and the use of restoring division.
* The valid bit, no back-pressure, and the asynchronous active-low reset.
* Both converters instantiated together in the top, with no selector between
  them.

The thesis reports 99% (parallel) and 98% (pipeline) agreement between its
hardware and its software results. That figure depends on its own software
formula and rounding, which are not reproduced here. This RTL is exact
against its own integer definition, for all 2^24 inputs.

## Verification

Each testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. All of them share an integer reference model,
`tb/hsl_ref_pkg.sv`. It is written independently of the RTL: signed floor
division followed by a wrap into 0..359, instead of the RTL's offset dividend.

| testbench | what it does |
|-----------|--------------|
| `tb_rgb2hsl_parallel` | 14 hand-worked colours (primaries, secondaries, greys, hue 359, both saturation halves), a 16x16x16 grid and 20,000 random pixels with random gaps; checks the values and the one-clock latency |
| `tb_rgb2hsl_pipeline` | same stimulus, plus a reset with pixels in flight; checks the values, the 7-clock latency, order and one result per clock |
| `tb_rgb2hsl_top` | a 64x48 synthetic image sent line by line with blanking gaps, then random traffic, through both converters at the default parameters; checks each path, checks that the two agree, and fails if any case (grey, each dominant channel, hue wrap, each saturation half, idle slot, back-to-back pixels) never occurred |
| `tb_rgb2hsl_accuracy` | all 16,777,216 colours, back to back, through the top; counts exact and within-one-unit results for both converters (all exact) |

To run one with plain Verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_rgb2hsl_top \
    -y rtl -y tb +libext+.sv rtl/hsl_pkg.sv tb/hsl_ref_pkg.sv tb/tb_rgb2hsl_top.sv
./obj_dir/Vtb_rgb2hsl_top
```

The first three finish in well under a second. The full-cube sweep takes
about 20 seconds.

## Changing it

* `STAGES` / `PIPE_STAGES`: any value of at least 4. The testbenches expect 7;
  change their `LAT`/`PIPE_LAT` constants to match.
* `hsl_pkg::CHAN_W`: the RTL is written for any channel width, with S and L
  scaled to `2**CHAN_W-1`, but only 8 bits has been simulated. The reference
  model and the testbenches assume 8.
