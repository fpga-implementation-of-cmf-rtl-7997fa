# Complex matched filter (CMF) for real-time palm line extraction

Palmprints and palm veins are networks of line-like structures. A
classic way to find them is matched filtering: correlate the image with a
line-shaped kernel, once for every orientation, and keep the best answer.
That costs one full 2-D convolution per orientation. The complex matched
filter replaces the whole bank with **one complex kernel**

    M(rho, theta) = exp(j*2*theta) * r(rho)
    r(rho)        = exp(-(rho - r0)^2 / sigma^2) + exp(-(rho + r0)^2 / sigma^2)

(rho, theta: polar coordinates around the kernel centre; r0 sets the scale
of the lines, sigma the width of the ring). Correlating an image with it
takes two real convolutions, one with the real part and one with the
imaginary part. A line through the kernel centre at direction phi gives
a result with angle 2*phi. The factor 2 is there because a line at phi and
at phi + 180 degrees is the same line. Halving that angle therefore gives
the line direction. The magnitude gives the line strength. The pair of the
two is the **matching intensity vector** of the pixel.

This RTL implements the filter as a streaming FPGA datapath. It takes one
pixel per clock from a camera, stores only as many image rows as the
kernel spans in on-chip RAM and registers, and returns one matching
intensity vector per pixel. The defaults are a 15 x 15 kernel and
640-pixel image rows, which at a 25 MHz pixel clock is more than enough
for 640 x 480 video at 30 frames/s. The design also carries the
multiplier-saving scheme that goes with it. Kernel positions whose
coefficients are zero, a power of two, or equal or opposite in the two
parts need no multiplier, and the filter can be built without them.

```
 pix ──► active part 0 ──► passive part 0 ──► active part 1 ──► ... ──► active part M-1
          │  (M pixel regs,      (R-M pixel        │                         │
          │   M re + M im taps,   RAM delay)       │                         │
          │   2 row adder trees)                   │                         │
          ▼ row_re/row_im                          ▼                         ▼
        ┌──────────────────────── tree adders (re, im) ─────────────────────────┐
        └────────────────────────────┬──────────────────────────────────────────┘
                      conv_re, conv_im (exact complex correlation)
                                     ▼
             cmf_vector:  |.| approx ─┐
                          CORDIC (x,y)->(angle) ─► angle/2 ─► CORDIC (mag, angle/2)->(x,y)
                                     ▼
                       mag, angle, vec_x, vec_y
```

## The sliding window: active and passive parts

An M x M window that moves one pixel per clock over a raster-scanned image
needs the last M-1 rows plus M pixels. That is M^2 + (M-1)(R-M) pixels for
R-pixel rows: 8975 pixels for the defaults. The storage is cut into
M pairs, one per kernel row:

* **Active part** (`active_part`): M pixel registers in series. Every one
  of them is visible at once, so these are the window pixels that get
  multiplied.
* **Passive part** (`passive_part`): R-M pixels that only have to be
  delayed until the next row comes round. They sit in block RAM used as a
  circular buffer (R-M-1 words plus a registered read port). The pair
  behaves exactly like an (R-M)-stage shift register.

The stream goes active part 0 → passive part 0 → active part 1 → ... →
active part M-1. There are M-1 passive parts; the last active part needs
none. At the defaults that is 225 pixel registers and 14 × 624 × 8 bits
of RAM.

Orientation matters when the kernel is loaded. Register j of active part
k holds the pixel **k rows above and j columns left of the newest
pixel**. The window of the pixel just accepted at image position (y, x) is
therefore centred on (y - c, x - c), with c = (M-1)/2. A kernel written as
C[row][col], row 0 at the top, belongs at chain position
(k, j) = (M-1-row, M-1-col). Nothing special is done at image borders. In
the first M-1 columns of a row the window wraps into the end of the
previous row, and the first M-1 rows of a frame use stale RAM contents.
These outputs are produced anyway and have to be discarded downstream,
like any line-buffer filter's border outputs.

## Products, coefficient chains and the multiplier plan

This is the part of the design that is least obvious from the outside.

Each window position (k, j) produces two products: pixel × real
coefficient and pixel × imaginary coefficient (`tap_mult`). A plain
implementation needs 2·M² = 450 multipliers for 15 x 15. Each product is
built in one of five ways, fixed per position by the `PLAN` parameter
(`cmf_pkg::tap_pair_plan_t`):

| kind        | product                                    | multiplier | coefficient register |
|-------------|--------------------------------------------|------------|----------------------|
| `TAP_MUL`   | pixel × loaded coefficient                 | yes        | yes                  |
| `TAP_ZERO`  | 0                                          | no         | no                   |
| `TAP_SHIFT` | ±(pixel << n), coefficient ±2^n, n ≤ 7     | no         | no                   |
| `TAP_SAME`  | imaginary part only: the real product      | no         | no                   |
| `TAP_NEG`   | imaginary part only: −(real product), as bit inversion + 1 | no | no       |

Only `TAP_MUL` positions hold a coefficient register, so the number of
multipliers equals the number of coefficient registers. The registers form
two serial chains, one for the real and one for the imaginary part, with
their own shift strobes (`coef_re_shift`, `coef_im_shift`). A value shifted
in enters at active part 0, position 0. It moves towards position M-1 and
then on into active part 1, and so on, skipping non-`TAP_MUL` positions.
To load a kernel, shift the value for the last multiplier position first
and the one for (0, 0) last: M² values per part with the default plan.
Loading may happen at any time. Results of pixels accepted before the
first shift still use the old kernel.

The default `PLAN` makes every position `TAP_MUL`. That gives a fully
general filter whose kernel can be replaced at run time (450 multipliers,
450 coefficient registers). A reduced filter is a rebuild: compute the
plan from a kernel and pass it in. Package `cmf_mask_pkg` does this at
elaboration time, in four steps:

1. `cmf_ideal` evaluates the kernel formula above (zero at the centre,
   where theta is undefined).
2. `cmf_quant` quantises it to signed 8 bits with the largest magnitude
   at 127. `cmf_scale` gives the scale factor.
3. `cmf_rounded` moves each coefficient by at most ±DELTA so that fewer
   multipliers are needed. For each position it considers leaving the
   values, moving one or both parts to the nearest 0/±2^n, making them
   equal, or making them opposite. It takes the option with the fewest
   multipliers, and among those the smallest squared error.
4. `cmf_tap_plan` turns the rounded pair of chain position (k, j) into a
   plan entry.

```systemverilog
import cmf_pkg::*; import cmf_mask_pkg::*;
localparam real SC = cmf_scale(15, 3.0, 1.5);
function automatic tap_pair_plan_t [14:0][14:0] mkplan(int delta);
  for (int k = 0; k < 15; k++) for (int j = 0; j < 15; j++)
    mkplan[k][j] = cmf_tap_plan(k, j, 15, 3.0, 1.5, SC, delta);
endfunction
cmf_filter #(.PLAN(mkplan(10))) u_cmf ( ... );
// then load cmf_rounded(...) of every TAP_MUL position through the chains
```

For r0 = 3 and sigma = 1.5, which exactly fill a 15 x 15 kernel
(2·r0 + 6·sigma = 15), the round-off sweep in `tb_cmf_delta` gives:

| ±DELTA | multipliers | kernel error (L2, relative) | intensity PSNR vs. double-precision filter |
|-------:|------------:|-----------------------------:|-------------------------------------------:|
| 0      | 152         | 0.6 %                        | 52.3 dB                                     |
| 4      | 144         | 1.2 %                        | 50.3 dB                                     |
| 10     | 104         | 8.4 %                        | 39.4 dB                                     |
| 28     | 92          | 11.5 %                       | 35.5 dB                                     |

Even at DELTA = 0 many positions are exact zeros or powers of two,
because this kernel is nearly zero outside its ring. The counts depend
strongly on r0, sigma and the rounding rule. The original work reports
about 450 multipliers at DELTA = 0 and none at DELTA = 28, at about 17 %
kernel error. Those numbers come from kernel parameters and a rounding
optimiser that are not published, so they are not reproduced here.

## From the complex value to the matching intensity vector

The two adder trees produce the exact correlation `conv_re + j·conv_im`
(24 bits each, no rounding). `cmf_vector` then does four things:

1. **Intensity.** `abs_approx` computes
   mag = max(x, x − x/8 + y/2), where x = max(|re|, |im|) and
   y = min(|re|, |im|). This shift-and-add textbook approximation of the
   square root stays within about 3 % of the true length. A real square
   root would not run at pixel rate.
2. **Angle.** `cordic_vec` is a vectoring CORDIC: a ±90° pre-rotation,
   then 16 micro-rotations, one per pipeline stage. It gives the angle as
   a binary angle, where 2^16 is a full turn.
3. **Halving.** An arithmetic shift right halves the angle. The result
   lies in (−90°, 90°] and is the line direction. The y axis points down
   the image, so positive angles turn clockwise on screen.
4. **Vector.** `cordic_rot` is a rotation CORDIC. It rotates (mag, 0) by
   the halved angle and gives vec_x = mag·cos, vec_y = mag·sin. A constant
   multiply by 1/1.6468 removes the CORDIC gain first.

## Interface and timing of `cmf_filter`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | pixel clock; asynchronous active-low reset (valid flags, RAM pointers, coefficients) |
| `pix_valid`, `pix` | in | 1, 8 | pixel enable and unsigned pixel, raster order. Nothing in the window moves while `pix_valid` is low |
| `coef_re_shift`, `coef_re_in` | in | 1, 8 | real coefficient chain (signed) |
| `coef_im_shift`, `coef_im_in` | in | 1, 8 | imaginary coefficient chain (signed) |
| `conv_valid`, `conv_re`, `conv_im` | out | 1, 24, 24 | complex correlation, 2 + 2·⌈log2 M⌉ = 10 cycles after the pixel |
| `out_valid`, `mag`, `angle`, `vec_x`, `vec_y` | out | 1, 24, 16, 25, 25 | intensity, halved angle, vector; 2·NIT + 3 = 35 cycles after `conv_valid` (45 after the pixel) |

There is no backpressure. The filter accepts a pixel on every clock and
returns exactly one result per accepted pixel, in order. Gaps in
`pix_valid`, for example line blanking, just pass through as gaps in the
valid outputs.

Parameters: `M` (kernel size, 15), `R` (row length, 640), `NIT` (CORDIC
iterations, 16) and `PLAN` (see above). Word widths follow from these:
8-bit pixels and coefficients, 16-bit products, and 20-bit row sums and
24-bit totals for M = 15.

Synthesised at the defaults, the filter has 450 tap multipliers plus one
constant multiplier for the CORDIC gain. It also has about 19.6 k
flip-flops and 70 kbit of line-buffer RAM.

## Verification

Each testbench in `tb/` is self-checking. It compares against values it
computes itself, mostly by direct integer or floating-point evaluation,
and ends by printing `TB_RESULT checks=N failures=F`.

| testbench | what it shows |
|-----------|---------------|
| `tb_tap_mult` | every product kind, 1-cycle latency |
| `tb_tree_adder` | 15- and 5-input trees, one sum per cycle, ⌈log2 N⌉ latency |
| `tb_passive_part` | delay of exactly DEPTH shifts (625, 10, 2) under random enables |
| `tb_active_part` | serial coefficient loading and chain order, row sums of a full and a mixed-plan row, reloading |
| `tb_abs_approx`, `tb_cordic_vec`, `tb_cordic_rot`, `tb_cmf_vector` | against `$sqrt`, `$atan2`, `$cos`, `$sin`, with latencies |
| `tb_cmf_filter` | 7 x 7 kernel on 24-pixel rows: exact correlation for every full window, random stalls, kernel reload, a mixed-plan filter using every tap kind, and line directions recovered within 8° |
| `tb_cmf_full` | one 640 x 480 frame at the default size: exact correlation for all 298 226 full windows, 45-cycle latency, one pixel per clock with line blanking, line directions |
| `tb_cmf_delta` | the round-off sweep above: coefficients within ±DELTA, exact correlation of each reduced build, multiplier count, kernel error, PSNR |

To run one with Verilator 5:

```
verilator --binary --timing -y rtl -y tb rtl/cmf_pkg.sv rtl/cmf_mask_pkg.sv \
          tb/tb_cmf_full.sv --top-module tb_cmf_full
./obj_dir/Vtb_cmf_full
```

The full frame takes a few seconds of simulation. No FPGA timing was
checked: the 25 MHz target is plausible for this pipelining but
unverified.

## What follows the original design, and what is this design's own

Taken from the published description:

* the kernel formula, the 15 x 15 size and 640-pixel rows;
* the active/passive window and its memory size;
* real and imaginary coefficient register rows with their own
  multipliers;
* tree adders;
* a fast absolute-value circuit;
* two CORDICs with angle halving in polar form;
* the four multiplier savings (zero, power of two, equal, opposite),
  fixed at build time;
* coefficients loadable from a host;
* 8-bit signed kernels with maximal dynamic range;
* a pixel-enable synchronised stream without external memory.

Chosen here, because the description leaves it open:

* the word widths, pipelining and latencies;
* the absolute-value formula;
* the CORDIC iteration count, angle format and gain correction;
* the serial chain order and loading protocol;
* the reset behaviour;
* the window orientation;
* no border handling;
* feeding the approximate intensity, rather than the CORDIC magnitude,
  into the second CORDIC;
* the rounding rule of `cmf_mask_pkg`;
* shift coefficients up to ±128.

Not included: the rest of the palm biometric system this filter was
built for. That is the image sensor interface, host USB link, command
manager, SRAM and its arbiter, VGA display, extraction of the strongest
vectors, and smart-card link. Only their purpose is known, not their
interfaces. The filter's pixel input, coefficient chains and outputs are
the points where they would connect.

## Files

* `rtl/cmf_pkg.sv`: types, default sizes, tap plan and CORDIC constants.
* `rtl/cmf_mask_pkg.sv`: build-time kernel, rounding and plan functions.
* `rtl/cmf_filter.sv`: top level.
* `rtl/active_part.sv`, `rtl/passive_part.sv`, `rtl/tap_mult.sv`,
  `rtl/tree_adder.sv`: the window and the convolution.
* `rtl/cmf_vector.sv`, `rtl/abs_approx.sv`, `rtl/cordic_vec.sv`,
  `rtl/cordic_rot.sv`, `rtl/pipe_delay.sv`: the post-processing.
* `tb/`: the testbenches listed above.
