# Rounding-based approximate multiplier and 5x5 image filter

Multiplying two numbers is easy when one of them is a power of two: it is
just a shift. This design uses that fact to build a multiplier with no
partial-product array. Each operand is rounded to its nearest power of two
(`Ar`, `Br`). The exact product can then be split as

    A*B = (Ar-A)*(Br-B) + Ar*B + Br*A - Ar*Br

The first term is the product of two small rounding errors, so it is dropped:

    A*B ~= Ar*B + Br*A - Ar*Br

That leaves three shifts, one addition and one subtraction. The result is
exact whenever either operand is a power of two. For random signed 32-bit
operands the mean relative error is about 2.6 %. The multiplier has one
register stage, placed directly behind the three shifters (the "retimed"
position).

The multiplier is then used in an error-tolerant application: a streaming
5x5 FIR filter that sharpens or smooths 8-bit grey images, with all 25
products of each window taken from approximate multipliers.

## Multiplier datapath (`approx_mult`)

    a,b --> sign_detector --|A|,|B|--> round_pow2 x2 --Ar,Br-->
            barrel_shifter x3:  Br*|A|   Ar*Br   Ar*|B|   (2N bits each)
        ==== retime_reg (one flip-flop stage, plus sign and valid) ====
            kogge_stone_adder:  Br*|A| + Ar*|B|
            subtractor:         ... - Ar*Br           = |product|
            sign_set:           negate if sign(a) xor sign(b)   --> p

* **Signs first.** A negative number has no power-of-two rounding in two's
  complement. So `sign_detector` takes magnitudes, the rest of the datapath
  works on unsigned values, and `sign_set` applies the sign at the end. The
  magnitude of -2^(N-1) is 2^(N-1), which still fits in N unsigned bits.
* **Rounding rule (`round_pow2`).** Bit i of the one-hot result is set in
  two cases:
  - x[i] is the leading one and x[i-1] = 0, so x rounds down to 2^i;
  - the leading one is x[i-1] and x[i-2] = 1, so x rounds up to 2^i.

  A value exactly half-way between two powers of two, 3*2^k, therefore
  rounds up (6 goes to 8, 12 to 16). The exception is 3, which rounds to 2.
  Rounding ties up keeps the logic small, and either choice gives the same
  error. Zero rounds to zero, which makes the product zero.
  Magnitudes of 3*2^(N-2) or more would need bit N, so they round to 0.
  Signed operands never get there.
* **Shifters.** Each `barrel_shifter` encodes the one-hot power into a
  `$clog2(N)`-bit shift amount. A logarithmic mux shifter then turns the
  N-bit operand into a 2N-bit product.
* **Adder and subtractor.** Both are Kogge-Stone parallel-prefix adders. The
  subtractor is the same adder with the subtrahend inverted and carry-in 1.

Timing: `a`, `b` and `in_valid` are sampled on a rising edge. The product
appears on `p` with `out_valid` in the following cycle: it is combinational
from the registered shifter outputs. One pair can be accepted per clock.
`rst_n` is asynchronous and active low. Operand width `N` defaults to 32.

## Image filter (`image_filter`, `conv5x5`, `line_buffer`)

For a window centred on pixel X(i,j), the two filters are:

    SMOOTH : Y = round( sum X*Ms / 60 )
    SHARPEN: Y = 2*X(i,j) - round( sum X*Mg / 273 )

Ms is the smoothing mask. Its centre is 12, the ring around the centre is 4
and the outer ring is 1, so its weights sum to 60:

    1 1  1 1 1
    1 4  4 4 1
    1 4 12 4 1
    1 4  4 4 1
    1 1  1 1 1

Mg is the 5x5 Gaussian, with weights summing to 273. Sharpening subtracts the
Gaussian blur from twice the centre pixel (unsharp masking):

     1  4  7  4  1
     4 16 26 16  4
     7 26 41 26  7
     4 16 26 16  4
     1  4  7  4  1

The masks live in `approx_pkg::mask_coef`. Results are clamped to 0..255.

* `line_buffer` holds the last four image rows in four row memories. For the
  pixel being written at column `col`, it returns that pixel and the pixels
  of the same column in the four rows above.
* `image_filter` counts rows and columns. It shifts one such 5-pixel column
  per input pixel into a 5x5 window register. A window is passed on only
  when it lies fully inside the image, so a W x H frame gives
  (W-4) x (H-4) output pixels in raster order. Output (r, c) is the filtered
  input pixel (r+2, c+2). Border pixels are not produced.
* `conv5x5` multiplies the 25 pixels by their coefficients in 25
  `approx_mult` instances (`MUL_N` = 16 bits, ample for 8-bit pixels and
  coefficients up to 41). It sums the products, divides by 273 or 60 with
  rounding to nearest, and applies the sharpening step and the clamp.

Interface and timing of `image_filter`:

| port | dir | meaning |
|---|---|---|
| `in_valid`, `pix_in[7:0]` | in | one pixel per clock, raster order; idle cycles allowed |
| `sof` | in | marks row 0, column 0; restarts the raster counter at any time |
| `mode` | in | `SHARPEN` (0) / `SMOOTH` (1); sampled with the `sof` pixel, held for the frame |
| `out_valid`, `pix_out[7:0]` | out | filtered pixel, 4 clocks after the input pixel that completed its window |

The 4 clocks are: the window register, the multiplier's register, the
adder-tree register and the output register. There is no back-pressure.
Defaults: `IMG_W = IMG_H = 512`, `PIX_W = 8`, `MUL_N = 16`.

## What follows the method and what is this design's own

These parts follow the method: the product formula, the rounding rule
(including 3 -> 2 and ties rounding up), the N-bit-in / 2N-bit-out shifters,
the Kogge-Stone adder, the block order, the single register stage behind the
shifters, the 32-bit operand width, and the two masks with their
normalisations.

These are choices made here:

* the valid bits and resets;
* registering the sign bit together with the products;
* the inner structure of the shifters, the subtractor and the sign logic;
* the pixel and multiplier widths;
* rounding to nearest in the divisions, and clamping;
* streaming with per-frame mode, and dropping the border pixels;
* the 512 x 512 default size (the usual size of standard test pictures).

Points to be aware of:

* The shift amount is log2 of the rounded operand, which is what the
  formula needs. An alternative reading, log2 minus 1, would halve every
  term, and is not used.
* The subtractor removes `Ar*Br`, as the formula says.
* Operands are treated as signed. An unsigned operand below 2^(N-1) gives
  the same result; a larger one is read as negative.
* The filter works on a single image plane. Colour images would need one
  filter per channel.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the
module's outputs with arithmetic reference models in
`tb/approx_ref_pkg.sv`. These models round by comparing distances rather
than with the bit equations, and compute the filter in plain integer
arithmetic. Highlights:

* `tb_round_pow2`: all 12-bit values, plus ties and random values at 32 bits.
* `tb_approx_mult`: random pairs with gaps, directed cases and the exact
  power-of-two property. It checks a latency of exactly one clock, and
  prints the mean relative error.
* `tb_conv5x5`: random, flat, impulse and edge windows in both modes, with
  latency 3 checked.
* `tb_image_filter`: five 16x12 frames. They cover both modes, mode switches
  between frames, random idle cycles, clamping at 0 and 255, and a frame cut
  short by a new `sof`. Each of these must occur at least once, and every
  output pixel, its latency and the output count are checked.
* `tb_image_filter_full`: the default 512x512 configuration. It sharpens and
  then smooths a synthetic test picture (ramp, disc, rectangle, noise),
  checks all 2 x 258064 outputs, and prints the PSNR against the same filter
  with exact products. It measures 40.8 dB for both filters, and fails below
  30 dB. It runs in a few seconds.

Run a testbench with plain Verilator, for example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_image_filter \
        -y rtl -y tb +libext+.sv rtl/approx_pkg.sv tb/approx_ref_pkg.sv \
        tb/tb_image_filter.sv
    ./obj_dir/Vtb_image_filter

Each testbench ends with the line `TB_RESULT checks=N failures=M`.

## Changing it

* Operand width: `approx_mult #(.N(...))`. All submodules follow N. The
  shifter stages and the adder's prefix levels scale as `$clog2`.
* Image size: `image_filter #(.IMG_W(...), .IMG_H(...))`. Line-buffer
  storage is 4 x IMG_W x PIX_W bits.
* Masks: edit `mask_coef` and the divisors `SHARP_DIV` / `SMOOTH_DIV` in
  `approx_pkg`, and the mirrored tables in `tb/approx_ref_pkg.sv`.
