# Colour object location pipeline with a lookup-table divider

This is streaming RTL for finding a coloured object in camera images on a small
FPGA that works as a co-processor beside an embedded CPU. RGB pixels go in one
per clock. Each pixel is converted to a colour space in which colour and
brightness are separate (HSL or YCbCr). It is then tested against a colour
window, which gives a one-bit object mask. The mask is reduced to a row
histogram and a column histogram. The CPU reads the two histograms, about a
thousand 10-bit numbers per frame. From them it computes where the object is,
how wide it is and how it is turned. It never has to touch the full image.

The hardest part is the HSL conversion. Hue and saturation each need a
division, and the FPGA has no divider. The design divides with a
**lookup-table divider**: it multiplies by a stored, rounded reciprocal and
then rounds the product. This divider is fully pipelined, has a latency of
two cycles and uses one hardware multiplier. It is also more accurate than
the usual non-restoring divider, because that divider truncates.

```
            +--> rgb2hsl  (5 cycles) --+
 in_rgb ----+                          +--space_sel--> colour_threshold --> object_locator --> hist_rd_*
 (EyeLink)  +--> rgb2ycbcr (3 cycles) -+               (1 cycle, mask)      (block RAM histograms)
```

Every arrow is an **EyeLink** link. The sender raises `rts` (ready-to-send)
while its word is valid. The receiver raises `ack` (acknowledge) while it can
take a word. The word moves on a clock edge at which both are high. Each
pipelined block advances as a whole when its output register is empty or is
being taken. A stall anywhere therefore holds every stage upstream of it.
Four things cause stalls:

- the object locator's extra cycle at the end of each row;
- a histogram read by the host;
- a threshold window being loaded;
- the consumer of a converter not being ready.

## The lookup-table divider (`lut_divider`)

It divides a 16-bit numerator `n` by an 8-bit denominator `d`:

```
INV[d] = round(2^17 / d)                      d = 1..255, computed at elaboration
q      = round(n * INV[d] / 2^17) = (n * INV[d] + 2^16) >> 17
```

- **Stage 1** reads `INV[d]` from a 256-entry ROM (one block RAM) and
  registers `n`.
- **Stage 2** multiplies, adds half an LSB and keeps the integer part.

Each entry has 17 fraction bits. That is the widest unsigned operand of an
18x18 signed FPGA multiplier. Entries are stored 18 bits wide only because
`INV[1] = 2^17`.

Why two roundings matter: a truncating divider (`floor(n/d)`) throws away the
whole fraction. Its mean absolute error over all operand pairs is about 0.49.
Rounding the result keeps the half-LSB bit and halves that error. Over
n in 0..65535 and d in 1..255, the reference figures for this divider are:

| divider | mean abs. error | std. dev. |
|---|---|---|
| lookup table, 17-bit inverse, rounded result | 0.2559 | 0.1575 |
| truncating (non-restoring) | 0.4878 | 0.2903 |

`tb_divider_error` runs all 16.7 million operand pairs through the RTL and
checks both rows of this table.

One variant was considered and not used: storing each reciprocal at its own
best bit width, which needs a second table of widths. Once the result is
rounded, the variable widths give no extra accuracy, so the fixed width is
kept.

- `d = 0` is undefined. The divider returns all ones and raises `out_dz`.
- A `TAG_W`-bit sideband travels with the operands. The HSL converter uses it
  to carry pixel state through the divider.
- `en` stalls both stages.

## RGB to HSL (`rgb2hsl`)

The colour code is 8 bits. Hue is rotated by 60 degrees, and 60 degrees is
42 codes:

| brightest channel | hue |
|---|---|
| R | 42 ± 42·(G−B)/Δ, range 0..84 |
| G | 126 ± 42·(B−R)/Δ, range 84..168 |
| B | 210 ± 42·(R−G)/Δ, range 168..252 |

`H = 255` marks a grey pixel, where the hue is undefined. The other two
channels are:

```
L = MAX/2 + MIN/2                              (each term truncated)
S = 127·Δ/L           if L ≤ 127
S = 127·Δ/(255 − L)   if L > 127               S = 0 for grey
```

Here Δ = MAX − MIN.

| stage | name | does |
|---|---|---|
| 1 | Pre-Calc | MAX, MIN, Δ, L, code of the brightest channel |
| 2 | Selectors | saturation: `Δ<<8` over `L` or `255−L`; hue: `|diff|<<8` over `Δ` plus a *subtract* flag, so every value stays unsigned |
| 3–4 | two `lut_divider`s | Q8.8 quotients; the hue divider's tag carries L, channel code, subtract flag, grey flag |
| 5 | Hue Offset / Saturation Shifter | `hue = offset ± round(42·q_h/256)`, `sat = round(q_s/2)` |

Stage 5 rounds by adding the bit just below the one kept. The module costs
three multipliers (two dividers and the ×42) and two ROMs.

Corner cases this design settles:

- The saturation quotient of a fully saturated dark primary reaches 2.0. For
  example, 255,0,0 gives 514/256. Halving it as a bare 8-bit field would wrap
  to 1, so it is clamped to 255, the value the equation gives.
- A pixel such as 1,0,0 has L = 0 and Δ = 1. Its saturation division is by
  zero, so S = 255.
- Halving the Q8.8 quotient scales it by 128, where the equation has 127.
  S can therefore be up to about 1 % larger than the equation gives.

## RGB to YCbCr (`rgb2ycbcr`)

This is the JPEG matrix in fixed point with 17 fraction bits:

| | R | G | B | offset |
|---|---|---|---|---|
| Y  | 39191 | 76939 | 14942 | 0 |
| Cb | −22117 | −43419 | 65536 | 128·2^17 |
| Cr | 65536 | −54878 | −10658 | 128·2^17 |

Each row of Cb and Cr sums to zero, so a grey pixel gives exactly
Cb = Cr = 128.

- Stage 1 registers the pixel.
- Stage 2 registers the three sums.
- Stage 3 rounds (bits 24:17 plus bit 16), clamps to 0..255 and registers
  the result. Pure blue and pure red would otherwise round to 256.

## Colour thresholder (`colour_threshold`)

It has one `[min, max]` window per channel, bounds included. A pixel gives
mask bit 1 when all three channels are inside their windows. Channel 1 is
the top byte of the pixel: H, Y or R.

- In a cycle with `set_chan = k` (k = 1, 2, 3), window k is loaded from
  `min_val`/`max_val`. No pixel is taken in that cycle.
- `clear` sets every window back to `[0, 255]`, so every pixel matches.
- Examples: hue 54 ± 5 for an orange box; Cb 77..127 with Cr 133..173 for
  red and skin tones.

## Object locator (`object_locator`)

The locator builds both histograms in one dual-port RAM of 1024 × 10 bits:

```
address c          column c's count     0 <= c < NCOLS
address NCOLS + r  row r's count
```

It takes one mask bit per cycle:

- While it counts pixel `c`, it sends address `c+1` to the RAM's registered
  read port. The old count is ready when the next pixel arrives. It then
  writes the incremented count back.
- In row 0 the old count is ignored. A new frame therefore overwrites the
  previous one with no clearing pass.
- After the last pixel of a row it spends one cycle writing the row count,
  with `in_ack` low.

A W × H frame takes W·H + H cycles. At 50 MHz that is 190 frames/s for
512 × 512.

Host readout: `hist_rd_en`/`hist_rd_addr` return `hist_rd_data` one cycle
later, with `hist_rd_valid`. A read takes over the RAM read port, so the next
input cycle is stalled while the prefetch is repeated. Reads may be made at
any time. Reading while a frame streams costs one cycle per read.

| setting | behaviour |
|---|---|
| row length | loaded from `num_cols` on `clear`; reset sets 352 (CIF width) |
| `rows_done` | counts finished rows |
| row counts beyond address 1023 | dropped; sets the sticky `hist_ovf` |
| 512 × 512 | fits exactly |
| 640 × 480 | loses rows 384..479 |

The centroid, spread and orientation come from the histograms on the CPU.
The peaks of the two histograms are a cheaper estimate of the position.

```
x̄ = Σ x·col(x) / Σ col(x)        ȳ = Σ y·row(y) / Σ row(y)
σx² = Σ (x−x̄)²·col(x) / Σ col(x)  (same for y)
tan 2θ = b / (a − c)   with  a = Σ x̃²·col(x̃),  c = Σ ỹ²·row(ỹ),  b = 2 Σ x̃ ỹ p(x̃,ỹ)
```

Note that `b` needs the mask itself, not only the histograms.

## The top level (`colour_object_locator`)

The top holds both converters. Both convert every pixel: the input is
acknowledged only when both can take it. `space_sel` chooses which one feeds
the thresholder. The output of the other is discarded. Change `space_sel`
only between frames.

The top's ports are:

- the pixel stream;
- the threshold programming port;
- `loc_clear`/`loc_num_cols` to start a frame;
- the histogram read port;
- `rows_done` and `hist_ovf`.

A bus bridge to the CPU, or a camera interface, would connect to these ports.
Neither is included.

| latency, first pixel to its mask bit at the locator | cycles |
|---|---|
| HSL path | 6 |
| YCbCr path | 4 |

Throughput is one pixel per cycle, less one cycle per row.

To look for several colours at once, hang further `colour_threshold` and
`object_locator` pairs off the same converter output. The top has one pair.

## Files

| file | contents |
|---|---|
| `rtl/ev_pkg.sv` | pixel structs, channel enum, colour-space enum, inverse-table function, YCbCr constants |
| `rtl/eyelink_if.sv` | EyeLink link (signals, modports, hold-until-acknowledged assertions) |
| `rtl/lut_divider.sv` | lookup-table divider |
| `rtl/rgb2hsl.sv`, `rtl/rgb2ycbcr.sv` | colour converters |
| `rtl/colour_threshold.sv` | thresholder |
| `rtl/object_locator.sv`, `rtl/dp_bram.sv` | histogram builder and its RAM |
| `rtl/colour_object_locator.sv` | top level |
| `tb/tb_*.sv` | self-checking testbenches; `tb_ref_pkg.sv` holds the fixed-point reference models |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/ev_pkg.sv tb/tb_ref_pkg.sv tb/tb_colour_object_locator.sv \
    --top-module tb_colour_object_locator -Mdir obj
./obj/Vtb_colour_object_locator
```

| testbench | checks |
|---|---|
| `tb_lut_divider` | every denominator and 62 000 random divisions against a real-arithmetic reference, with enable gaps; latency; mean error |
| `tb_divider_error` | all 2^24 − 2^16 operand pairs; mean and standard deviation of the error against the table above |
| `tb_rgb2hsl` | bit-exact against the fixed-point algorithm; close to the real-valued equations (hue within 2 codes, saturation within 1 code + 1 %); latency 5; back-pressure |
| `tb_rgb2ycbcr` | bit-exact against the fixed-point model, within 1 code of the real equations, grey gives 128/128; latency 3 |
| `tb_colour_threshold` | windows, inclusive bounds, configuration stalls, clear |
| `tb_object_locator` | histograms for several frame sizes, W·H + H timing, mid-frame host reads, overflow |
| `tb_eyelink_if` | handshake under random stalls |
| `tb_colour_object_locator` | whole chain at default parameters (see below) |
| `tb_frame_sizes` | 512 × 512 and 640 × 480 frames at 50 MHz timing |

The whole-chain test runs three frames:

1. A full 352 × 288 HSL frame with an orange rectangle. Its centroid must
   come out at the rectangle's centre.
2. A 128 × 96 YCbCr frame with a skin-coloured disc, read back mid-frame.
3. A 1000 × 30 frame that overflows the histogram RAM.

It counts every stall and mode mechanism and requires each to occur at least
once.

## What differs from the published design, and what is not here

These choices are this design's own:

- the clamps (HSL saturation, YCbCr at 256);
- the divide-by-zero result;
- the 18-bit storage of the inverse table;
- the hold-until-acknowledged rule on EyeLink links;
- the host read port and its one-cycle stall;
- `num_cols` loading;
- the overflow flag;
- the 1024-entry histogram RAM;
- running both converters under a selector.

The fixed-point coefficients follow the JPEG equations. The red term of Cr is
0.5 exactly (65536). The green term of Cr is 54878, so that the row sums to
zero.

Not included:

- the CPU;
- its memory-mapped or DMA bus bridge, whose timing and address map are not
  specified here;
- the camera interface;
- the board's other peripherals.
