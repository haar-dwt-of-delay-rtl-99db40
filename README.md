# Haar wavelet transform on Ladner-Fischer adders

The Haar wavelet is the cheapest wavelet there is. With its filters
written as h = (1, 1) and g = (1, -1), one transform step is only pair
sums and pair differences, and the inverse step is the same again. So the
transform needs no multiplier, only adders, subtractors and shifts. This design
does all of that arithmetic with one adder, a **Ladner-Fischer parallel-prefix
adder**. That adder gets its carries in logarithmic depth from a tree of
black and gray cells, which keeps the add/subtract units off the critical
path.

The RTL holds three datapaths built from the same adder:

* **1-D vector chain** (`dwt_top`, `haar_threshold`, `haar_idwt8`). An
  8-pixel vector goes through the forward Haar step and a magnitude stage on
  every output. The details are then hard-thresholded, and the inverse step
  rebuilds the vector. With threshold 0 the reconstruction is exact.
* **2-D frame path** (`haar_dwt2d`, `band_threshold`, `haar_idwt2d`). A
  256×256 raster pixel stream gives the four one-level sub-bands LL, LH, HL
  and HH: one set per 2×2 block, at one pixel per clock. The detail bands
  are then hard-thresholded and each 2×2 block is rebuilt.
* **Four-level 1-D transform** (`haar_dwt_ml`). A sample stream passes
  through four chained processing modules, one per decomposition level,
  with a control block that tells each level when to act.

`haar_dwt_top` instantiates all three, with a shared reset synchroniser.

## The Ladner-Fischer adder (`lf_adder`)

The carry-in is treated as an extra prefix position "-1", with generate =
cin and propagate = 0. Operand bit *k* sits at position *k*+1, so a
WIDTH-bit adder has WIDTH+1 prefix positions. In the diagrams a node labelled
`i:j` holds the group generate/propagate of positions *i* down to *j*. Once a
node's span reaches -1, its group generate is the carry out of bit *i*.

1. **Pre-processing.** `p = a ^ b`, `g = a & b` per bit.
2. **Carry network**, over `L = ceil(log2(WIDTH+1))` levels plus one:
   * level 1: every odd position is combined with its even neighbour;
   * levels 2..L: a Sklansky tree over the **odd positions only**. At level
     *k* an odd position with bit *k* set is combined with the top of the
     block below, `((i >> k) << k) - 1`. Each level doubles the span.
   * final row: each even position takes the carry of its odd neighbour.
3. **Post-processing.** `sum[i] = p[i] ^ carry_into[i]`. `cout` is the group
   generate of all positions.

This is the Ladner-Fischer trade-off. Running the tree over half the
positions halves the fan-out and the wiring of a full Sklansky tree, and
costs one extra gray-cell row.

A cell is a **black cell** (`lf_black_cell`: G = g_hi | p_hi & g_lo,
P = p_hi & p_lo, two ANDs and an OR) while its lower input still stops short
of the carry-in. It is a **gray cell** (`lf_gray_cell`: generate only, one
AND-OR) once the lower input reaches position -1. The propagate of such a
group is never needed.

`lf_addsub` wraps the adder. Subtraction is `a + ~b + 1`, with the +1 taken
on the carry-in. The magnitude stage and the rounding shifter use the same
carry-in trick to add a constant.

The adder is purely combinational. Its width is a parameter: 9 by default,
and 10 to 14 where the datapaths use it.

## 1-D vector chain

| stage | module | operation | latency |
|---|---|---|---|
| forward step | `haar_fdwt8` | `c[i] = x[2i] + x[2i+1]`, `c[4+i] = x[2i] - x[2i+1]` | 1 clock |
| magnitude | `coef_abs_buffer` ×8 (in `dwt_top`) | invert, +1, select by sign bit | combinational |
| threshold | `haar_threshold` | detail `c[4..7]` set to 0 if `|c| < thr` | 1 clock |
| inverse step | `haar_idwt8` | `x[2i] = (a+d)>>1`, `x[2i+1] = (a-d)>>1`, clipped to 0..255 | 1 clock |

* **Coefficient format.** 10-bit two's complement, so a pair sum (0..510)
  and a pair difference (-255..255) fit the same signed word. The output
  vector holds the four sums first (approximation), then the four
  differences (detail).
* **Scaling.** The forward step is left unscaled. The factor 1/2 of the
  Haar pair goes on the inverse side, as a shift.
* **Outputs of `dwt_top`.** It gives both the signed coefficients
  (`dwt_out`) and their magnitudes (`dwt_mag`). The inverse transform needs
  the signs; the magnitudes are the non-negative output of the block.
* **Threshold.** In `haar_dwt_top`, `vec_thr` is sampled together with
  `vec_x`, so every vector carries its own threshold down the pipeline.
* **Throughput.** All stages take one vector per clock; `vec_valid` may have
  gaps. `dwt_valid` follows `vec_valid` by one clock and `rec_valid` by
  three.

## 2-D frame path (`haar_dwt2d`)

```
pix ─► data_format_conv ─► moving_window ─► subband_addsub ─► |·| ─► >>2 ─► downsample_dff ─► bands
       (Q8.2, register)    (line buffer)    (8 LF add/sub)   (LH,HL,HH)      (keep odd/odd)
                  └──────► dwt2d_controller (col/row, keep, frame end) ─────────┘
```

* **Format.** Pixels become unsigned Q8.2: the value times 4, 10 bits.
  These two fractional bits make the divide-by-four of the sub-bands exact.
* **Moving window.** A 256-word line buffer holds the previous row. For the
  pixel at (r, c) the window is
  `a = (r-1,c-1)  b = (r-1,c)  c = (r,c-1)  d = (r,c)`.
  The buffer word at column c is read, then overwritten with the new pixel.
  This window moves one pixel at a time, so consecutive windows overlap.
* **Sub-bands.** They come from two levels of four add/subtract units:

  | band | value | meaning |
  |---|---|---|
  | LL | a+b+c+d | block sum (mean ×4) |
  | LH | (a+b)-(c+d) | top row minus bottom row |
  | HL | (a-b)+(c-d) | left column minus right column |
  | HH | (a-b)-(c-d) | diagonal |

* **Sign and scaling.** LH, HL and HH can be negative, so they pass through
  the magnitude stage. All four are then divided by 4 in `coef_shifter`,
  which rounds to nearest; the division is exact here.
* **Output values.** The outputs are 10-bit Q8.2 numbers: `ll` is the block
  mean, and `lh`, `hl`, `hh` are a quarter of the magnitude of the
  difference.
* **Downsampling.** The controller marks a window as kept only when its
  bottom-right pixel has an odd row and an odd column. Those are the
  non-overlapping 2×2 blocks. Only kept windows load the `downsample_dff`
  register bank; the other three quarters are dropped. This gives the
  downsampling by two in each direction.
* **Timing.** A block's bands appear with `band_valid` on the second rising
  edge after its bottom-right pixel is sampled. `band_row`/`band_col` give
  the position in the 128×128 sub-band image, and `frame_done` comes with
  the last set. One frame takes 65,536 valid pixels and gives 16,384 sets.
  The stream may stall at any time.

## 2-D reconstruction (`band_threshold`, `haar_idwt2d`)

The magnitude stage drops the signs of LH, HL and HH, so `haar_dwt2d`
keeps them as `band_neg = {LH<0, HL<0, HH<0}`. That makes the sub-bands
invertible.

`band_threshold` zeroes each detail whose magnitude is below `band_thr`,
clearing its sign too. The threshold is in the same Q8.2 units and is
sampled with each set.

`haar_idwt2d` is the Haar case of the usual reconstruction filter bank:
upsample rows and columns, then filter with Lo_R = (1, 1) and
Hi_R = (1, -1). Each set rebuilds only its own 2×2 block, so the filter bank
collapses to two butterfly levels.

```
t0 = LL + LH = 2(a+b)      t1 = LL - LH = 2(c+d)
t2 = HL + HH = 2(a-b)      t3 = HL - HH = 2(c-d)
a = (t0+t2)>>2   b = (t0-t2)>>2   c = (t1+t3)>>2   d = (t1-t3)>>2
```

* **Arithmetic.** The details get their signs back by a `0 - magnitude`
  subtraction. That and the eight butterfly add/subtracts run on
  Ladner-Fischer units, 13 bits wide.
* **Exactness.** With `band_thr = 0` every block comes back exactly. The
  numbers on the band outputs equal the raw pixel-unit sums, which is why
  the final shift is by two. After thresholding, results are clipped to
  0..255.
* **Output.** `rec2_px` packs {bottom-right, bottom-left, top-right,
  top-left} for image position (2·`rec2_row`, 2·`rec2_col`).
* **Timing.** `rec2_px` appears two clocks after `band_valid`, four after
  the block's last pixel.

## Four-level transform (`haar_dwt_ml`)

Four processing modules (`haar_pm`) are chained. Each one stores the first
sample of a pair. On the second sample it forms the sum (approximation) and
the difference (detail) with `lf_addsub`. Level 1 works on the input
samples. Each further level works on the approximations of the level
before it.

The control block (`haar_ml_ctrl`) counts valid samples modulo 16. Bit m-1
of the count gives level m its phase. Level m acts only on samples whose
lower m-1 count bits are all ones. The last sample of each block of 16
therefore completes all four levels in the same clock.

* **Outputs.** Per block of 16 samples there are 8 level-1 details, 4
  level-2, 2 level-3 and 1 level-4 detail. There is also one level-4
  approximation, the sum of all 16 samples. Each level has its own strobe
  (`ml_det_valid[m-1]`). The approximation comes with `ml_app_valid`, which
  equals `ml_block_done`.
* **Timing.** All results are registered and appear one clock after the
  sample that completes them. One sample per clock, with gaps allowed.
* **Width.** 13-bit two's complement: 8 bits plus 4 levels of growth plus
  sign. There is no scaling.
* **Reset.** Reset starts a new block.

## Reset and clock outputs

`reset_controller` is a two-flop synchroniser. External `rst_n` (active low)
resets at once and is released on the second clock edge after it rises.
`rst_out` is that internal active-high reset, and `clk_out` is the clock.
Both are brought out so that logic downstream can run in step. All other
registers use this reset synchronously. The line buffer has no reset: each
word is written before it is read.

## What follows the published description and what was filled in

Taken from the description:
* the Haar filters (1, 1) and (1, -1), computed as linear equations rather
  than a matrix product;
* the 8-element vector;
* the inverse equations `s = a + d`, `s = a - d`;
* the Ladner-Fischer adder with black and gray cells;
* the 2-D chain in its order: format conversion, overlapped 2×2 moving
  window, add/subtract for the four bands, removal of negative values,
  shifting for the division, controller and flip-flops discarding the
  overlapped windows;
* 256×256 frames;
* a reset controller with `clk_out`/`rst_out`;
* the top-level schematic of the vector transform: one transform core, then
  per output an inverter, an adder and a multiplexer;
* the processing flow: transform, thresholding, inverse transform;
* the four-level transform built from M = 4 processing modules and a control
  block that synchronises them;
* the reconstruction filter bank: upsample, Lo_R/Hi_R on columns then on
  rows.

Choices of this design:
* **Word widths and formats.** Coefficients are 10 bits. The schematic
  labels a 9-bit coefficient word, but a 9-bit signed word cannot hold a
  pair sum of up to 510, and the sign stage runs on every output. Q8.2 in
  the 2-D path.
* **Magnitude.** "Removing" negative values is read as taking the
  magnitude, which matches the inverter/adder/multiplexer chain.
* **Band formulas.** The formulas and the LH/HL naming are assumed.
* **Divide-by-four** for every 2-D band.
* **Threshold.** Hard thresholding of details, with a run-time threshold,
  in both paths.
* **Sign bits.** Kept for the 2-D inverse.
* **Inverse structure.** The 2-D inverse is written as butterflies.
* **Inverse scaling.** The factor 1/2 is applied on the inverse side.
* **Prefix network.** The odd/even split with a Sklansky tree inside.
* **Handshakes.** Valid flags and all pipeline registers and latencies.
* **Reset controller.** Built as a synchroniser.
* **Four-level transform.** The diagram it refers to is not in the
  description. The stream interface, the counter-based control and the
  chaining of approximations are therefore this design's own choices.
* **Adder naming.** In one place the add/subtract units are called
  Kogge-Stone. Here they are Ladner-Fischer throughout, the adder the design
  is built around. Kogge-Stone serves only as the reference it is compared
  with.

Not included:
* The video-to-frame pre-processing. It sits on the capture side; the 2-D
  path takes its output as a raster stream with a valid flag.
* The Kogge-Stone reference adder and a multiplier-based Haar baseline,
  which exist only for comparison.
* An inverse for the four-level transform, and soft thresholding. The
  description mentions neither as part of its design.
* The published FPGA area/delay figures (476/217 at 2.590 ns for the
  reference, 476/213 at 2.556 ns for this adder). They are not reproduced
  here.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each one compares against arithmetic done independently in the testbench
and prints `TB_RESULT checks=N failures=M`:

* **Adders.** `lf_adder` and `lf_addsub` are exhaustive at 9 bits: every
  a, b and carry/subtract combination. `lf_adder` also gets random vectors
  at 16 bits.
* **Small units.** `coef_abs_buffer` and `coef_shifter` are exhaustive over
  their input range.
* **Streaming blocks.** They check latency and valid timing as well as
  values, with random gaps in the input.
* **`tb_haar_dwt2d`.** Three small 16×8 frames.
* **`tb_haar_dwt_top`.** Runs the whole design at its default sizes:
  * a full 256×256 frame, every sub-band set checked;
  * every rebuilt block of that frame checked. The first half of the frame
    has threshold 0 and must come back exactly; the second half runs with
    threshold 24.
  * in parallel, 3000 vectors with random thresholds;
  * in parallel, 1000 blocks of 16 random samples on the four-level path.
    Every detail of every level and every approximation is checked, on the
    right clock.
  * two resets.

  It counts each mechanism and fails if any never occurs: asynchronous
  reset, sign removal in both paths, details zeroed and kept (both paths),
  exact reconstruction (both paths), stalls in all three streams, discarded overlapped windows,
  frame end, and details of all four levels. It runs in well under a second.

For each module, a copy with one deliberate bug was run against its
testbench, and the testbench reported failures every time.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    --top-module tb_haar_dwt_top rtl/haar_pkg.sv tb/tb_haar_dwt_top.sv
./obj_dir/Vtb_haar_dwt_top
```

To lint a module: `verilator --lint-only -Wall -Irtl -y rtl rtl/haar_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are about unused carry outputs, which are left
open on purpose, and bits that stay zero by construction.

## Changing the design

* **Frame size.** `W`/`H` on `haar_dwt_top` or `haar_dwt2d`. Use powers of
  two; the line buffer is `W` words.
* **Fixed-point precision.** `FRAC` (package default `FRAC_BITS = 2`). The
  output width follows as `IW + FRAC`.
* **Vector length.** `N` must be even; the threshold and inverse stages
  follow it.
* **Number of levels.** `M` on `haar_dwt_top` or `haar_dwt_ml`. The block
  length is 2^M samples, and results are `IW + M + 1` bits wide.
* **Adder width.** Set per instance. The prefix network is generated for any
  width.
