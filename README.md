# Approximate 8x8 multiplier for image processing

Image filters, edge detectors and the DCT spend most of their energy in
multipliers, yet the human eye does not notice small errors in the low bits
of a pixel. This design trades exactness for logic: an 8x8 unsigned
multiplier whose partial-product tree uses cheap *approximate* 4:2
compressors in the eight low-order product columns and exact ones in the
eight high-order columns. The approximate cells only ever under-count, so a
fixed correction constant (0x0042) added to every product pulls the average
error back towards zero.

Around the multiplier sit the image datapaths it was evaluated in: a 3x3
sharpening filter, a 5x5 Gaussian smoothing filter, a Sobel edge detector
and an 8x8 two-dimensional DCT.
All of it is synthesizable SystemVerilog with self-checking testbenches.

The architecture follows the paper *Design of Energy-Efficient Approximate
Multiplier Architecture for Real-Time Image Processing Applications*. The
paper describes the multiplier's structure and constants but leaves out the
compressor truth table, the tree layout and everything about the image
datapaths. Those parts are this design's own, as listed under
[Where this RTL departs from the paper](#where-this-rtl-departs-from-the-paper).

## The multiplier, `axm8x8`

```
 a[7:0] ─┐   ┌────────┐  64 pp  ┌─────────────┐ row0 ┌──────────┐ raw_p ┌───────────┐
         ├──>│ pp_gen │───────> │ dadda_tree  │─────>│ ks_adder │──────>│ ecl_adder │──> p[15:0]
 b[7:0] ─┘   │ AND    │         │ 4:2 compr.  │ row1 │ 16-bit   │       │ + 0x0042  │
             └────────┘         │ cols 0-7 ≈  │─────>│ Kogge-   │       │ 10-bit RCA│
                                │ cols 8-15 = │      │ Stone    │       └───────────┘
                                └─────────────┘      └──────────┘
```

It is purely combinational. `raw_p` (the product before correction) is
brought out as a port so that error statistics can be measured.

| Stage | Module | What it does |
|---|---|---|
| Partial products | `pp_gen` | `pp[i][j] = b[i] & a[j]`, weight 2^(i+j). `TRUNC_COLS` can drop the lowest columns. The default of 0 drops none. |
| Reduction | `dadda_tree` | Reduces the 15 columns (heights 1..8..1) to two rows in three levels, with Dadda height targets 6, 4, 2. It uses 18 4:2 compressors, 3 full adders and 3 half adders. |
| Compressor cell | `c42_cell` → `ax_c42` / `exact_c42` | The cell is chosen at elaboration by its column: below `APPROX_COLS` (8) it is approximate, otherwise exact. |
| Final adder | `ks_adder` | 16-bit Kogge-Stone prefix adder with 4 prefix levels. |
| Error correction | `ecl_adder` | Adds `BIAS` = 0x0042 with a 10-bit ripple-carry adder. Its carry increments bits [15:10]. |

### The approximate compressor (Ax-C42)

An exact 4:2 compressor adds five bits of one column (`i1..i4`, `cin`)
and outputs `sum` (weight 1) plus `carry` and `cout` (weight 2 each). Its
`cout` does not depend on `cin`, so a row of compressors chained
cout→cin does not ripple. The approximate cell keeps the same ports and
weights but drops the XOR chain:

```
s4    = (i1 ^ i2) | (i3 ^ i4)     each XOR built as (x|y)&~(x&y): two-level AND-OR
sum   = s4 | cin                  cin is ORed, not XORed, into the sum
carry = (i1 & i2) | (i3 & i4)
cout  = i1 & i2 & i3 & i4
```

Compared with the true count `i1+i2+i3+i4+cin`, the cell's result is never
too high. It errs in two cases:

* It is one low when exactly one of `{i1,i2}` and one of `{i3,i4}` are set.
  Both pair XORs are then 1, but the OR counts them once.
* It is one low when `s4` and `cin` are both set, because the OR absorbs
  `cin`.

The error is therefore 0, −1 or −2. It is non-zero for 16 of the 32 input
patterns. In the multiplier, a −1 in column *c* costs 2^c. Column 7 is the
highest approximate column, so the worst single-cell error is −256 before
correction.

### Why a constant correction works, and where it does not

Every error source in the tree is one-sided, so the product before
correction always satisfies `raw_p ≤ a*b`. Adding a constant recentres
the error distribution. Measured over all 65536 operand pairs:

| | mean error | MED | NMED | error rate | range |
|---|---|---|---|---|---|
| `raw_p` (no correction) | −117.9 | 117.9 | 0.00180 | 71.1 % | −624 … 0 |
| `p` (with +0x42) | −51.9 | 97.7 | 0.00149 | 100 % | −558 … +66 |

MED is the mean absolute error and NMED is MED / (2^16 − 1). The mean
relative error (MRED) of `p`, over the 65025 pairs with a non-zero product,
is 0.039; small products dominate it, since the bias alone is large next
to them. The bias of 66 is smaller than the mean deficit of this tree
(118), so the result still reads low on average. The bias is also added when the true product is 0,
which is why every pair is in error after correction.

In convolution, a bias per product adds up to (number of added taps −
number of subtracted taps) × 66. For the Sobel kernels it cancels exactly.
For a Laplacian sharpening kernel it does not (see below). Products by a
power of two are computed exactly by the tree: with a single set multiplier
bit, no compressor sees more than one set input. The datapaths rely on
this for the Sobel coefficients 1 and 2.

The tree also has a few structural details:

* Each compressor's `cin` is the `cout` of the compressor to its right on
  the same level where there is one, otherwise a column bit or 0.
* Full and half adders are always exact.
* Bits that no column fills (row1[0] and bit 15 of both rows) are constant
  0. The adder's carry out is always 0 because 255 × 255 + 66 < 2^16.

## The image datapaths

All of them share a valid/ready input handshake. Each result appears with a
one-cycle `out_valid` pulse, and there is no output back-pressure. Reset is
synchronous and active-low (`rst_n`). Every datapath has its own `axm8x8`
instance, used once per clock.

### `conv_mac`: sharpening and smoothing filters

This is a KxK convolution that uses one multiplier K·K times. K is 3 by
default; the top also holds a 5x5 instance for Gaussian smoothing. Kernel
taps are sign-magnitude (`coef_t`: `neg`, 8-bit `mag`), because the
multiplier is unsigned. The 20-bit signed accumulator adds or subtracts
each product. Taps with a zero coefficient are skipped, so the bias is not
added for terms that are zero anyway. The sum is shifted right
arithmetically by `shift`, so kernels are fixed-point with 2^shift as one.
The shifted sum appears as `result` and, clamped to 0..255, as `pixel`.

Timing works as follows:

* The window is taken on the edge where `in_valid && in_ready`.
* `out_valid` is set by the K·K-th clock edge after that.
* A new window is accepted on the cycle of the last tap, so back-to-back
  windows produce one result every 9 clocks (3x3) or 25 clocks (5x5).

At 200 MHz the 3x3 filter processes 22 Mpixel/s, or 11.8 ms for a
512×512 frame. The 5x5 filter needs 32.8 ms for the same frame.

### `sobel_unit`: edge detector

Two 3x3 `conv_mac`s run on the same window with the fixed kernels
Gx = [−1 0 1; −2 0 2; −1 0 1] and Gy = [−1 −2 −1; 0 0 0; 1 2 1]. The unit
outputs `gx`, `gy` and the edge strength |gx| + |gy|, clamped to 255. Its
timing is that of the MAC. Because the coefficients are 1 and 2 and each
kernel has three added and three subtracted taps, the Sobel results are
exact.

### `dct8x8`: 2-D DCT for JPEG-style compression

The DCT is an orthonormal 8x8 DCT-II, computed as rows then columns. Each
8-point pass works in two steps:

1. A butterfly stage forms `s_i = v_i + v_(7−i)` and `d_i = v_i − v_(7−i)`.
2. Each even output is the sum over i = 0..3 of C[k][i]·s_i, and each odd
   output the same sum with d_i.

Here C[k][n] = a_k·cos((2n+1)kπ/16), with a_0 = √(1/8) and a_k = ½,
stored as sign and magnitude × 512. This gives 32 products per pass and
512 per block, all on one multiplier.

The multiplier takes 8-bit magnitudes, so the data are scaled as follows:

* **Row pass.** Pixels are level-shifted by −128. Butterfly magnitudes are
  at most 256 and are clamped to 255. Results are `(acc + 64) >>> 7`,
  i.e. DCT values with two fraction bits, kept in a 64-entry transpose
  buffer.
* **Column pass.** Butterfly magnitudes are below 2900 and enter the
  multiplier as `(|x| + 8) >> 4`. Outputs are `(acc + 64) >>> 7`, integer
  coefficients in −1024..1023.

A product whose data operand is 0 is skipped.

The interface works as follows:

* 64 pixels go in, row by row, while `in_ready` is high.
* After 256 + 256 compute clocks, 64 coefficients `Z[u][v]` come out on
  consecutive clocks in order u·8+v, where u is the vertical frequency.
  `out_last` marks the 64th.
* The first coefficient follows the last pixel by 513 clock edges.
* A block takes 640 clocks in all, which is 3.2 µs at 200 MHz or 13.1 ms
  per 512×512 frame.

With an exact multiplier the only loss is the number format: the
coefficients are within 6 of a double-precision DCT. With the approximate
multiplier they are within 14 of it, and within 9 (rms 1.5) of the
exact-multiplier result.

### `axm_vision_top`

The top places the bare multiplier (`mul_*`), the 3x3 sharpening MAC
(`shp_*`), the 5x5 smoothing MAC (`gss_*`), the Sobel unit (`sob_*`) and
the DCT (`dct_*`) side by side.
They share `clk` and `rst_n`. Line buffers that turn a pixel stream into
3x3 or 5x5 windows are not part of the design: windows are ports.

## Parameters and shared types

`axm_pkg` holds the following:

| Name | Value | Meaning |
|---|---|---|
| `N_BITS`, `P_BITS` | 8, 16 | operand and product width |
| `AXM_APPROX_COLS` | 8 | first column with exact compressors |
| `AXM_TRUNC_COLS` | 0 | lowest columns whose partial products are dropped |
| `ECL_BITS` | 10 | width of the bias adder |
| `ECL_BIAS` | 16'h0042 | correction constant |
| `TAPS`, `coef_t`, `window_t`, `kernel_t` | 9 | 3x3 window and sign-magnitude kernel types (the 5x5 ports are plain arrays of the same element types) |

`axm8x8` overrides `APPROX_COLS`, `TRUNC_COLS` and `BIAS` per instance.
`APPROX_COLS = 0` with `BIAS = 0` gives an exact multiplier, which is
useful as a reference. `dct8x8` passes `APPROX_COLS` and `BIAS` through.

## Where this RTL departs from the paper

**Compressor truth table.** The paper gives the goals for the approximate
compressor but not its equations:

* two-level AND-OR-INVERT logic;
* no XOR with `cin` in the sum;
* an error of at most two;
* a negative bias that the correction offsets;
* six approximated minterms and a 37.5 % cell error rate.

The equations above meet the first four but err on 16 of 32 patterns.
Because of this, the paper's accuracy figures are not reproduced. The
paper reports MED 5.14, NMED 0.0012 and error rate 6.83 %, but these do
not agree with each other: an NMED of 0.0012 means a MED of about 79.

**Order of correction and final adder.** The paper's block diagram draws
the correction block between the tree and the final adder. Its text says
the bias is added to the multiplier output by a 10-bit ripple-carry adder.
This RTL follows the text. What happens to that adder's carry out is not
stated; here it increments the upper six bits, since dropping it would
corrupt large products.

**Partial-product truncation.** The paper names a "hybrid" truncation
scheme but gives no depth. `TRUNC_COLS` implements truncation of the
lowest columns. Its default of 0 is chosen because any truncation only
widens the remaining negative error once the fixed bias is applied:
mean −53.1 at 2 columns, −63.0 at 4.

**Tree layout.** The Dadda tree's cell placement is not given. This one is
generated by a greedy column-by-column schedule.

**Image datapaths.** Their structure, number formats, handshakes and
rates are all this design's choices. The paper gives only their function:

* a 3x3 sharpening MAC and a 5x5 Gaussian filter;
* Sobel via two 3x3 convolutions;
* an 8-point row-column DCT with multiplications after a butterfly stage.

The MAC uses one multiplier rather than nine. The paper's power figure
for the MAC (about three times one multiplier) points that way.

**Not built:**

* thresholding of the Sobel output to a binary edge map (no threshold is
  given);
* JPEG quantisation and entropy coding after the DCT.

**Image quality.** The paper reports 46.8 dB PSNR for sharpening. With
the bias as specified, that figure is not reachable here. In a
Laplacian-enhanced kernel [0 −1 0; −1 5 −1; 0 −1 0] scaled by 32, one
product is added and four are subtracted, so the bias contributes
(1 − 4)·66/32 ≈ −6 grey levels to every pixel. The end-to-end test
measures 31.6 dB against the exact filter on a synthetic image. For the
5x5 Gaussian kernel ([1 4 6 4 1]ᵀ[1 4 6 4 1]/256), all 25 taps are added,
and it measures 34.7 dB. Sobel is exact. The DCT stays within 14 of the exact transform.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. A watchdog fails the run if it hangs. Build one with plain
Verilator 5 from the repository root, for example:

```sh
verilator --binary --timing --assert -Wno-fatal \
    rtl/axm_pkg.sv tb/tb_axm_vision_top.sv -y rtl \
    --top-module tb_axm_vision_top -o sim --Mdir obj_top
./obj_top/sim
```

Lint a module with
`verilator --lint-only -Wall rtl/axm_pkg.sv rtl/<module>.sv -y rtl --top-module <module>`.
Every simulation runs in well under a second.

| Testbench | What it shows |
|---|---|
| `tb_axm_vision_top` | The whole design at default parameters:<br>• all 65536 products, with the sum of absolute errors matched to a bit-accurate model<br>• a 24×24 image sharpened (3x3) and smoothed (5x5), each pixel inside its error bound, PSNR printed<br>• Sobel, which must be exact<br>• four DCT blocks within 20 of a double-precision DCT, at 640 clocks per block<br>It checks that each mechanism (approximate products, bias carry, zero-tap skip, back-to-back windows, clamps) occurred. |
| `tb_axm8x8_full` | All 65536 pairs at the default configuration:<br>• 16 products and the full error statistics (sum, absolute sum, count, extremes, checksum) matched to the bit-accurate model<br>• MED, NMED, MRED and error rate printed |
| `tb_axm8x8` | Three configurations side by side:<br>• the exact configuration equals `a*b` everywhere<br>• the default configuration has one-sided error<br>• truncation changes results as expected |
| `tb_dadda_tree` | With all cells exact, the tree preserves the weighted sum of arbitrary matrices. The approximate tree under-counts only, and is exact when the low columns are empty. |
| `tb_ax_c42`, `tb_exact_c42` | All 32 patterns against the intended error; `cout` is independent of `cin`. |
| `tb_pp_gen`, `tb_ks_adder`, `tb_ecl_adder` | The AND array with and without truncation; the adder at 16 and 8 bits; the bias over every 16-bit input. |
| `tb_conv_mac` | At 3x3: exact results for power-of-two kernels, the error bound for arbitrary kernels, the 9-clock latency and rate, sign, shift and clamps. At 5x5: exact results, latency and a 25-clock rate for back-to-back windows. |
| `tb_sobel_unit` | Exact gradients and magnitude on flat, edge and random windows; latency; clamp. |
| `tb_dct8x8` | The exact-multiplier instance matches a bit-accurate model of the number formats. The approximate instance stays within 20 of it. Also checks latency (513) and framing. |

## Trust and limits

**What the tests establish.** The multiplier is checked exhaustively and
agrees bit for bit with an independent software model of the same
equations. The wiring of the reduction tree is proven by the
exact-configuration tests. The datapaths are checked against independent
models, exactly where the products are exact and within bounds elsewhere.
Testbenches ran the checks; no equivalence proof was done.

**What has not been measured.** Timing, area and power are not
characterised here. The paper's delay and power figures belong to its own
45 nm implementation. The gate-count advantage of this compressor has not
been measured.

**Datapath limits.** The 20-bit accumulator of `conv_mac` suffices for
any realistic kernel. Nine full-scale products (9 × 65091) would need 21
bits. The 5x5 Gaussian kernel sums to at most 255 × 256 plus 25 biases, well
inside 20 bits. The DCT assumes 8-bit unsigned pixels.
