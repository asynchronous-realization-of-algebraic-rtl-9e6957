# Exact-arithmetic 8x8 2D DCT using algebraic integers (Arai algorithm)

The 8-point DCT needs multiplications by irrational cosines. A fixed-point
implementation rounds them, and in a 2D transform the error of the row pass is
fed into the column pass. This design avoids that: every irrational constant the
Arai fast DCT needs is written *exactly* as a small integer 4-tuple over an
algebraic-integer (AI) basis, so both 1D passes are pure integer additions,
negations and shifts, with no multipliers and no rounding. Only at the very end
does a *final reconstruction step* (FRS) turn the exact doubly-encoded results
into fixed-point coefficients. That is the single place where error enters, it
is bounded per coefficient, and it does not propagate.

The RTL is synchronous SystemVerilog. The architecture it implements was
published as a design for an asynchronous (quasi-delay-insensitive) FPGA, where
the vendor tools turn synchronous RTL into handshake pipelines; that conversion
is a property of the FPGA flow and is not part of this code.

```
 s_in ──► input decimator ──► column AI DCT ──► transpose buffer ──► cross-     ──► row AI DCT A ─┐
 (F_s)    (z^-1 chain, ↓8)     (8 in, 22 out)    (22 x 8 delay taps)  connections ──► row AI DCT B ─┤
                                                                      (row u,      ──► row AI DCT C ─┼──► FRS ──► Y[u][0..7]
                                                                       comp a..d)  ──► row AI DCT D ─┘   (88 in, 8 out)
```

## The number system

With `cN = cos(N*pi/16)`, the Arai algorithm needs four multipliers: `c4`,
`c6`, `c2-c6` and `c2+c6`. Take

```
z1 = sqrt(2+sqrt2) + sqrt(2-sqrt2)      z2 = sqrt(2+sqrt2) - sqrt(2-sqrt2)
```

and represent a real number by integers `(a, b, c, d)` meaning

```
value = a + (b*z1 + c*z2 + d*z1*z2) / 4
      = a*1 + b*(c2+c6)/2 + c*(c2-c6)/2 + d*c4
```

Then the four constants are exact and sparse:

| constant | (a, b, c, d) |
|----------|--------------|
| c4       | (0, 0, 0, 1) |
| c6       | (0, 1, -1, 0)|
| c2 - c6  | (0, 0, 2, 0) |
| c2 + c6  | (0, 2, 0, 0) |

and a plain integer `n` is `(n, 0, 0, 0)`, so encoding the input costs nothing.
Multiplying an integer by one of these constants is just placing it (or its
double, or its negation) into a component, which is why the 1D transform needs no
multiplier.

**The factor 1/4 is a deliberate reading.** The source publication writes the
decode as `a + b*z1 + c*z2 + d*z1*z2` but lists the constant tuples above. Those
two statements cannot both hold: under the unscaled decode each tuple is
exactly four times its constant while an integer `n` stays `n`. The constant
table and the published signal-flow graph become an exact DCT only with the 1/4
on the non-unit basis terms, and that is what this RTL uses (verified against
the cosine definition, see *Verification*).

The package `ai_dct_pkg` holds the basis order, the 22-port layout, and the 16
products `W[i]*W[j]` of the decode weights `W = {1, (c2+c6)/2, (c2-c6)/2, c4}`
as `round(W[i]*W[j] * 2^30)`.

## The 1D AI Arai DCT (`ai_dct1d`)

Eight signed integers in, 22 integers out. Coefficients 0 and 4 are ordinary
integers (only `a`), coefficients 2 and 6 need `a` and `d`, the odd ones need all
four components. Port order (used throughout, index 0..21):

```
X0a | X1a X1b X1c X1d | X2a X2d | X3a X3b X3c X3d | X4a | X5a X5b X5c X5d | X6a X6d | X7a X7b X7c X7d
```

The adder network (one register level per column of adders, latency 4 clocks,
one vector per clock):

```
b0=x0+x7  b1=x1+x6  b4=x2+x5  b5=x3+x4  b2=x3-x4  b6=x2-x5  b3=x1-x6  b7=x0-x7
c0=b0+b5  c3=b1+b4  c1=b1-b4  c4=b0-b5  c2=b2+b6  c6=b6+b3  c5=b3+b7  c7=b7
d0=c0+c3  d1=c0-c3  d3=c1+c4  d4=c5-c2          S = 2*c2 + d4 = 2*c5 - d4 = c2 + c5
X0a=d0  X4a=d1  X2a=X6a=c4  X2d=d3  X6d=-d3
X1 = ( c7,  S,  d4,  c6)    X3 = ( c7, d4, -S, -c6)
X5 = ( c7,-d4,   S, -c6)    X7 = ( c7, -S,-d4,  c6)
```

`S` is formed twice, from `2*c2` and from `2*c5` (the two left shifts by one of
the signal-flow graph), as in the original graph. Decoding port group `k` gives
the *Arai-scaled* DCT

```
y_0 = F_0,    y_k = 2*cos(k*pi/16) * F_k  (k > 0),    F_k = sum_n x[n]*cos((2n+1)k*pi/16)
```

exactly. Outputs are `IN_W+4` bits; no output can overflow.

## From columns to rows: the doubly encoded 2D transform

This is the least obvious part of the design. After the column pass every
element of the transposed block is an AI tuple, so the row pass has to transform
vectors whose entries have up to four components. Because the transform is
linear, each component can be transformed on its own: row DCT block **A** gets
the `a` components of row `u`, **B** the `b` components, **C** the `c`, **D** the
`d`. Every block then returns 22 integers, which are AI-encoded a second time
(in the row direction). The 2D coefficient is recovered by decoding both
directions:

```
Y[u][v] = sum_{i in a..d} sum_{j in a..d} W[i] * W[j] * Block_i[ port(v, j) ]
```

Since the first-direction weight depends only on which block a value came from,
the FRS constants are the same for every row.

* **`ai_transpose_buffer`** keeps an 8-deep delay line on each of the 22
  column-DCT outputs; its 176 taps show the last eight columns at once. A
  column counter, started by reset, frames columns into blocks and raises
  `block_ready` in the clock in which the taps hold exactly one block (column
  `j` at `tap[7-j]`).
* **`ai_cross_connect`** copies the 176 taps into a holding bank on
  `block_ready` and then presents rows `u = 0..7`, one per clock, with the
  component routing above (zeros for components a row does not have: rows 0
  and 4 use only A, rows 2 and 6 use A and D). The holding bank lets the delay
  lines already fill with the next block; a new block may arrive at the
  earliest in the clock that presents row 7 of the previous one, which is what a
  full-rate stream gives. An assertion flags an earlier one.
* Four instances of **`ai_dct1d`** (input width `IN_W+4`, output `IN_W+8`) work
  in lock step.

Presenting one row per clock keeps the output rate equal to the input rate: one
8-sample column in, one row of eight coefficients out, per clock.

## Final reconstruction step (`ai_frs`)

88 integers in, 8 fixed-point coefficients out, per clock. Each of the 16 weight
products is rounded to `CONST_FRAC` fraction bits (default 20); stage 1 forms the
constant products, stage 2 adds them and rounds (half up) to `OUT_FRAC` fraction
bits (default 2). With 8-bit input the worst-case error is below
`16 * 2^15 * 2^-21 + 2^-3 = 0.375`; the testbenches measure at most 0.1255.
The products are written as multiplications by constants, which a synthesis
tool can map to shift-and-add networks; the 1D passes contain no multiplication
at all. The constant precision, the single precision for
all 64 coefficients and the two-stage pipeline are choices of this
implementation; the architecture allows a separate precision per coefficient.

The outputs still carry the Arai scale factors, `Y[u][v] = s_u*s_v * F[u][v]`
with `s_0 = 1`, `s_k = 2*cos(k*pi/16)`. They are meant to be absorbed into a
quantiser. To get the orthonormal DCT, multiply by
`(C_u/2)(C_v/2)/(s_u*s_v)` with `C_0 = 1/sqrt2`, `C_k = 1`.

## Input section and top level

**`ai_input_decimator`** is the serial front end: a chain of seven `z^-1`
delays gives eight taps, and every eighth accepted sample all eight taps are
registered as one column (down-sampling by 8). Tap `n` is the sample delayed by
`n`, so the newest sample lands on `x[0]`: send each column row 7 first. The
two rates share one clock: the decimator runs at the sample rate and marks the
column rate with a one-clock `out_valid` pulse, and everything after it advances
on that pulse.

**`ai_dct2d_top`** = decimator + **`ai_dct2d_core`**. The core alone takes a
parallel column per clock and is the full-rate form of the transform.

| module | in | out | latency |
|--------|----|-----|---------|
| `ai_dct1d` | `x[8]` (`IN_W`), `in_valid` | `y[22]` (`IN_W+4`), `out_valid` | 4 |
| `ai_input_decimator` | `s_in`, `in_valid` | `x[8]`, `out_valid` | 1 after 8th sample |
| `ai_transpose_buffer` | `col[22]`, `in_valid` | `tap[8][22]`, `block_ready` | 1 |
| `ai_cross_connect` | `tap[8][22]`, `block_ready` | `row_x[4][8]`, `row_idx`, `row_valid` | rows 0..7 on clocks 1..8 after capture |
| `ai_frs` | `blk[4][22]` (`YW`), `in_row`, `in_valid` | `coef[8]` (`OUT_W`), `out_row`, `out_valid` | 2 |
| `ai_dct2d_core` | `x[8]`, `in_valid` | `coef[8]`, `out_row`, `out_valid` | 13 (8th column to row 0) |
| `ai_dct2d_top` | `s_in`, `in_valid` | `coef[8]`, `out_row`, `out_valid` | 14 (last sample to row 0) |

All modules have `clk` and an active-low asynchronous `rst_n` that clears the
control state (valid flags and counters) only; datapath registers are not
reset. Block framing is by counting from reset: the first eight columns after
reset form block 0. The input stream may pause at any time (`in_valid` low).

Parameters (top and core): `IN_W = 8` input width (the architecture was also
built for widths 3 to 7), `CONST_FRAC = 20`, `OUT_FRAC = 2`. Coefficients are
`IN_W + 9 + OUT_FRAC` bits, signed, with `OUT_FRAC` fraction bits.

## How far to trust it, and where it departs from the published architecture

* Every 1D output is checked bit-exactly (through its exact decode) against the
  cosine definition, and every 2D coefficient of random, extreme and
  frame-sized inputs against a floating-point 2D DCT. See below.
* The decode carries a factor 1/4 on the non-unit basis terms (see *The number
  system*); this follows the published constant table and signal-flow graph,
  not the published decode formula.
* How the four row blocks share the 22 component rows, the holding bank and the
  one-row-per-clock schedule are this implementation's own; the publication
  only names a real-time transposition buffer with 176 outputs and wired
  cross-connections.
* FRS precision and rounding, pipeline depth of every block, valid flags,
  reset and framing are this implementation's own choices.
* The input decimator was not part of the published hardware implementation
  (it was expected to come from SerDes cores); here it is plain logic built
  from the block diagram.
* Not included: the asynchronous pipeline fabric and its handshakes, the
  synchronous I/O frame, slack-matching delay cells and the serial test wrapper,
  all of which belong to the FPGA device or the lab setup. The integer cosine
  transform of the HEVC reference encoder appears in the publication only as a
  comparison and is not built.

## Verification

Testbenches are self-checking and print `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_ai_dct1d` | 400 vectors (random, all-max, all-min, alternating, impulse) with gaps; each of the 8 coefficients decoded with real weights equals the cosine-defined value to 1e-6; latency 4 |
| `tb_ai_input_decimator` | random stream with pauses; `x[n]` = sample `7-n` of each group, one clock after the 8th sample |
| `tb_ai_transpose_buffer` | all 176 taps after every write; `block_ready` exactly after every 8th column |
| `tb_ai_cross_connect` | back-to-back and spaced blocks with taps changing every clock; every routed word, row index and valid |
| `tb_ai_frs` | random rows against the real double decode, within the derived error bound; latency 2 |
| `tb_ai_dct2d_core` | 40 blocks at full rate then 20 with pauses; extreme, checkerboard and zero-padded 4x4/4x8 blocks; 2D coefficients within 0.5; latency 13; every row class exercised |
| `tb_ai_dct2d_top` | the same through the serial input at default parameters (also zero-padded 8x4 blocks); latency 14 |
| `tb_ai_dct2d_widths` | the core at input widths 3, 4, 5, 6 and 7 bits: extreme and random blocks, 2D coefficients within 0.5 |
| `tb_ai_dct2d_frames` | synthetic 416x240 and 832x480 frames, raster block order at full rate: all 499,200 coefficients within 0.5 and the exact clock count per frame |

Largest observed coefficient error: 0.1255 (output LSB is 0.25).

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ai_dct_pkg.sv tb/ai_dct_ref_pkg.sv tb/tb_ai_dct2d_top.sv --top-module tb_ai_dct2d_top
obj_dir/Vtb_ai_dct2d_top
```

Replace `tb_ai_dct2d_top` by any testbench name above. `tb/ai_dct_ref_pkg.sv`
holds the floating-point reference used by all of them;
`tb_ai_dct2d_widths` also needs `tb/ai_dct2d_width_check.sv` (found through `-y tb`). Lint a module with
`verilator --lint-only -Wall -y rtl rtl/ai_dct_pkg.sv rtl/<module>.sv`.

To change the input width, set `IN_W` on `ai_dct2d_top` or `ai_dct2d_core`;
all internal widths follow. To trade accuracy for area in the FRS, lower
`CONST_FRAC` or `OUT_FRAC` (and widen the testbench tolerance accordingly).
