# 16-bit binary logarithm generator

A combinational circuit that turns a 16-bit unsigned integer `N` into its
base-2 logarithm, as a 4-bit integer part `k` and a 13-bit fraction `F`. It is
meant for DSP datapaths that work partly in the logarithmic domain, where
multiplication becomes addition and square root a shift, and where the cost of
the log converter matters.

The circuit uses no multiplier and only a 640-bit table. It splits the
problem in the usual way:

    N = 2^k * (1 + x),   0 <= x < 1
    log2 N = k + log2(1 + x)

`k` is the position of the leading one of `N`. The fraction `x` is the bits
below that one. The hard part is `log2(1 + x)`. It is computed in two layers:

1. a four-segment straight-line estimate `D(x) = a_i*x + b_i`. Each slope
   `a_i` is a sum or difference of two powers of two, so `a_i*x` is one
   add or subtract of two shifted copies of `x`;
2. a 128-entry, 5-bit signed correction table `E(x)`, indexed by the top
   seven bits of `x`, which removes most of what the lines leave.

`F = D(x) + E(x)`. Over all nonzero 16-bit inputs, `k + F/2^13` is within
±1.09e-3 of the true `log2 N`.

## Datapath

```
            +------+  k (4)
 N (16) --->| LODE |-------------------------------------------> k
        |   +------+      |
        |              +-----+
        |              | INV |  shamt = 15 - k
        |              +-----+
        |                 v
        |   +----------------+  x (13)   +---------------------+
        +-->| barrel shifter |---------->| approximation block |--> F (13)
            +----------------+           +---------------------+
```

| Module | Role |
|---|---|
| `log2_lode` | Leading-one detector and encoder. It gives `k` and a `zero` flag. |
| `log2_inv` | `shamt = ~k`. For a 4-bit `k` this equals `15 - k`, the left shift that brings the leading one to bit 15. |
| `log2_barrel_shifter` | A four-stage left shifter (shifts of 1, 2, 4 and 8). It drops the leading one and keeps the next 13 bits as `x`. |
| `log2_approx` | Computes `F` from `x` using the four blocks below and one three-input adder. |
| `log2_cof_lut` | Intercept `b_i` of each segment, selected by `x[12:11]`. |
| `log2_slope_mux` | Two 4-way multiplexers that pick the two shifted terms of `a_i*x`. |
| `log2_addsub` | Forms `a_i*x` as `opa + opb` or `opa - opb`. |
| `log2_error_lut` | The 128 x 5-bit correction table, indexed by `x[12:6]`. |
| `log2_gen` | Top level. |
| `log2_pkg` | Shared widths, the segment enum `seg_e` and the intercept constants. |

There is no clock and no register. The path from `n` to `f` is one
combinational cone: the encoder, the shifter, the multiplexers, the +/- unit
and a three-input adder. Register the inputs and outputs where you use it.
If it must run faster, the natural place for a pipeline register is on `x`,
between the shifter and the approximation block.

### Number formats

* `n`: unsigned integer.
* `k`: unsigned, 0..15.
* `x`, `f`: unsigned fractions with 13 bits. Bit 12 weighs 2^-1 and bit 0
  weighs 2^-13. A value `v` means `v / 8192`.
* `{k, f}` read as one 17-bit number with 13 fraction bits is `log2 N`.
* `zero`: high when `N = 0`. The logarithm of zero does not exist. `k` and
  `f` then read the same as for `N = 1`, so check `zero` when 0 is a
  possible input.

For `N >= 2^14`, more than 13 bits lie below the leading one. The lowest
one or two of them are truncated. This adds at most 1.8e-4 to the error.

## The segment approximation

`x[12:11]` picks the segment. The coefficients are:

| segment | x range | slope a_i | a_i*x in hardware | intercept b_i | b_i x 2^13 |
|---|---|---|---|---|---|
| 0 | [0, 0.25) | 1 + 1/4 | `x + (x>>2)` | 2^-7 | 64 |
| 1 | [0.25, 0.5) | 1 + 1/16 | `x + (x>>4)` | 2^-4 | 512 |
| 2 | [0.5, 0.75) | 1 − 1/8 | `x − (x>>3)` | 77 · 2^-9 | 1232 |
| 3 | [0.75, 1) | 1/2 + 1/4 | `(x>>2) + (x>>1)` | 2^-2 | 2048 |

Each slope is a least-squares line fit over its segment, rounded to a sum of
two signed powers of two. The intercept is then re-optimised for the rounded
slope. Segment 3 is the only one whose first term is not `x`: the upper
multiplexer passes `x>>2` there and `x` everywhere else. The lower
multiplexer passes `>>2`, `>>4`, `>>3` or `>>1`. Only segment 2 subtracts.
In every segment `a_i*x` stays below 0.75, so the 13-bit +/- unit never
carries or borrows out.

The lines alone leave an error `log2(1+x) − D(x)` between −8.66e-3 and
+6.42e-3. This is close to the ±1e-2 that comparable four-segment shift-add
converters reach. The table is what brings the error down by a factor of
about eight.

## The correction table

This is the least obvious part of the design. The table has 128 bins of 64
codes each. Each entry is a signed 5-bit number in units of **2^-10**. In
`log2_approx` the entry is sign-extended and shifted left by three
(`ELUT_SHIFT`), which aligns it with the 2^-13 grid of `F`. The three terms
`a_i*x`, `b_i` and the aligned entry go into one adder, modulo 2^13. A
negative entry is a two's-complement subtraction.

Why 2^-10: the uncorrected error reaches 8.8e-3 in magnitude. Five signed
bits cover ±16 steps, so the step must be at least 8.8e-3/16 = 5.5e-4. The
next power of two is 2^-10 (9.8e-4). All entries lie in −9..+7, so none
saturates. A step of 2^-11 would force two entries to clip, but gives almost
the same worst case (9.8e-4 against 1.07e-3).

How the entries were computed: for bin `j`, evaluate over its 64 codes `x`

    e(x) = 8192 * log2(1 + x/8192) − D(x)

with `D(x)` exactly as the hardware computes it (shifts truncate). The entry
is

    E[j] = round( (max e + min e) / 2 / 8 ),   rounding halves away from zero

Using the mid-range instead of the mean makes the worst error inside a bin as
small as one constant allows. The 128 values are written out as a constant
array in `log2_error_lut.sv`. The reference package of the testbenches
recomputes them from this formula with real-valued `log2` and checks every
entry. If you change a coefficient or the segmentation, regenerate the table
from the same formula, and the testbenches will confirm it.

Over all 8192 values of `x`, `D(x) + 8*E` lies in 0..8190. The final sum
therefore needs no clamp at either end.

## Accuracy

Measured by the end-to-end testbench over every `N` from 1 to 65535, as the
error of `k + F/2^13` against `log2 N`:

| metric | value |
|---|---|
| largest positive error | 1.08e-3 |
| largest negative error | −1.07e-3 |
| mean absolute error | 2.69e-4 |
| largest relative error | 9.8e-4 (0.098 %) |
| mean relative error | 1.9e-5 |

For the fraction alone (all 8192 `x`), the largest error of `F` against
`log2(1+x)` is 1.07e-3. The extra 1e-5 of the integer inputs comes from the
truncated low bits of `x` when `N >= 2^14`.

## Where this implementation departs from, or adds to, the published method

* **Correction-table contents and scaling.** The method fixes the table's
  size (5 x 128 bits, addressed by the seven MSBs of `x`) but not its
  contents or the weight of its LSB. The 2^-10 step and the mid-range fitting
  rule above are this design's own choices. The published error plot with
  the table peaks near ±8e-4. This implementation reaches ±1.07e-3 on the
  same 13-bit datapath. Most of the difference is the bin-constant
  correction with a 2^-10 step. Another table fit may close part of the gap.
* **Third intercept.** It is 77·2^-9 ≈ 0.1504. This value also reproduces
  the published uncorrected errors (+6.3e-3, −8.8e-3, mean 1.76e-4) when the
  lines are evaluated exactly.
* **Truncation.** The shifted terms inside `a_i*x` and the low bits of `x`
  for large `N` are truncated. Rounding is not specified, and truncation
  costs nothing.
* **`zero` output.** Added. The original block diagram has only `k` and `F`.
* **Purely combinational.** Only a propagation delay is reported for the
  original, so no pipeline stage was added.
* **Parameters.** `N_W`, `K_W` and `F_W` are parameters of the top and of the
  LODE and shifter. The approximation block, its coefficients and its table
  are fitted to `F_W = 13`, and the shifter's INV trick needs
  `N_W = 2^K_W`. The top stops elaboration with an error for any other
  combination.

Not reproduced: the reported FPGA and 65 nm ASIC area, delay and power
figures. These depend on the synthesis flow and are not properties of the
RTL.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints one line
`TB_RESULT checks=N failures=M` and ends with `$finish`. The reference
package `tb/log2_ref_pkg.sv` rebuilds every expected value from the formulas
above with integer and real arithmetic. It does not reuse the RTL.

| testbench | what it covers |
|---|---|
| `tb_log2_gen` | All 65536 inputs at default parameters: `k`, `f` and `zero`, bounded error against `log2 N`, coverage of every segment, every `k`, correction signs, truncation and `N = 0`. It prints the statistics above. |
| `tb_log2_approx` | All 8192 fractions: exact `F`, error bound, and the uncorrected line error against the published bounds. |
| `tb_log2_lode` | All 65536 inputs. |
| `tb_log2_barrel_shifter` | All nonzero inputs with their normalising shift, plus random shifts. |
| `tb_log2_error_lut` | All 128 entries against the fitting formula. |
| `tb_log2_slope_mux`, `tb_log2_addsub`, `tb_log2_cof_lut`, `tb_log2_inv` | Exhaustive or random checks of the small blocks. |

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/log2_pkg.sv tb/log2_ref_pkg.sv tb/tb_log2_gen.sv \
    --top-module tb_log2_gen -o sim
./obj_dir/sim
```

Replace `tb_log2_gen` with any other testbench name. The full run of
`tb_log2_gen` takes well under a second.
