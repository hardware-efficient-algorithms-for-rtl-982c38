# GHM multiwavelet transform kernels with ten multipliers

The GHM multiwavelet basis (Geronimo, Hardin and Massopust) has two scaling
functions and two wavelets. One step of its discrete transform is a "basic
operation", much like the butterfly of an FFT. The forward basic operation
maps a window of eight samples to four coefficients, `y = F x`, where `F` is a
fixed 4x8 matrix. The inverse maps four coefficients back to eight samples,
`x = F^T y`. Because many of `F`'s entries are irrational (they involve
`sqrt(2)`), a direct implementation needs 23 constant multipliers per kernel.
This RTL factors both products into a chain of small sparse adder matrices
and diagonal scalings, so that each kernel needs only

| kernel  | fractional multipliers | multipliers by 9 | adders | direct method (mult / add) |
|---------|-----------------------:|-----------------:|-------:|---------------------------:|
| forward | 8                      | 2                | 15     | 23 / 19                    |
| inverse | 8                      | 2                | 10     | 23 / 16                    |

Each kernel is fully parallel: it accepts one vector per clock and delivers
the result three clocks later.

## The matrix

With `r2 = sqrt(2)`, the forward matrix is (columns `x0..x7`):

```
y0 =  3/(5r2) x0 + 4/5 x1     + 3/(5r2) x2
y1 = -1/20 x0 - 3/(10r2) x1 + 9/20 x2 + 1/r2 x3 + 9/20 x4 - 3/(10r2) x5 - 1/20 x6
y2 = -1/20 x0 - 3/(10r2) x1 + 9/20 x2 - 1/r2 x3 + 9/20 x4 - 3/(10r2) x5 - 1/20 x6
y3 =  1/(10r2) x0 + 3/10 x1 - 9/(10r2) x2 + 9/(10r2) x4 - 3/10 x5 - 1/(10r2) x6
```

Its first two rows are the four 2x2 taps `H(0..3)` of one matrix-valued
filter, laid side by side; its last two rows are the taps `G(0..3)` of the
other. Column
`x7` is zero, so `x7` is never used and the inverse always outputs 0 for it.
The rows are orthonormal (`F F^T = I`), and a transform built by sliding `F`
along a signal in steps of four samples is orthogonal.

## The forward factorisation

`y = W4x6 · D6 · W6x9 · D9 · W9x8 · x`. The `W` matrices contain only 0 and ±1
(adders and free sign changes). The `D` matrices are diagonal (constant
multipliers):

```
W9x8:  a = [x0+x2, x1, x0+x6, x0-x6, x2+x4, x2-x4, x3, x1+x5, x1-x5]       7 adders
D9  :  m = a .* [3/(5r2), 4/5, 1, 1, 9, 9, 1, 3/10, 3/10]                  4 fractional, 2 x9
W6x9:  b = [m0+m1, m4-m2, m3-m5, m6-m7, m6+m7, m8]                          5 adders
D6  :  n = b .* [1, 1/20, 1/(10r2), 1/r2, 1/r2, 1]                          4 fractional
W4x6:  y = [n0, n1+n3, n1-n4, n2+n5]                                       3 adders
```

The structure is easy to see in the equations. `y1` and `y2` share everything
except the sign of the `x3` term. All of their other coefficients are
multiples of 1/20 applied to `x0+x6` and `x2+x4`, or multiples of `3/(10r2)`
applied to `x1+x5`. `y3` is built from the matching differences. Both groups
therefore go through a single ×9 and a single 1/20 or `1/(10r2)`. The shared
term `0.3(x1+x5)` is combined with `x3` before the two `1/r2` multipliers.

## The inverse factorisation and its 10 adders

The plain transpose of the forward graph,
`F^T = W9x8^T · D9 · W6x9^T · D6 · W4x6^T`, also uses 10 multipliers, but it
needs 12 adders. The inverse kernel saves two of them. It forms the sum and
the difference of the two scaled values that feed the ×9 multipliers
*before* multiplying, instead of after:

```
W6x4:  n = [y0, y1+y2, y3, y1, -y2, y3]                                    1 adder
D6  :  p = n .* [1, 1/20, 1/(10r2), 1/r2, 1/r2, 1]                          4 fractional
W9x6:  u = p1+p2, v = p1-p2
       q = [p0, p0, -v, -u, u, v, p3+p4, p4-p3, p5]                        4 adders
D9  :  r = q .* [3/(5r2), 4/5, 1, 1, 9, 9, 1, 3/10, 3/10]                  4 fractional, 2 x9
W8x9:  x = [r0+r2, r1+r7+r8, r0+r5, r6, r4, r7-r8, r3, 0]                  5 adders
```

This gives `x4 = 9u`, `x6 = -u`, `x0 = 3/(5r2) y0 - v` and
`x2 = 3/(5r2) y0 + 9v`. These are the same values the transposed graph
computes, reached with two fewer additions. Sign changes (`-y2`, `-u`, `-v`)
are folded into the adders that consume them and are not counted.

Both factorisations reproduce `F` and `F^T` exactly in real arithmetic. The
testbenches check the hardware against `F` evaluated in floating point, not
against the factorised form.

## Number format and accuracy

The reference algorithm is pure arithmetic. Everything about word widths is a
choice made in this design:

* **Samples.** The samples are `DATA_W`-bit two's-complement integers (default
  16).
* **Guard bits.** Inside a kernel every value carries `GUARD` = 4 extra
  fraction bits. The internal width is `DATA_W + GUARD + 6`: the largest
  intermediate is about 20 times the input range (after the ×9 stage).
* **Constants.** Each fractional constant is an 18-bit signed integer
  `round(c · 2^F)`. The shift `F` is chosen per constant so that the integer
  lies in [2^16, 2^17), which bounds the relative error of every constant by
  2^-17. The constants are defined in `ghm_pkg`.
* **Rounding.** Every fractional multiplier rounds half up back to the
  internal grid. The outputs are rounded half up to integers.
* **Output widths.** Forward outputs are `DATA_W+2` bits wide, since the
  largest row gain of `F` is 2.13. Inverse outputs are `DATA_W+1` bits wide,
  since the largest row gain of `F^T` is 1.96. Neither can overflow.

Measured errors against exact real arithmetic, at full-scale random and
worst-case inputs:

* **Forward kernel (16-bit inputs).** Within 0.75 LSB.
* **Inverse kernel (18-bit inputs).** Within 1.64 LSB. The ×9 stage magnifies
  the quantisation error of the 1/20 and `1/(10r2)` constants ahead of it. If
  that matters, widen `COEF_W` in `ghm_pkg` and requantise the constants with
  the formula above.
* **Forward then inverse, with overlap-add.** The reconstructed signal is
  within 1 LSB of the original.

## Interface and timing

`ghm_fdmwt` and `ghm_idmwt` share one interface style:

| port        | dir | width                      | meaning |
|-------------|-----|----------------------------|---------|
| `clk`       | in  | 1                          | clock |
| `rst_n`     | in  | 1                          | asynchronous, active low; clears only the valid pipeline |
| `in_valid`  | in  | 1                          | the input vector is sampled on this clock edge |
| `x` / `y`   | in  | 8×`DATA_W` / 4×`DATA_W`    | input vector (unpacked array) |
| `out_valid` | out | 1                          | the output vector is valid |
| `y` / `x`   | out | 4×(`DATA_W`+2) / 8×(`DATA_W`+1) | output vector |

The pipeline has three register stages. A vector accepted at clock edge *t*
appears with `out_valid` after edge *t+3* (`ghm_pkg::KERNEL_LATENCY`). Vectors
may arrive back to back or with gaps. There is no back-pressure. Data
registers are not reset; only their valid flags are.

`ghm_dmwt_top` places the two kernels side by side, each with its own ports:

* **Forward.** `fwd_*` kernel with `DATA_W` = 16.
* **Inverse.** `inv_*` kernel whose input width is the forward output width
  (18 bits), so the coefficients can be passed straight across. Its outputs
  are 19 bits wide.

## Using the kernels for a whole transform

The kernels compute one basic operation. A full single-level transform of a
signal `s` slides an 8-sample window along it in steps of four samples:
window *k* covers `s[4k .. 4k+7]`, wrapping around for a periodic signal.
Each window goes through the forward kernel. Reconstruction sends each
window's four coefficients through the inverse kernel and adds the eight
outputs back at the same positions (overlap-add). Every sample is covered by
two windows. The windowing buffer and the overlap-add accumulator are not
part of this RTL. `tb_ghm_dmwt_top` does both in the testbench.

## Departures and open points

* **Inverse adder structure.** The inverse uses the 10-adder structure
  described above rather than the literal transpose of the forward
  factorisation, which would need 12.
* **Diagonal factor `D6`.** It contains `1/sqrt(2)` twice. Only with that
  value does the factorisation reproduce `F`.
* **Signs.** The signs inside the `W` matrices were chosen so that the
  products equal `F` and `F^T` exactly. Any other consistent choice of signs
  would give the same hardware cost.
* **Not built.** No word widths, pipelining or handshake are specified for
  these kernels; everything in "Number format and accuracy" and "Interface and
  timing" is this design's own. The windowing and overlap-add logic around
  the kernels, and any multi-level decomposition, are not built.
* **Multipliers.** The fractional multipliers are written as generic `*` by a
  constant. A synthesis tool may map them to embedded multipliers or to
  shift-add logic. At the default widths, each data operand (26 bits forward,
  28 bits inverse) is wider than one 18x18 embedded multiplier. The ×9
  multipliers are always a shift and an add.

## Files

| file | contents |
|------|----------|
| `rtl/ghm_pkg.sv` | constant formats and values, kernel latency |
| `rtl/ghm_cmul_frac.sv` | multiplier by a fractional constant, with rounding |
| `rtl/ghm_mul9.sv` | multiplier by 9 (shift and add) |
| `rtl/ghm_fdmwt.sv` | forward kernel |
| `rtl/ghm_idmwt.sv` | inverse kernel |
| `rtl/ghm_dmwt_top.sv` | both kernels side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. For example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/ghm_pkg.sv tb/tb_ghm_dmwt_top.sv --top-module tb_ghm_dmwt_top -o sim
./obj_dir/sim
```

Replace the testbench name to run the others:

* **`tb_ghm_fdmwt`.** Compares against `F x` in real arithmetic, including
  full-scale worst-case sign patterns, and checks the 3-cycle latency.
* **`tb_ghm_idmwt`.** Does the same against `F^T y`.
* **`tb_ghm_cmul_frac`.** Tests all six constants.
* **`tb_ghm_mul9`.** Tests the ×9 multiplier exhaustively on a 12-bit input.
* **`tb_ghm_dmwt_top`.** Runs the top at its default parameters. It passes 40
  periodic 64-sample signals (alternating full scale, constant full scale, a
  sine, random) through forward analysis and inverse synthesis. The two
  kernels overlap in time, with random gaps between inputs. The testbench
  checks every coefficient, every inverse output, every reconstructed sample
  and the latency of both kernels. It also counts idle gaps, back-to-back
  inputs and cycles in which both kernels are busy.

All testbenches run in well under a second.
