# Symmetric 2-D separable-denominator IIR filters (Type-4 and Type-3)

A two-dimensional quarter-plane IIR filter whose magnitude response has a
symmetry has equal numerator coefficients. For example, diagonal symmetry
means |H(z1,z2)| = |H(z2,z1)|. The equal coefficients let one multiplier serve
several positions of the coefficient matrix. This RTL implements five
hardware structures for such a filter, of order N = 3, with a separable
denominator:

    H(z1,z2) = sum_{i,j=0..N} a_ij z1^-i z2^-j
               / ((1 - sum_i b_i0 z1^-i) (1 - sum_j b_0j z2^-j))

| Structure | Module | Numerator rule | Multipliers (N = 3) | Stored words |
|---|---|---|---|---|
| Type-4, general | `t4_sep_filter` | none | 22 | 6M + 30 |
| Type-4, diagonal | `t4_diag_filter` | a_ij = a_ji | 16 | 6M + 24 |
| Type-4, diagonal (anti-diagonal pairing) | `t4_antidiag_filter` | a_ij = a_(N-j)(N-i) | 16 | 6M + 24 |
| Type-3, diagonal (anti-diagonal pairing) | `t3_antidiag_filter` | a_ij = a_(N-j)(N-i) | 16 | 3M + 27 |
| Type-4, four-fold rotational | `t4_fourfold_filter` | a_ij = a_j(N-i) | 10 | 6M + 18 |

All the symmetric structures also use b_k0 = b_0k, so the denominator is the
same in both directions. `sym2d_filters_top` places the five structures side
by side. Each has its own input, enable, coefficients and output. They are
alternatives for the same job, not stages of one pipeline.

## Row-scan operation

The image is fed one pixel per enabled clock, row after row. Each row is
padded with zeros to a fixed length M (parameter `M`, default 256). In this
sample stream:

* z2^-1, one pixel to the left, is a delay of one sample (a register);
* z1^-1, one row up, is a delay of M samples (a line delay, `sym2d_line_delay`).

So the 2-D filter becomes the 1-D filter H(z^-M, z^-1) on the stream. The
zero padding keeps the numerator's horizontal taps from reaching into the
previous row. The recursions run across row ends, as a row-scan IIR
implementation does. The testbenches compare against this stream form.

## Two cascade orders: Type-4 and Type-3

The separable denominator allows the filter to be split into two cascaded
recursions. The two types take them in opposite order.

**Type-4** (Block 2, then Block 1):

    Y4 = sum_{i,j} a_ij z1^-i z2^-j X + sum_j b_0j z2^-j Y4     (t4_block2)
    Y  = Y4 + sum_i b_i0 z1^-i Y                                (sym2d_iir1d, D = M)

The first section recurses along the row, so its feedback is only a few
samples long. The second section recurses down the columns and needs N line
delays of its own. This gives 2N line delays in all.

**Type-3** (column recursion first):

    Y3 = sum_{i,j} a_ij z1^-i z2^-j X + sum_i b_i0 z1^-i Y3     (t3_block_y3)
    Y  = Y3 + sum_j b_0j z2^-j Y                                (sym2d_iir1d, D = 1)

Here the column feedback b_i0 * Y3 is added into the same line-delay chain
as the numerator rows. The numerator and the recursion therefore share N line
delays, which halves the row storage.

## How one multiplier serves several coefficients

The hardest part of the design is the delay-and-add network,
`sym2d_fir_accum`. It is written in transposed form:

1. Every unique coefficient multiplies the current sample once. In Block 2
   and the Type-3 section this product is registered.
2. The product for position (i,j) is added into row i's chain of N unit-delay
   registers at column j. Row i's chain therefore emits
   sum_j c_ij X[n-j].
3. Each row sum is added into a chain of N line delays. Row i is delayed by
   i*M samples before it reaches the output.

A product is formed from the current sample and delayed only afterwards. So
a coefficient that appears at several positions needs one multiplier, whose
output is wired to each of those positions. Equal coefficients fall into
orbits:

* `SYM_DIAG` pairs (i,j) with (j,i).
* `SYM_ANTIDIAG` pairs (i,j) with (N-j,N-i).
* `SYM_FOURFOLD` groups the four 90-degree rotations
  (i,j) -> (j,N-i) -> (N-i,N-j) -> (N-j,i).
  For even N, the centre (N/2,N/2) is an orbit of its own.

`sym2d_pkg::coef_slot` maps each position to its orbit at elaboration time.
`num_coef` gives the number of multipliers. The coefficient ports `a_i[k]`
hold one value per orbit. Orbit k is the k-th orbit met in a row-major scan of
(i,j). For N = 3 the first members are:

* a_ij = a_ji: (0,0) (0,1) (0,2) (0,3) (1,1) (1,2) (1,3) (2,2) (2,3) (3,3)
* a_ij = a_(N-j)(N-i): all (i,j) with i + j <= 3, in row-major order
* four-fold: (0,0) (0,1) (0,2) (1,1)

For `t4_sep_filter`, `a_i[i*(N+1)+j]` = a_ij.

The row-direction feedback of Type-4 Block 2 (b_0j * Y4) goes into row 0's
unit-delay chain at column j. It reuses the numerator's registers there. The
column feedback of Type-3 goes into the line-delay chain at row j.

## Arithmetic

The word lengths are set in `sym2d_pkg`. They are this design's choice:

* input samples: 16-bit signed;
* coefficients: 16-bit signed with 14 fraction bits, range [-2, 2);
* the states Y4, Y3 and Y: 32-bit signed integers;
* every product and partial sum: exact, in 56 bits.

Rounding happens only where a state word is formed. There the exact sum is
shifted right arithmetically by 14 bits, which is a floor. For example,
Y4 = floor((numerator + feedback) / 2^14), and the result is kept in 32 bits,
wrapping on overflow. Because the sums are exact, the symmetric structures
give bit-identical results to the general one loaded with the expanded
coefficient matrix. The end-to-end test checks this. There is no saturation.
Overflow wraps, so coefficients must give a stable denominator with enough
headroom.

## Interface and timing

Each filter has the following ports:

* `clk`, `rst_n` (asynchronous, active low), `en`;
* `x_i`: the sample;
* `a_i[NA]`: one coefficient per orbit;
* `b_i[1:N]`: the shared b_k0 = b_0k. `t4_sep_filter` instead has `b_row_i`
  (b_i0) and `b_col_i` (b_0j);
* `y_o`, `y_valid_o`.

Everything moves only on a clock edge with `en` high. The edge that takes
sample n loads `y_o` with the output for sample n-2. There are three stages:
the product register, the Y4/Y3 register and the Y register. `y_valid_o`
rises at the third enable after reset. Reset clears all registers. The line
delays return zero until they have been written once, so their memories need
no reset. Coefficients are expected to be held steady while the filter runs.

## Where this RTL departs from, or adds to, the published structures

* The published figures fix an exact arrangement of adders and registers.
  That arrangement is not reproduced here. The equations, the cascade order,
  the sharing of multipliers and the sharing of line delays in Type-3 are
  followed. The multiplier counts match the published ones: 22, 16, 16, 16
  and 10.
* The register counts differ slightly from the published 6M+14, 6M+20,
  6M+26, 3M+30 and 6M+21. This design counts 6M+30, 6M+24, 6M+24, 3M+27 and
  6M+18 words. The difference comes from the product registers and the
  output registers.
* The published critical paths are one multiplication plus 3 additions
  (separable Type-4), 4 additions (symmetric Type-4) and 2 additions
  (Type-3). This RTL is not retimed to those figures. Its recursion loops run
  about one multiplication plus four additions (Type-4 Block 2 and the Type-3
  first section) and one multiplication plus two additions (the 1-D
  sections). The adders are written as plain sums and left to synthesis.
* The Type-3 output section, Y = Y3 + sum b_0j z2^-j Y, follows from the
  separable denominator. Only the Y3 equation is stated explicitly for the
  published Type-3 structure.
* The following are all this design's own choices: the word lengths, the
  floor rounding, the wrap-around, the sample enable, the reset, the valid
  flag, and the default M = 256.

## Checking the symmetry

`tb_sym2d_symmetry` checks the property that the constrained coefficients are
meant to give, and it measures it on the RTL itself. The steps are:

1. Each filter gets one impulse in a padded 64 x 64 image.
2. Its output is read back as a 2-D impulse response h[n1][n2].
3. A direct 2-D DFT gives |H| on an 8 x 8 grid of frequencies.
4. The grid is compared with its mirror image, or with its 90-degree
   rotation for the four-fold filter.

In a typical run, the symmetric filters match their mirrored or rotated
response to within about 0.1% of the peak. The remaining mismatch comes from
the floor rounding. A general filter with random coefficients, used as a
control, misses by tens of percent. The test requires under 1% for the
symmetric filters and over 5% for the control. The denominators in this test
are kept to sum |b_k| <= 1/2, so each row's response dies out before it can
wrap into the next row.

## Files

* `rtl/sym2d_pkg.sv`: types, sizes, and the symmetry and orbit functions.
* `rtl/sym2d_line_delay.sv`: D-sample delay (circular buffer).
* `rtl/sym2d_fir_accum.sv`: the transposed delay-and-add network.
* `rtl/sym2d_iir1d.sv`: 1-D all-pole section (Type-4 Block 1 with D = M;
  Type-3 output section with D = 1).
* `rtl/t4_block2.sv`: Type-4 Block 2 with selectable sharing.
* `rtl/t3_block_y3.sv`: Type-3 first section.
* `rtl/t4_*_filter.sv`, `rtl/t3_antidiag_filter.sv`: the five filters.
* `rtl/sym2d_filters_top.sv`: all five side by side.
* `tb/sym2d_ref_pkg.sv`: a bit-exact reference written from the difference
  equations on the stream. It also expands orbit coefficients into the full
  matrix directly from each symmetry rule.
* `tb/tb_*.sv`: one self-checking testbench per module. Each uses random
  coefficients with a stable denominator, random samples and random enable
  gaps, and ends with `TB_RESULT checks=.. failures=..`.
  `tb_sym2d_filters_top` runs all five filters at M = 12 and counts the
  mechanisms it exercised: stalls, zero padding, each recursion, line-delay
  wrap, and general/four-fold equality.
  `tb_sym2d_filters_full` filters one 256 x 256 padded image at the default
  parameters and checks every output. `tb_sym2d_symmetry` is described
  above.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/sym2d_pkg.sv tb/sym2d_ref_pkg.sv tb/tb_sym2d_filters_full.sv \
        --top-module tb_sym2d_filters_full -o sim
    ./obj_dir/sim

To run any other testbench, substitute its name. The filter order `N` and
the row length `M` are parameters of every module. The word lengths are
package constants in `sym2d_pkg`.
