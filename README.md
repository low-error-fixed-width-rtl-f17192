# Fixed-width radix-4 Booth multiplier with approximate carry compensation

Multiplying two N-bit numbers gives a 2N-bit product. Many signal-processing
datapaths keep only the upper N bits of it. Building the full array and then
dropping the lower half wastes about half the partial-product hardware.
Leaving that half out (direct truncation) is cheap, but it throws away every
carry the lower columns would have sent upward, so the result is biased low by
several LSBs.

This multiplier sits between those two extremes. It drops most of the lower
half, keeps its W most significant columns, and replaces the lost carries with
a small estimate. The estimate is the *approximate carry function* (ACF):

```
  {cout4, cout3, cout2, cout1} = {0, c2(B), c1(B)} + {cb3, cb2, cb1}
```

- `cb3..cb1` are constant **base carries**. They are fixed per variant and per W.
- `c1` and `c2` are **ideal carries**: Boolean functions of the multiplier B
  alone, chosen so that the error summed over all multiplicands is as small
  as possible.
- The word is added at column N-W. The W kept low columns are then discarded.

At the default size (N = 8, W = 2, variant ACF-1), the mean absolute error over
all 65536 operand pairs is 0.2592 LSB of the N-bit result. The largest error
is 0.75 LSB. For comparison, exact rounding has a mean absolute error of 0.25
LSB, and plain truncation about 1.5 LSB.

The unit is purely combinational. It has no clock, no registers and no
handshake. `p` follows `a` and `b` after one propagation delay.

## The partial-product array and where it is cut

Radix-4 Booth recoding turns B into N/2 digits in {-2, -1, 0, +1, +2}. Digit i
comes from bits b[2i+1], b[2i] and b[2i-1], with b[-1] = 0:

| b[2i+1] b[2i] b[2i-1] | digit |
|---|---|
| 000, 111 | 0 |
| 001, 010 | +1 |
| 011 | +2 |
| 100 | -2 |
| 101, 110 | -1 |

Row i is N+1 bits wide. It holds 0, A (sign-extended by one bit) or A shifted
left by one. A negative digit inverts the row and sets a correction bit n_i.
Row i starts at column 2i, and n_i sits at column 2i as well. The code 111
gives an all-zero row with n_i = 0. For N = 8 and W = 2 the array looks like
this (column 0 on the right):

```
 column:  15 ... 8 | 7  6 | 5  4  3  2  1  0
 row 0         r0  | r0 r0| r0 r0 r0 r0 r0 r0   n0 @0
 row 1      r1 ... | r1 r1| r1 r1 r1 r1         n1 @2
 row 2   r2 ...    | r2 r2| r2 r2               n2 @4
 row 3  r3 ...     | r3 r3|                     n3 @6
         main part | major| minor (dropped)
```

- **Main part** (columns N..2N-1): becomes the output.
- **Major truncated part** (columns N-W..N-1): summed with the main part, then
  dropped after compensation.
- **Minor truncated part** (columns below N-W): never built. Its carries are
  what the ACF estimates.

Each row is sign-extended arithmetically. The kept bits are summed with an
ordinary adder expression, and the synthesis tool builds the reduction tree.

## The carry estimate

### Column mapping

`cout1` enters the lowest kept column (N-W), `cout2` the next column up, and so
on. For W = 2 this places `cout3` in column N, the LSB of the result. For W = 3
it places `cout4` there. In terms of value, the compensation adds
`cout * 2^(N-W)` before the result is cut at column N.

### Base carries per variant

| W | ACF-1 | ACF-2 | ACF-3 |
|---|---|---|---|
| 1 | 001 | 010 | 011 |
| 2 | 010 | 011 | 100 |
| 3 | 100 | 101 | 110 |

ACF-1 is the most accurate variant and the default. ACF-2 and ACF-3 each add
one more unit to the base. Because their ideal carries are almost always zero,
their compensation logic is smaller.

### Ideal carries

`c1(B)` and `c2(B)` come from an exhaustive search. For each multiplier value B
and each candidate pair (c2, c1) in {00, 01, 10, 11}:

1. Form the fixed-width product P_f of this datapath for all 2^N multiplicands
   A.
2. Sum |P_f * 2^N - A * B| over all A.

The pair with the smallest sum is chosen. On a tie, the smaller {c2, c1} wins.

The result is a truth table with 2^N entries per function. `acf_pkg` stores it
as a bit vector indexed by B read as an unsigned number. `acf_ideal_carry`
reads it with `TABLE[b]`, and synthesis reduces that lookup to two-level
logic. The tables are built in for N = 8 and N = 10, for every W in 1..3 and
every variant.

Some properties of the built-in tables:
- At N = 8, W = 2, ACF-1, c2 is 0 for every B.
- In that same configuration, c1 depends only on b[5:0]. The 256-entry table
  repeats every 64 entries.
- For most ACF-2 and ACF-3 configurations, both functions are constant 0.

`tb_acf_ideal_carry` repeats the search on its own and checks every table entry
it covers.

## Modules

| module | role |
|---|---|
| `acf_pkg` | variant enum, Booth-select struct, base carries, built-in ideal-carry tables |
| `booth_encoder` | triplet -> {neg, one, two} |
| `booth_pp_row` | one N+1 bit row plus n_i |
| `fw_trunc_array` | N/2 encoders and rows; sums columns N-W and up; output `kept[N+W-1:0]` (bit 0 = column N-W) |
| `acf_ideal_carry` | c1(B), c2(B) by table lookup |
| `acf_base_adder` | {0,c2,c1} + base -> cout[3:0] |
| `acf_comp_adder` | kept + cout, then drop the W low bits -> p |
| `acf_booth_multiplier` | top: wires the four stages together |

### Top-level interface

| port | dir | width | meaning |
|---|---|---|---|
| `a` | in | N | multiplicand, two's complement |
| `b` | in | N | multiplier, two's complement |
| `p` | out | N | fixed-width product; p * 2^N approximates a * b |

| parameter | default | meaning |
|---|---|---|
| `N` | 8 | operand and result width (even) |
| `W` | 2 | truncated columns kept (1..3; the base carries exist only for these values) |
| `METHOD` | `acf_pkg::ACF1` | ACF-1, ACF-2 or ACF-3 |
| `EXTERNAL_TABLE` | 0 | set to 1 when you pass your own tables |
| `C1_TABLE`, `C2_TABLE` | built-in | 2^N-bit truth tables of c1 and c2 |

For N other than 8 or 10, set `EXTERNAL_TABLE = 1` and pass both tables.
Otherwise elaboration stops with an error. Generate the tables with the search
described above. The function `acf_ref_pkg::best_carry` in `tb/` implements
that search. `tb_acf_external_table` shows how to call it from a constant
function and pass the result in as a parameter. It is practical up to about N = 12: the search costs 4 * 2^(2N)
products. At N = 16 a table has 65536 entries per function.

The result does not saturate. For N = 8 and N = 10 the largest product leaves
enough headroom that the compensation cannot overflow.

## Accuracy

The table below was measured exhaustively by `tb_acf_accuracy`. Errors are in
LSBs of the N-bit result.

| N | W | variant | mean error | max abs error | mean abs error | published mean abs error |
|---|---|---|---|---|---|---|
| 8 | 1 | ACF-1 | -0.0078 | 1.1680 | 0.2989 | 0.2989 |
| 8 | 2 | ACF-1 | -0.0049 | 0.7500 | 0.2592 | 0.2592 |
| 8 | 3 | ACF-1 | -0.0020 | 0.6250 | 0.2514 | 0.2514 |
| 8 | 1/2/3 | ACF-2 | | | 0.3244 / 0.2717 / 0.2550 | 0.3144 / 0.2673 / 0.2538 |
| 8 | 1/2/3 | ACF-3 | | | 0.5501 / 0.3845 / 0.2821 | 0.3397 / 0.2695 / 0.2542 |
| 10 | 1/2/3 | ACF-1 | | | 0.3154 / 0.2640 / 0.2529 | same |
| 10 | 1/2/3 | ACF-2 | | | 0.3236 / 0.2684 / 0.2542 | same |
| 10 | 1/2/3 | ACF-3 | | | 0.4501 / 0.3348 / 0.2713 | 0.3428 / 0.2705 / 0.2555 |

ACF-1 at N = 8 and N = 10, and ACF-2 at N = 10, reproduce the published
mean-absolute-error figures to four decimals. That is strong evidence that the
array layout, the column mapping and the search criterion match the original
method.

ACF-3 and ACF-2 at N = 8 do not match. With their base carries and this
datapath, no choice of non-negative c1 and c2 reaches the published figures.
No other rule for deriving those variants is available, so this implementation
applies the same search to all three variants. Treat ACF-2 and ACF-3 as less
certain than ACF-1.

The published maximum errors (for example 0.70 at N = 8, W = 2) also differ
from the values measured here (0.75).

## What follows the original method, and what is this implementation's choice

**Follows the original method:**
- the Booth recoding table
- the partial-product row layout, including the inverted rows and the separate
  n_i bit
- the split into main, major and minor parts
- the base-carry table
- the sum `{0,c2,c1} + base`
- the carry-to-column mapping
- the rule that c1 and c2 depend on B only and are chosen to minimise the
  summed absolute error

**Chosen here:**
- how ties in the search are broken
- that the ideal-carry logic is a table lookup rather than hand-minimised
  gates
- arithmetic sign extension of the rows
- the adder-expression reduction instead of a specific compressor tree
- a purely combinational unit without pipeline registers
- wrap-around on overflow
- built-in tables for N = 8 and 10 only

The original method was evaluated up to N = 16, and also on 16-bit image edge
detection. Neither is runnable here without supplying N = 12..16 tables.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
Build and run one with plain Verilator:

```
verilator --binary --timing -y rtl -y tb --top-module tb_acf_booth_multiplier \
    rtl/acf_pkg.sv tb/acf_ref_pkg.sv tb/tb_acf_booth_multiplier.sv
./obj_dir/Vtb_acf_booth_multiplier
```

Replace the testbench name to run another one.

| testbench | what it checks |
|---|---|
| `tb_booth_encoder` | all eight triplets |
| `tb_booth_pp_row` | every A with every digit: row + n_i = digit * A |
| `tb_fw_trunc_array` | every (A, B) at N = 8 for W = 1, 2, 3; random pairs at N = 10 |
| `tb_acf_ideal_carry` | every table entry at N = 8 and N = 10, all nine configurations each, against a fresh search |
| `tb_acf_base_adder` | all nine base values, all four (c2, c1) |
| `tb_acf_comp_adder` | every kept value and compensation word, W = 1 and 3 |
| `tb_acf_booth_multiplier` | default configuration end to end, all 65536 pairs (see below) |
| `tb_acf_accuracy` | the accuracy table above, 18 configurations, exhaustive |
| `tb_acf_external_table` | N = 6 with tables computed by a constant function and passed in (`EXTERNAL_TABLE = 1`), all pairs |

`tb_acf_booth_multiplier` compares every result with an arithmetic model. It
checks the error statistics, and it counts that each Booth digit, the 111 code,
a kept n_i bit, both values of c1, and both "compensation changed the result"
and "compensation did not change it" all occur. Every run takes well under a
second.

`tb/acf_ref_pkg.sv` is the reference model. It works on integer values (digit
* A, floor shifts) rather than on bit patterns, so it checks the RTL rather
than repeating it.
