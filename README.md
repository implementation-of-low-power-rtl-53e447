# Baugh-Wooley signed array multipliers (5 x 5 bit)

Multiplying two's complement numbers in an array is awkward because the sign
bit of each operand has negative weight (-2^(N-1)). Some of the partial
products are therefore negative, and a plain array of full adders, which only
adds positive bits, cannot sum them. The Baugh-Wooley method rewrites the
partial product matrix so that every entry is a positively weighted bit. A few
entries are complemented and a few constant 1s are added. The whole product
can then be formed by one regular array of identical full adder cells.

This RTL implements two variants for N-bit operands, with N = 5 by default
(10-bit product):

* **Modified Baugh-Wooley** (`mbw_multiplier`): the main design.
  The negatively weighted products are replaced by their complements (NAND
  terms), and two constant 1s are added.
* **Conventional Baugh-Wooley** (`bw_multiplier`): the original form. The
  sign bits and their complements appear as extra matrix entries. Its
  middle column is two entries taller.

Both are combinational: there is no clock and no reset, and the product
follows the operands after the array delay.

## The bit matrices

Write `a` for the multiplicand and `b` for the multiplier. `a_i` and `b_j`
are their bits, and `a_{N-1}` and `b_{N-1}` are the sign bits. Row `j` of the
matrix belongs to multiplier bit `b_j` and starts at column `j`.

### Modified form

| entry                     | condition              | column  |
|---------------------------|------------------------|---------|
| `a_i & b_j`               | i < N-1, j < N-1       | i+j     |
| `~(a_{N-1} & b_j)`        | j < N-1                | N-1+j   |
| `~(a_i & b_{N-1})`        | i < N-1                | i+N-1   |
| `a_{N-1} & b_{N-1}`       |                        | 2N-2    |
| constant 1                |                        | N       |
| constant 1                |                        | 2N-1    |

For N = 5 the last row is `~a0b4 ~a1b4 ~a2b4 ~a3b4 a4b4` in columns 4 to 8.
The constant 1s sit under p5 and p9.

Why it works: the sign row of `a` contributes `-2^(N-1) * (a_{N-1} * B_low)`,
where `B_low` is the lower N-1 bits of `b`. For an (N-1)-bit value X, `-X`
equals `~X + 1 - 2^(N-1)`. So each negative row becomes its complement, plus
1 at column N-1, minus 2^(2N-2). There are two such rows:

* The two 1s at column N-1 combine into one 1 at column N.
* The two -2^(2N-2) terms make -2^(2N-1). Modulo 2^(2N) that is the same as
  +2^(2N-1), the 1 in the top column.

The product is read modulo 2^(2N), so carries out of the top column are
dropped.

### Conventional form

| entry                     | condition              | column  |
|---------------------------|------------------------|---------|
| `a_i & b_j`               | i < N-1, j < N-1       | i+j     |
| `a_{N-1} & ~b_j`          | j < N-1                | N-1+j   |
| `~a_i & b_{N-1}`          | i < N-1                | i+N-1   |
| `a_{N-1} & b_{N-1}`       |                        | 2N-2    |
| `a_{N-1}`, `b_{N-1}`      | extra rows             | N-1     |
| `~a_{N-1}`, `~b_{N-1}`    | extra rows             | 2N-2    |
| constant 1                | extra row              | 2N-1    |

Here the sign bit selects whether the complemented operand is added. Column
N-1 holds N + 2 entries, which is 7 at N = 5. The modified form's tallest
column holds N entries. This extra height is what makes the conventional array
slower.

Worked example (N = 5, -12 x -6): a = 10100 and b = 11010. The rows are:

```
row 0 (b0=0):         1 0 0 0 0        a4&~b0 = 1, the rest 0
row 1 (b1=1):       0 0 1 0 0 .
row 2 (b2=0):     1 0 0 0 0 . .
row 3 (b3=1):   0 0 1 0 0 . . .
row 4 (b4=1): 1 1 0 1 1 . . . .        a4b4, then ~a_i & b4
extra rows:   ~a4 = 0 and a4 = 1; 1, ~b4 = 0 and b4 = 1 (columns 8/4 and 9/8/4)
sum mod 2^10: 0001001000 = +72
```

## Summing the matrix

The matrix becomes a stack of 2N-bit rows, each bit at its binary weight.
Two shared blocks then reduce it, and both are built only from the
`full_adder` cell:

1. `csa_array` is a linear carry-save array. Its first row of full adders
   adds matrix rows 0, 1 and 2. Each later row adds the next matrix row to
   the running sum and the running carry, which is moved up one column. With
   R matrix rows there are R - 2 full adder rows:
   * modified form: R = N + 1, so 4 rows at N = 5;
   * conventional form: R = N + 2, so 5 rows at N = 5.
2. `ripple_carry_adder` adds the final sum and carry vectors with a chain of
   full adders. The critical path runs from a low operand bit, through the
   carry-save rows and along this chain, to the upper product bits.

Every carry-save row is 2N bits wide, even where a bit is always 0. This
keeps the generate loops the same for any N, and synthesis removes the
constant cells. For N = 5, after synthesis, the modified multiplier has about
15% fewer cells than the conventional one (156 against 181 word-level cells).

## Modules

| file                        | role |
|-----------------------------|------|
| `rtl/bw_pkg.sv`             | `MULT_N = 5`, the default operand width |
| `rtl/full_adder.sv`         | full adder cell with three positive-weight inputs |
| `rtl/csa_array.sv`          | carry-save reduction, parameters `W` (width) and `ROWS` |
| `rtl/ripple_carry_adder.sv` | final carry-propagate adder, parameter `W` |
| `rtl/mbw_multiplier.sv`     | modified Baugh-Wooley multiplier, parameter `N` |
| `rtl/bw_multiplier.sv`      | conventional Baugh-Wooley multiplier, parameter `N` |
| `rtl/multiplier5bit.sv`     | top level: both multipliers side by side |

Ports of the top `multiplier5bit` (default N = 5):

| port              | dir | width | meaning |
|-------------------|-----|-------|---------|
| `x`, `y`          | in  | N     | operands of the modified multiplier |
| `p`               | out | 2N    | their two's complement product |
| `bw_x`, `bw_y`    | in  | N     | operands of the conventional multiplier |
| `bw_p`            | out | 2N    | their product |

The two multipliers share nothing. To use only the modified multiplier,
instantiate `mbw_multiplier` directly.

The multipliers are correct for any N >= 2. They are simulated at N = 4, 5
and 8.

## Verification

Each testbench checks its block against products computed directly from
signed integers. Each one prints `TB_RESULT checks=... failures=...` and
stops itself with a watchdog if it hangs.

* `tb_full_adder`: all 8 input combinations.
* `tb_ripple_carry_adder`: carry-chain corner cases and random operands at
  10 bits, and every input at 4 bits.
* `tb_csa_array`: 6-row and 7-row arrays with single-bit, all-ones and
  random rows. It checks that sum + carry equals the sum of the rows.
* `tb_mbw_multiplier`, `tb_bw_multiplier`:
  * every operand pair at N = 5 and at N = 4;
  * extreme and random pairs at N = 8;
  * the four signed cases of 12 x 6.
* `tb_multiplier5bit`: the top at default size.
  * Every operand pair, on both multipliers at once with different operands.
  * Then the same operands on both, which must give the same product.
  * It counts every operand sign class, -16 x -16 (= 256, the only product
    that reaches bit 8) and a zero operand. A class that never occurs counts
    as a failure.
* `tb_vector_check`: a report per output bit of matched zeros, matched ones
  and errors. It covers four vector sets grouped by operand signs, with all
  256 pairs in each set. In the negative x negative set, `p[9]` is never 1,
  because the product is always positive.

To simulate with Verilator, for example the top-level test:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/bw_pkg.sv tb/tb_multiplier5bit.sv --top-module tb_multiplier5bit
./obj_dir/Vtb_multiplier5bit
```

## How this design relates to the published one

The following follow the published design:

* the two bit matrices;
* the 5-bit operand width;
* the port names `x`, `y` and `p` of the 5-bit cell;
* the rule that the array uses only full adder cells with positive-weight
  inputs.

The published circuit was a full-custom transistor-level layout, so these
parts are this design's own choices:

* **The summing network.** Only the matrices and the use of full adder cells
  are given. The linear carry-save array and the ripple-carry final adder are
  a plain way to sum them. A published timing path does run through a long
  chain of full adders to p[8], which fits this structure. Half adder cells,
  which appear on that path, are not used: a full adder with one input at 0
  does the same job.
* **Extra rows of the conventional form.** Their columns are inferred from
  the worked examples. The result is exact for every 5-bit operand pair.
* **No register stage.** The published figure of about 160 MHz is the
  inverse of a 6.2 ns input-to-output delay through combinational logic, not
  a register stage.

Not included:

* The conventional (non-Baugh-Wooley) array multiplier, which appears only as a
  point of comparison.
* Power, area and delay figures. These depend on the cell library and the
  layout, and are outside the RTL.
