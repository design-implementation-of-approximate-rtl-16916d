# Approximate 16 x 16 Dadda multiplier built on modified 7:2 compressors

This is an unsigned 16-bit by 16-bit multiplier that trades a small, one-sided
error for a shallower partial-product tree. The first thing it does with the
sixteen partial-product rows is squeeze them seven at a time through a row of
**7:2 compressors**. A compressor takes seven bits of one column plus two
carries from the column below and returns one sum bit and three carry bits.
Two such compressor rows turn sixteen rows into six. A short Dadda tree of
full and half adders then takes the six rows down to two, and a ripple-carry
adder produces the 32-bit product.

The 7:2 compressor is not the exact five-full-adder circuit. It is a
cheaper, **modified** one made of two 4:2 compressors, two full adders and
one half adder. Nine input bits cannot be counted exactly into one sum bit
and three carry bits (at most 1 + 2 + 2 + 2 = 7), so the count is exact only
up to three 1s and falls short above that. The multiplier is therefore
approximate:

| measure (random 16-bit operands) | value |
|---|---|
| mean relative error | 0.63 % |
| products that differ from a*b | about 53 % |
| direction of the error | y is never larger than a*b |
| worst relative error seen | about 34 % (small products with dense bits) |
| exact cases | one operand a power of two or zero; any product in which no compressor column sees four or more 1s |

The design is purely combinational. There is no clock, and the only ports are
`a[15:0]`, `b[15:0]` and `y[31:0]`.

## The modified 7:2 compressor (`compressor_7_2`)

This block is the heart of the design and the least obvious part.

```
 x1 x2 x3 x4 cin1          x5 x6 x7 (0) cin2
 +--------------+          +--------------+
 |  4:2 (left)  |          |  4:2 (right) |
 +--------------+          +--------------+
   ls   lc   lo              rs   rc   ro
   |    |    +------+  +------|----|----+
   |    |           HA(lo,ro) |    |
   |    |           |     +-> cout2 (HA sum)
   |    |           | carry
   |    +---- FA_upper(lc, rc, ha_carry) ----> cout1 (FA sum)
   |                  | carry
   +--- FA_lower(ls, rs, upper_carry) ----> sum, carry
```

Each 4:2 compressor (`compressor_4_2`) is the exact two-full-adder kind. The
first adder counts A1..A3, and its carry leaves as `cout`. Its sum is added to
A4 and `cin` by the second adder, which gives `sum` and `carry`. So
A1+A2+A3+A4+cin = sum + 2(carry + cout), and `cout` never depends on `cin`.
The right-hand 4:2 compressor has only three data inputs, so its A4 is tied
to 0.

The outputs are combined as follows:

* Both 4:2 `cout` bits go into the half adder. Its sum is `cout2`, and its
  carry goes to the upper full adder.
* Both 4:2 `carry` bits go into the upper full adder, together with the
  half-adder carry. The upper adder's sum is `cout1`, and its carry goes to the
  lower full adder.
* Both 4:2 `sum` bits go into the lower full adder, together with the
  upper-adder carry. The lower adder gives the compressor's `sum` and `carry`.

How the outputs are read: `sum` has weight 1, and `carry`, `cout1` and `cout2`
each have weight 2. In a compressor row, `cout1`/`cout2` of column c feed
`cin1`/`cin2` of column c+1. `carry` becomes a bit of the carry row at column
c+1.

The connections are where this block's behaviour comes from. The published
block diagram fixes which adder feeds which, but it does not label which
output port each wire leaves from. The attachment used here is the one
described above. It treats both 4:2 compressors the same way and is among the
lowest-error attachments that fit the diagram:

* 186 of the 512 input patterns are miscounted.
* The worst shortfall is 5.
* No pattern is over-counted.
* Every pattern with three or fewer 1s is exact.

`tb_compressor_7_2` checks all of these properties exhaustively.

One consequence: `cout1` depends on `cin1` and `cin2` through the 4:2
compressors' `carry` outputs. A row of these compressors therefore has a
carry chain running from column 0 upward. It is not a constant-depth row like
a row of exact 4:2 compressors. The result is still correct logic with no
loops, but the row's delay grows with its width.

## Organisation of the multiplier (`dadda72_mult16`)

```
 a,b -> pp_generator (16 rows, pp[i][j] = a[j] & b[i])
          rows 0-6   -> compressor_7_2_row -> sum row, carry row --+
          rows 7-13  -> compressor_7_2_row -> sum row, carry row --+--> dadda_reducer
          rows 14,15 ------------------------------------------------+   (6 -> 4 -> 3 -> 2)
                                                                        -> ripple_carry_adder -> y
```

* **Partial products.** `pp_generator` is a 16 x 16 AND array. Row i is `a`
  gated by `b[i]` and weighted 2^i.
* **Compressor rows.** The rows are grouped 7 + 7 + 2.
  `compressor_7_2_row` places one 7:2 compressor in each of the 32 columns
  of a group. The carry inputs of column 0 are 0. Carries out of column 31 are
  dropped, because the product is taken modulo 2^32. Columns whose inputs are
  all zero still hold a compressor in the RTL, because carries ripple into
  them. Synthesis removes whatever is constant.
* **Dadda tree.** Six rows remain: two sum rows, two carry rows and
  partial-product rows 14 and 15. Their shape is passed to `dadda_reducer` as
  a bit mask, so no adder is spent on bits known to be zero. The height
  limits of a Dadda tree are 2, 3, 4, 6, 9, 13, ... (each is 1.5 times the
  previous one, rounded down). For a tallest column of 6, three stages follow,
  with limits 4, 3 and 2. In each stage, a column of height h that receives k
  carries from below and must end at limit d gets e = h + k - d excess bits
  removed. This takes e/2 full adders, plus one half adder when e is odd. All
  counts and wire positions are worked out at elaboration time by constant
  functions in the module. Nothing is tabulated by hand. The tree is exact.
  Given the 16 x 16 parallelogram directly, the same module builds the full
  six-stage Dadda tree (13, 9, 6, 4, 3, 2), and its testbench checks that.
* **Final adder.** `ripple_carry_adder` is a chain of 32 full adders.

The two compressor rows do the work that stages 16 -> 13 -> 9 -> 6 do in a
plain Dadda multiplier. The stages that remain are the last three of the
plain tree.

## Where this RTL departs from, or fills in, the original description

* **Compressor port attachment.** The block diagram gives the blocks and the
  wires between them, but not the output port each wire uses. The choice made
  here is explained above. A different attachment gives a different, usually
  larger, error.
* **Output weights.** `sum` has weight 1 and the three carries weight 2. This
  follows the description "one sum and three carries" and is what makes the
  compressor approximate.
* **Row grouping.** The construction steps are described only loosely: rows
  are organised into "three levels" of different size, and a 7:2 compressor
  forms sum and carry per row. This RTL reads them as the 7 + 7 + 2 grouping.
  A step that splits the operands into four 4-bit groups gives no buildable
  structure beyond the AND array, and it is not modelled.
* **Dadda placement rule.** The classic Dadda rule is used, where each column
  gets just enough adders to reach the stage limit. The description also
  quotes a modulo-3 half-adder rule, which belongs to a different reduction
  style. The classic rule reproduces the stage counts and heights that are
  given (6 stages for 16 bits: 13, 9, 6, 4, 3, 2).
* **No output register.** The flow chart ends in an output register, but the
  reported implementation uses exactly 64 I/O pins (16 + 16 + 32), which
  leaves none for a clock. The multiplier here is combinational. To register
  the product, put a 32-bit register on `y` outside the module.
* **Final adder type.** A ripple-carry adder was chosen, as the critical paths
  reported for the implementation show a chain of full-adder carry cells.
* **Operand roles.** `a` and `b` are interchangeable for an exact multiplier,
  but not here. Row i of the partial-product array is `a` gated by `b[i]`, so
  the error pattern depends on which operand is which.
* **Not included.** The 4:2- and 5:2-compressor multipliers and the exact
  five-full-adder 7:2 compressor are only comparison points. They are not part
  of this design.

## Files

| file | module | role |
|---|---|---|
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | cells | 3:2 and 2:2 counters |
| `rtl/compressor_4_2.sv` | `compressor_4_2` | exact 4:2 compressor, two full adders |
| `rtl/compressor_7_2.sv` | `compressor_7_2` | modified approximate 7:2 compressor |
| `rtl/compressor_7_2_row.sv` | `compressor_7_2_row` | 7 rows -> sum row + carry row, parameter `W` |
| `rtl/pp_generator.sv` | `pp_generator` | AND array, parameter `N` |
| `rtl/dadda_reducer.sv` | `dadda_reducer` | generic Dadda tree, parameters `W`, `ROWS`, `ROW_MASK` |
| `rtl/ripple_carry_adder.sv` | `ripple_carry_adder` | final adder, parameter `W` |
| `rtl/dadda72_mult16.sv` | `dadda72_mult16` | top, parameter `N` (default 16) |
| `tb/c72_model_pkg.sv` | package | count-level reference models used by the testbenches |
| `tb/tb_*.sv` | | one self-checking testbench per module |

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. Each
also has a time-out that counts as a failure.

* Cells and the 4:2 compressor are checked exhaustively against the
  arithmetic identity. For the 4:2 compressor, the test also checks that
  `cout` does not depend on `cin`.
* The 7:2 compressor is checked exhaustively against a count-level model, with
  the error properties listed above.
* The compressor row is checked against the row model on random dense rows.
  On sparse rows it is also checked against exact addition.
* The Dadda reducer is checked for an exact sum on random 6-row matrices and
  on the 16 x 16 partial-product matrix. The test also checks the stage
  counts, 3 and 6.
* `tb_dadda72_mult16` runs the top at its default size. It applies about
  20,000 random products and a set of products known to be exact, including
  15 x 10 = 150.
  * Every product must match the count-level model. That model adds the
    compressor rows' outputs with plain integer addition, so it does not
    depend on the Dadda tree or the final adder.
  * y must never exceed a*b.
  * The mean relative error must stay below 2 %.
  * Exact products, approximate products and a carry across bit 16 of the
    final adder must each occur.

To run one testbench with Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    tb/c72_model_pkg.sv tb/tb_dadda72_mult16.sv --top-module tb_dadda72_mult16
./obj_dir/Vtb_dadda72_mult16
```

Replace the testbench name to run another one. For a lint pass on the top:
`verilator --lint-only -Wall -Irtl rtl/dadda72_mult16.sv`. The only remaining
lint messages are unused-signal notes: carries dropped above the top column,
and the upper bits of integer arguments of the elaboration-time functions.

## Changing it

* `N` on `dadda72_mult16` sets the operand width. Grouping into sevens, the
  row mask and the number of Dadda stages all follow from it. The model
  package's `mult_model(a, b, n)` gives the expected product for any n up to
  32, so the top-level testbench can be adapted to another width.
* To try another compressor wiring, edit the five instance connections in
  `compressor_7_2.sv`, and update the `c72_model` function and the expected
  pattern counts in `tb_compressor_7_2.sv`.
* An exact multiplier cannot be had by swapping the compressor alone: nine
  bits need a carry output of weight 4, which the row wiring does not have.
  The Dadda reducer, on the other hand, is exact for any mask; given the full
  partial-product parallelogram it forms a plain Dadda multiplier (see its
  testbench).
