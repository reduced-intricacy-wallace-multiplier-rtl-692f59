# Reduced-complexity Wallace multiplier with hybrid full adders

This is an unsigned N x N → 2N-bit combinational multiplier. It is a
Wallace tree in which half adders are used only where they cannot be avoided,
and every full adder is an "energy-efficient hybrid" cell. That cell builds
sum and carry from an XOR/XNOR pair and two 2:1 multiplexers instead of from
sum-of-products logic. The tree needs the same number of stages as a standard
Wallace tree, but far fewer half adders. At the default width of 8 bits it
uses 39 full adders and 3 half adders in 4 stages.

The width is one parameter, `N` (2 to 64). The reduction tree is not
hand-wired. It is computed at elaboration time from `N` by constant functions
in `rcwm_pkg`, and the modules only instantiate what that plan says.

## The datapath

```
 a[N-1:0] ─┐
           ├─ rcwm_pp_gen ── pp[N][N] ── rcwm_reduction ── row0, row1 ── rcwm_cpa ── p[2N-1:0]
 b[N-1:0] ─┘   (N² ANDs)                (RCW tree of            (final ripple
                                          eehcfa_full_adder +      adder)
                                          rcwm_half_adder)
```

1. **Partial products** (`rcwm_pp_gen`). `pp[i][j] = a[j] & b[i]` has
   weight 2^(i+j). The matrix is regrouped by weight into 2N columns. Column c
   starts with `min(c, 2N-2-c) + 1` bits, and the top column is empty.
2. **Reduction** (`rcwm_reduction`). This compresses the columns until no
   column holds more than two bits.
3. **Final addition** (`rcwm_cpa`). This adds the two remaining rows.

There is no clock, register or reset. The product is valid one combinational
delay after the operands change.

## How the reduction tree is planned

This is the part that takes the most care, and it lives in
`rcwm_pkg::make_plan`.

**Stage count.** A standard Wallace stage takes the rows in groups of three
and turns each group into two rows. The row count therefore goes
`r → 2·⌊r/3⌋ + (r mod 3)`. For N = 8 that is 8 → 6 → 4 → 3 → 2, which is
four stages. The reduced-complexity tree uses exactly these row counts as its
per-stage height limits, so it never needs more stages than the standard tree.

**Per-column rule.** Columns are handled from the least significant one
upward, because the carries coming from column c-1 add to the height of
column c. In each stage, for a column of height h:

* every group of three bits goes into a full adder (⌊h/3⌋ of them);
* a leftover single bit is passed on unchanged;
* a leftover pair is normally **passed on unchanged as well**. This is the
  difference from a standard Wallace tree, which would put a half adder on
  every leftover pair. A half adder does not reduce the bit count: two bits
  in give two bits out.
* A half adder is placed on the pair only if passing it would make the
  column taller than the row limit of the next stage. A half adder turns the
  pair into one bit here and one carry in the next column, which lowers this
  column by one.

The resulting height of a column is
`⌊h/3⌋ + (h mod 3) + (carries from c-1) − (half adder ? 1 : 0)`.
After the last stage every column is at most two bits high. An elaboration
`$error` fires if a plan ever breaks this.

**Bit order.** Inside a column, the output of a stage is ordered as full-adder
sums, then half-adder sums, then passed bits, then carries from column c-1.
The plan stores, for each stage and column, the height, the number of full and
half adders, and the slot where incoming carries start (`cb`). The generate
loops in `rcwm_reduction` wire the adders from these numbers. Unused slots are
tied to 0.

Carries out of the top column (weight 2^2N) are always 0, because the product
fits in 2N bits. They are left unconnected.

**Resulting sizes.** These are from the plan. `tb_rcwm_table1` checks them
at every width in the table.

| N  | stages | full adders | half adders | final-adder FA / HA |
|----|--------|-------------|-------------|---------------------|
| 4  | 2      | 5           | 1           | 3 / 3               |
| 8  | 4      | 39          | 3           | 9 / 5               |
| 16 | 6      | 201         | 9           | 23 / 7              |
| 24 | 7      | 490         | 16          | 38 / 8              |
| 32 | 8      | 907         | 23          | 53 / 9              |
| 64 | 10     | 3853        | 53          | 115 / 11            |

For N = 8 the four stages hold 16, 11, 7 and 5 full adders. They hold 0, 1, 0
and 2 half adders; the half adders sit in column 8 of stage 2 and in columns
6 and 7 of stage 4.

## The hybrid full adder

`eehcfa_full_adder` is built from three cells:

* `eehcfa_xor_xnor` gives `x = a ^ b` and `xn = ~(a ^ b)` together. On
  silicon this is a double-pass-transistor-logic gate, which gives both rails
  with full swing.
* Sum multiplexer (`eehcfa_mux2`), selected by the carry input:
  `sum = c ? xn : x`.
* Carry multiplexer, selected by the intermediate XOR signal:
  `cout = x ? c : a`. When a = b the carry equals them; otherwise it is the
  incoming carry.

Each multiplexer is a pair of transmission gates on silicon. In RTL, all
three cells are their Boolean functions. The transistor-level properties are
voltage swing, drive strength, power and the area/delay advantage, and RTL
does not describe them. Synthesis will map these cells to whatever the target
library offers.

## The final adder

After the reduction, the low columns of the two-row result hold a single bit,
and the upper columns hold two. `rcwm_cpa` picks each column's cell from the
plan:

* one row bit plus an incoming carry, or two row bits with no carry: a half
  adder;
* two row bits plus a carry: a hybrid full adder;
* one input only: a wire.

The result is a ripple of half adders over the low columns, followed by a
ripple of hybrid full adders. For N = 8 that is 5 half adders (columns 1 to 5)
and 9 full adders (columns 6 to 14). `rcwm_cpa` relies on the reduction's
guarantee that row bits beyond a column's height are 0. It does not read
them.

## Files

| file | contents |
|------|----------|
| `rtl/rcwm_pkg.sv` | plan types and constant functions: `num_stages`, `make_plan`, `total_fa`, `total_ha`, `cpa_carry_mask` |
| `rtl/rcwm_multiplier.sv` | top: `a`, `b` (N bits) → `p` (2N bits) |
| `rtl/rcwm_pp_gen.sv` | AND array |
| `rtl/rcwm_reduction.sv` | planned reduction tree |
| `rtl/rcwm_cpa.sv` | final adder |
| `rtl/eehcfa_full_adder.sv`, `eehcfa_xor_xnor.sv`, `eehcfa_mux2.sv` | hybrid full adder and its two cells |
| `rtl/rcwm_half_adder.sv` | half adder |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_rcwm_table1.sv`, `tb/rcwm_size_probe.sv` | builds N = 4, 8, 16, 24, 32, 64 and checks sizes and products |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
The package must come first on the command line:

```
verilator --binary --timing -Irtl -Itb rtl/rcwm_pkg.sv tb/tb_rcwm_multiplier.sv \
          --top-module tb_rcwm_multiplier -o sim
./obj_dir/sim
```

The testbenches:

* **`tb_rcwm_multiplier`** runs all 65 536 operand pairs at the default 8
  bits and compares each product with `a*b`. It also counts how often each
  of these situations occurs, and fails if one never does:
  * a zero operand;
  * all-ones operands;
  * a product with the top bit set;
  * a carry rippling through at least N columns of the final adder;
  * a carry out of each of the three half adders in the tree;
  * a carry out of the half-adder part and of the full-adder part of the
    final adder.
* **`tb_rcwm_reduction`** feeds random partial-product matrices, not only
  those of real products, to an 8-bit and a 4-bit tree. It checks that the two
  output rows keep the weighted sum.
* **`tb_rcwm_cpa`** checks the final adder with inputs shaped like the
  reduction's output.
* **The cell testbenches** are exhaustive.
* **`tb_rcwm_table1`** builds the multiplier at six widths. It checks that
  stages and adder counts equal the table above, and runs 2 000 random and 4
  corner-case products per width. Its 64-bit instance makes the Verilator
  build take a few minutes.

## Where the design makes its own choices

* **Default width.** The default is 8 bits, the smallest of the widths the
  design was sized for (8, 16, 24, 32 and 64 bits). Any width from 2 to 64
  works through `N`. To go wider, raise `MAX_N` (and `MAX_ST` if more stages
  are needed) in `rcwm_pkg`.
* **Operands.** Unsigned only; no signed mode is provided.
* **Timing.** Fully combinational; pipelining is left to the user.
* **Carry multiplexer select.** The carry multiplexer is selected by the XOR
  signal. A related scheme drives both multiplexers from the carry input, with
  `cout = c ? (a|b) : (a&b)`. The two give the same function, but this design
  uses the XOR-selected form.
* **Half-adder placement.** The placement is the per-column rule above. It
  reproduces the published stage and adder counts for 8 to 64 bits exactly. A
  description of the 4-bit case as "half adders in stage 1, full adders in
  stage 2" is not followed. This tree puts 3 full adders in stage 1 and
  2 full adders plus 1 half adder in stage 2.
* **Final adder.** It is a plain ripple of half adders and hybrid full
  adders, with no faster carry scheme on the upper columns. It is the longest
  path of the design.
* **Not modelled.** Gate counts, area, power and delay figures are properties
  of the transistor-level cells and cannot be checked in RTL.
