# Time-precision flexible arithmetic unit

Some real-time systems would rather have a rough answer on time than an exact
one too late. A guidance loop for a fast-moving object is one example: the
faster the object moves, the less time there is between sensor readings. This
arithmetic unit adds and multiplies unsigned fixed-point numbers, and for each
operation it lets the application choose how much of the work is done. Doing
less work gives a shorter combinational path and a result with fewer correct
bits. Every precision level is a separate, fixed path through the logic, so
the delay for a given choice is known in advance.

The unit never computes block sums or block products with gates. It looks them
up in precalculated tables. Each operand is cut into blocks of K bits, and one
table access returns the sum, or the product, of every pair of blocks at once.
After that, the only logic left is *combining* those partial results. The
precision knob decides how far that combining goes.

Default configuration: 32-bit operands in four 8-bit blocks (M = 32, K = 8,
N = 4).

## Precision levels at a glance

| stages | multiplier path                                   | rows reduced | adder tree levels | adder path              |
|-------:|---------------------------------------------------|-------------:|------------------:|-------------------------|
| 4      | LUT, 4 CSA levels, final adder, 2 muxes (exact)    | 7            | 2 (exact)         | LUT, 2 x and-or, mux    |
| 3      | LUT, 3 CSA levels, final adder, 2 muxes            | 5            | 2 (exact)         | LUT, 2 x and-or, mux    |
| 2      | LUT, 1 CSA level, final adder, 2 muxes             | 3            | 1                 | LUT, and-or, mux        |
| 1      | LUT, mux (top block product only)                  | 1            | 0                 | LUT, mux                |

The operation control maps an application condition to a stage count. In this
design the condition is an 8-bit speed code, and the speed bands are
[0,32) → 4, [32,64) → 3, [64,96) → 2, and 96 and above → 1. The adder uses
`min(ceil(log2 N), stages − 1)` tree levels. That mapping is this design's
choice: it keeps the addition exact whenever the multiplication keeps three or
more product diagonals, so the adder never limits the precision.

## The tables

`tpfau_lut_adder` is the *compound* LUT-adder. Each word, addressed by
`{a_block, b_block}`, holds two values, each K+1 bits wide with the carry on
top:

- `a + b`
- `a + b + 1`

Carry-select addition needs both values for every block, and here both come
from the same read. No incrementer is needed. This doubles the word width
compared with a table that stores only the sum: for K = 8 the table is
65536 × 18 bits (144 KB) instead of 65536 × 9 bits (72 KB).

`tpfau_lut_mult` stores the 2K-bit product `a·b` at the same kind of address.
For K = 8 that is 65536 × 16 bits (128 KB).

Both tables are one array with many asynchronous read ports: N ports for the
adder and N² for the multiplier. A `for` loop in an `initial` block fills each
array from the formula above, so the RTL contains no data files. Synthesis
sees an initialised memory with many read ports. On an FPGA that becomes
replicated ROMs or distributed logic. An ASIC would need a ROM generator.

## Flexible addition: the selection tree

`tpfau_tree_select` is a conditional-sum tree over the N blocks:

- **Level 0.** Every block has two versions: carry-in 0 (`s0`, carry out
  `c0`) and carry-in 1 (`s1`, carry out `c1`). Both come straight from the
  table.
- **Level l.** Neighbouring groups of 2^l blocks are joined. The upper group
  uses its carry-1 version when the lower group's matching version produced a
  carry, and its carry-0 version otherwise. This is done for both versions of
  the joined group, so every group of 2^(l+1) blocks again has a carry-0 and a
  carry-1 version. One level costs one and-or selection per bit.

After all `L = ceil(log2 N)` levels, the carry-0 version is the exact sum.

The flexible result after `l` levels is the carry-0 version of every group of
2^l blocks, concatenated. No carry passes between those groups. So:

- With 0 levels the result is the four block sums side by side. The carries
  at bits 8, 16 and 24 are dropped.
- With 1 level the two 16-bit halves are exact, but the carry between them is
  lost.
- With 2 levels the sum is exact.

The carry out (`cout`) is the carry of the top group. `tpfau_flex_adder`
splits the operands into blocks, reads the table, runs the tree, and picks one
level's result with a final multiplexer.

## Flexible multiplication: diagonals, rows and per-stage trees

This is the least obvious part of the design.

With N blocks there are N² block products `a_i · b_j`. Each is 2K bits wide
and has weight 2^(K(i+j)). Group the products by *diagonal* `p = i + j`. A
product on diagonal p covers bits `[pK, pK+2K)`, so it never overlaps a
product on diagonal p+2. Products on even diagonals can therefore share rows,
and so can products on odd diagonals. The products are laid out like this:

- a product on an even diagonal goes into row `t`, where `t` is its position
  in the diagonal;
- a product on an odd diagonal goes into row `E + t`, where E is the number of
  rows the even diagonals need.

This gives 2N − 1 rows. For N = 4 and p = 0…6, the diagonals hold
1, 2, 3, 4, 3, 2, 1 products. The even diagonals need 3 rows and the odd ones
need 4, so there are 7 rows.

The stage count `s` keeps the `s` most significant diagonals. The last stage
keeps all of them. With N = 4:

| s | diagonals kept | products | rows | 3:2 levels |
|--:|----------------|---------:|-----:|-----------:|
| 1 | 6              | 1        | 1    | 0 (the product goes straight to the output) |
| 2 | 5, 6           | 3        | 3    | 1          |
| 3 | 4, 5, 6        | 6        | 5    | 3          |
| 4 | all            | 16       | 7    | 4          |

Each stage count from 2 to N has its own row set and its own Wallace tree of
3:2 counters (`tpfau_csa_tree`). Only the tree that was selected sits on the
active path, so fewer stages mean fewer counter levels. A multiplexer sends
that tree's two output rows to one shared final adder. A second multiplexer
chooses between that sum and the stage-1 bypass. The final adder is a plain
binary `+`, and synthesis chooses its structure.

Each stage adds roughly K bits of precision. With operands read as fractions,
the product is exact at stage N. At stage s < N it is too low by less than
about `N · 2^(−K·s)`.

## The arithmetic unit

`tpfau_arith_unit` holds the operation control, one flexible adder and one
flexible multiplier, all fed by the same operands. The operation code
(`OP_ADD` / `OP_MUL`, from `tpfau_pkg`) picks which result goes out:

- for a multiplication, the 2M-bit product;
- for an addition, `{cout, sum}` in the low M+1 bits.

The unit also reports the stage count and tree levels it applied. It is purely
combinational. A clocked environment should sample the result after the delay
of the selected path. Cycle-level simulation does not model those delays.

## Scalar-product engine

`tpfau_dot3` computes `r·S = rx·sx + ry·sy + rz·sz` for a guided object, with
the object's speed as the condition. It has one flexible multiplier and one
flexible adder.

Number format (this design's choice):

- Components are unsigned fractions in [0,1) with M fraction bits.
- Each product is cut to its top M−2 fraction bits and held in Q2.(M−2)
  format: 2 integer bits and M−2 fraction bits. That is enough for a sum of
  three products, which is below 3.

Schedule after the clock edge that takes `start`:

| edge | multiplier          | adder                |
|-----:|---------------------|----------------------|
| 1    | rx·sx → product reg |                      |
| 2    | ry·sy → product reg | acc = 0 + P0         |
| 3    | rz·sz → product reg | acc += P1            |
| 4    |                     | acc += P2, `done` = 1 |

`done` is a one-cycle pulse that rises on the fourth edge after the start
edge. `result` holds until the next start. The speed is sampled once, at
start, and every product and sum of that scalar product uses the same
precision. `busy` is high from the start edge until `done`. Reset is
synchronous and active low.

An assertion checks that an exact-mode accumulation never overflows the two
integer bits.

### Measured error

`tb_tpfau_speed_bands` runs 1000 random scalar products per speed band and
measures the mean absolute error against the exact real-valued product.
"Intended" is the error this design was specified to reach.

| stages | measured mean error | intended |
|-------:|--------------------:|---------:|
| 4      | 2^−29.4             | 2^−30.9  |
| 3      | 2^−22.4             | 2^−23.0  |
| 2      | 2^−13.3             | 2^−14.8  |
| 1      | 2^−5.6              | 2^−6.9   |

Each stage gains about 8 bits, as intended. The remaining gap of 0.5 to 1.5
bits comes from details the specification leaves open:

- the Q2.30 truncation of the products;
- dropped adder carries at the lower precision levels.

The intended path delays were 28.9, 23.2, 16.1 and 14.0 ns on an FPGA. This
RTL does not model them.

## Top level

`tpfau_top` places the two designs side by side, each with its own ports:

- `au_*`: the arithmetic unit (`au_op`, `au_a`, `au_b`, `au_cond` →
  `au_result`, `au_mul_stages`, `au_add_levels`), combinational;
- `dp_*`: the scalar-product engine (`dp_start`, `dp_speed`, `dp_r[3]`,
  `dp_s[3]` → `dp_busy`, `dp_done`, `dp_result`, `dp_stages`), clocked by
  `clk` / `rst_n`.

The top has no interfaces. Parameters: `M` (operand bits), `K` (block bits)
and `CW` (condition code bits). Operands that are not a multiple of K get a
zero-padded top block. The speed thresholds (`THRESH`, one per stage boundary)
are parameters of the arithmetic unit and the scalar-product engine. Their
default list has three entries, so a different N also needs a new `THRESH`.

## Files

| file | contents |
|------|----------|
| `rtl/tpfau_pkg.sv` | `op_e`, and elaboration-time functions: block count, diagonal sizes, rows per stage, CSA depth |
| `rtl/tpfau_op_control.sv` | condition → stage count and tree levels (threshold table) |
| `rtl/tpfau_lut_adder.sv` | compound LUT-adder, multiport |
| `rtl/tpfau_tree_select.sv` | carry-select selection tree with one output per level |
| `rtl/tpfau_flex_adder.sv` | flexible adder |
| `rtl/tpfau_lut_mult.sv` | LUT-multiplier, multiport |
| `rtl/tpfau_csa_tree.sv` | Wallace tree of 3:2 counters |
| `rtl/tpfau_flex_mult.sv` | flexible multiplier |
| `rtl/tpfau_arith_unit.sv` | the arithmetic unit |
| `rtl/tpfau_dot3.sv` | scalar-product engine |
| `rtl/tpfau_top.sv` | top level |
| `tb/tpfau_ref_pkg.sv` | reference arithmetic, written from the definition of each precision level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_tpfau_speed_bands.sv` | scalar-product error per speed band (table above) |
| `tb/tb_tpfau_error48.sv` | 48-bit operands in 8-bit blocks: mean error of independent additions per tree level, and of chains of successive multiplications per stage count |

Every testbench compares the design with `tpfau_ref_pkg` or a direct
computation. Each prints `TB_RESULT checks=N failures=F` and has a watchdog.
`tb_tpfau_top` runs the whole design at its default size. It also counts each
of the following and fails if any of them never happened:

- every tree level;
- every stage count;
- a dropped carry;
- an inexact product;
- an add/multiply switch;
- a scalar product in every band.

## Simulating

With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -y rtl -y tb --top-module tb_tpfau_top \
    rtl/tpfau_pkg.sv tb/tpfau_ref_pkg.sv tb/tb_tpfau_top.sv
./obj_dir/Vtb_tpfau_top
```

To lint a module, use `verilator --lint-only -Wall -y rtl rtl/tpfau_pkg.sv
rtl/<module>.sv`. Every run takes well under a second, after the tables have
been filled at time zero. The one lint warning left is in `tpfau_dot3`: the
low bits of the double-width product are unused, on purpose.

## Where this design makes its own choices

- **Successor in the table word.** The compound table stores `a+b+1` next to
  `a+b`. A table sized for the sum alone would be half as wide.
- **Stage semantics.** The multiplier keeps the top `s` product diagonals.
  The adder joins groups of 2^l blocks, drops the carries between groups, and
  uses their carry-0 versions.
- **Stage-to-level mapping.** The speed bands follow the intended use. How a
  stage count translates into adder tree levels is this design's own rule.
- **Row layout.** The 2N−1 rows are grouped as even and odd diagonals, and
  each stage count gets its own tree. This reproduces the intended counter
  depths of 1, 3 and 4 levels.
- **Scalar-product engine.** The number format, the four-cycle schedule, the
  start/busy/done handshake and the synchronous reset are all this design's
  own. The engine has its own multiplier and adder rather than sharing the
  general unit, so the next product and the previous sum can be formed in the
  same cycle.
- **Not built.** The following are outside this RTL:
  - error detection or correction on the tables;
  - the sequential (non-tree) carry-select concatenation, which is only a
    point of comparison;
  - any operation other than addition and multiplication;
  - signed operands.
