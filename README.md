# Generated arithmetic circuits: adders and a look-ahead ALU

This is a small library of combinational arithmetic circuits. Each one is
written the way a circuit generator would produce it: a recursive or repeated
structure, sized by one parameter. There are three circuits:

- an **N-bit ripple-carry adder**, built from full adders, which are built
  from half adders, which are built from primitive gates;
- an **N-bit propagate-generate (carry look-ahead) adder**, whose look-ahead
  logic is a balanced binary tree. An **adder** wrapper picks between the two
  adders when it is elaborated, by their cost;
- an **N-bit ALU** with sixteen operations, a carry and an overflow output.
  Its arithmetic and logic run through one propagate-generate tree, so its
  delay grows with log2(N).

Every circuit is purely combinational. There is no clock, no reset and no
state. The gate-level description language these circuits come from has no
storage elements, and it forbids feedback.

## Bit order

Bit 0 of every vector is the least significant bit. The original gate-level
descriptions number bits the other way, from N (least significant) down to 1.
For example, their ripple adder takes its carry in as `CARRY N+1` and gives
its carry out as `CARRY 1`. Here that is `c` and `cout`.

## The propagate-generate tree

Both the look-ahead adder (`tv_adder_tree`) and the core of the ALU
(`tv_alu_help`) have the same tree structure:

- **One bit** is a leaf cell that produces a bit propagate `p`, a bit
  generate `g` and a result bit.
- **N bits** are split into a low part of `N/2` bits (rounded down) and a
  high part of `N - N/2` bits. Each part is a smaller copy of the same
  module. Three gates join the two parts:

```
cl = gl | (c  & pl)   // carry into the high part     (t_carry c,  pl, gl)
p  = pl & pr          // whole group propagates
g  = gr | (gl & pr)   // whole group generates        (t_carry gl, pr, gr)
```

`t_carry` is the two-gate cell `cout = g | (c & p)`. It is used both to pass
a carry across a group and to merge two groups' generate signals. The carry
out of an N-bit tree is one more `t_carry(c, p, g)` at the root. Each level
of the tree adds a constant number of gates to the carry path, so the delay
grows with log2(N). The gate count grows linearly: the look-ahead adder has
3 gates per bit plus 5 per internal node, 8N-3 in all.

The tree can be thought of as recursive, with each node containing two
smaller trees. The RTL instead builds it with one generate loop over
heap-numbered nodes:

- The root is node 1.
- Node `k` has children `2k` (the low part) and `2k+1` (the high part).
- `tree_pkg` works out, for each node number, how many bit positions that
  node covers and which is the lowest.
- Each node's `p`, `g` and carry in live in that node's generate block.
- When N is not a power of two, some node numbers have no node. Those hold
  constants.

Only balanced trees are generated. The tree shape decides how the look-ahead
is organised. Another shape, for example a linear chain, would give the same
function with a different delay. Supporting other shapes would need a tree
description as a parameter.

## The ALU (`new_alu`)

### Operations

`op[3:0]`, with the result in `out`. For subtract-type operations, `carry`
is a borrow.

| op   | result          | carry                   | overflow |
|------|-----------------|-------------------------|----------|
| 0000 | a               | 0                       | 0 |
| 0001 | a + 1           | carry out               | signed |
| 0010 | b + a + c       | carry out               | signed |
| 0011 | b + a           | carry out               | signed |
| 0100 | 0 - a           | borrow (a != 0)         | signed |
| 0101 | a - 1           | borrow (a == 0)         | signed |
| 0110 | b - a - c       | borrow                  | signed |
| 0111 | b - a           | borrow                  | signed |
| 1000 | {c, a[N-1:1]}   | a[0]                    | 0 |
| 1001 | {a[N-1], a[N-1:1]} | a[0]                 | 0 |
| 1010 | {0, a[N-1:1]}   | a[0]                    | 0 |
| 1011 | b ^ a           | 0                       | 0 |
| 1100 | b \| a          | 0                       | 0 |
| 1101 | b & a           | 0                       | 0 |
| 1110 | ~a              | 0                       | 0 |
| 1111 | a               | 0                       | 0 |

### How one tree does all sixteen

The hardest part to follow is how a single adder tree also computes the
logic operations. Each bit's leaf cell (`t_cell`) receives an 8-bit control
vector, `mpg_t` in `alu_pkg`. The vector holds two 4-entry truth tables over
the bit pair `{a, b}`:

```
p   = prop[{a,b}]     bit propagate, and the result bit when no carry enters
g   = gen[{a,b}]      bit generate
out = p ^ carry_in
```

Every arithmetic operation is written as `b + f(a) + cx`:

| operation  | f(a)      | p          | g        | cx (carry into bit 0) |
|------------|-----------|------------|----------|----|
| b + a (+c) | a         | a ^ b      | a & b    | 0 (c) |
| a + 1      | a, b = 0  | a          | 0        | 1 |
| 0 - a      | ~a, b = 0 | ~a         | 0        | 1 |
| a - 1      | a + all ones | ~a      | a        | 0 |
| b - a (-c) | ~a        | ~a ^ b     | ~a & b   | 1 (~c) |

In `a + 1` and `0 - a` the other operand is taken as 0. A logic operation
puts its function into `prop`, sets `gen` to 0 and uses `cx = 0`. Then no
carry is ever generated, every internal carry is 0 and `out = p`. Move and
the three shifts set `p = a`.

These modules produce the control signals:

- **`mpg`** decodes the op-code into the control vector.
- **`carry_in_help`** decodes the op-code into `cx`.

### Shifts, carry and overflow

- **`tv_shift_or_buf`** shifts the tree's output right by one for op-codes
  1000, 1001 and 1010, and passes it through for all others. It fills the top
  bit with `c`, `a[N-1]` or 0.
- **`carry_out_help`** computes `cout = g | p & cx` from the tree's group
  signals:
  - add-type operations output `cout`;
  - subtract-type operations output its inverse, the borrow;
  - shifts output the bit shifted out, `a[0]`;
  - all other operations output 0.
- **`overflow_help`** uses only the top bits of `a`, `b` and the tree's
  result:
  - add: the operands have the same sign and the result's sign differs;
  - `b - a`: the operands' signs differ and the result's sign differs from
    `b`'s;
  - increment: `a` is non-negative and the result is negative;
  - decrement: `a` is negative and the result is non-negative;
  - negate: `a` and the result are both negative.

## Choosing an adder (`adder`)

The cost of an adder is its gate count divided by 3 (rounded down), plus its
worst-case delay in gate levels. The ripple-carry adder has 5N gates and a
delay of 2N+1, which gives a cost of 5N/3 + 2N+1. Published costs for the
look-ahead adder are higher up to 25 bits and equal at 26 bits (96 each).
The ripple-carry adder is chosen only when it is strictly cheaper, so the
crossover is `PG_MIN_N = 26`:

- `N < 26` gives `v_adder`;
- `N >= 26` gives `tv_adder`.

The threshold comes from those published costs. It is not computed from
this RTL. This look-ahead adder's own cells, and so its cost, differ
somewhat (see below). Both choices compute the same sum, so the choice shows
only in area and delay.

## Primitive gates (`b_gate`)

`b_gate` provides the sixteen primitives of the gate-level description
language, with `FN` as a parameter:

- buffer and inverter;
- NAND, OR, AND and NOR with 2, 3 or 4 inputs;
- XOR and equivalence.

The adders and the look-ahead cells are built from these primitives, so
their structure matches their gate-level descriptions:

- half adder: 2 gates;
- full adder: 5 gates;
- N-bit ripple adder: 5N gates;
- `t_carry`: 2 gates.

## Where this departs from the gate-level originals, and what it adds

- **The ALU's one-bit cell and its control encoding are this design's own.**
  The original names the cell, its ports and an 8-bit control vector, but
  does not give their contents. The two-truth-table encoding, the carry-in
  decoding, the borrow sense of the carry output and the overflow rules were
  all derived from the operation table. As a result, the ALU's gate counts
  and delays do not match the published ones (126 gates and 12 gate delays
  at 1 bit, up to 3227 gates and 39 at 128 bits).
- **Fanout buffers are kept as gates.** As in the original, every
  internal tree node of height 1, 4, 7 and so on passes the control vector
  to its two parts through eight buffer gates. This keeps each control line
  at 8 loads or fewer. The buffers do not change the function, so synthesis
  usually removes them. The 8-bit buffer has no module of its own. It is
  eight `b_gate` buffers inside `tv_alu_help`.
- **The look-ahead adder's cells are this design's own.** The original only
  names this adder and says that its look-ahead follows a tree. Here it uses
  the ALU's tree with half-adder leaves, which gives 8N-3 gates. The
  published propagate-generate gate counts are close to 9N-3.
- **Only balanced trees are generated** (see above).

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M`. Every testbench computes its expected
values independently of the design, from integer arithmetic or truth tables.

| testbench | what it checks |
|---|---|
| `tb_b_gate` | all 16 primitives, all input combinations |
| `tb_half_adder`, `tb_full_adder`, `tb_t_carry` | exhaustive |
| `tb_v_adder` | 4 bits exhaustive, 13 bits random |
| `tb_tv_adder` | 1, 3 and 5 bits exhaustive (unbalanced splits); 32 and 128 bits random, plus full carry chains |
| `tb_adder` | 4, 25, 26 and 32 bits, on both sides of the crossover |
| `tb_t_cell`, `tb_mpg`, `tb_carry_in_help`, `tb_carry_out_help`, `tb_overflow_help`, `tb_tv_shift_or_buf` | every op-code and input combination |
| `tb_tv_alu_help` | the tree at 1, 5 and 32 bits, with arithmetic and logic control vectors |
| `tb_new_alu` | 1, 7 and 32 bits against the reference model in `alu_model_pkg` |
| `tb_simple_hdl_top` | the whole top at default sizes, end to end (below) |
| `tb_table_sizes` | the ALU at 1 to 128 bits and the adder at 1 to 128 bits (the sizes of the published tables) |

`tb_simple_hdl_top` exercises the top like this:

- It adds a stream of 32-bit numbers into a 64-bit total, using add for the
  low words and add-with-carry for the high words.
- It runs every op-code on the results.
- It checks both adders.
- It fails if any of these never happens: an op-code, a carry, a borrow, an
  overflow, a rotate through carry, or a carry through every bit of each
  adder.

The ALU reference model is `tb/alu_model_pkg.sv`, driven by
`tb/alu_checker.sv`. It computes results two bits wider than the operands
and detects overflow by checking whether the signed result fits in N bits.

Since everything is combinational, there are no cycle counts to check. The
published gate delays are a property of the gate structure, not of
simulation time.

To run a testbench with verilator:

```
verilator --binary --timing -Wno-fatal --top-module tb_new_alu \
    -y rtl -y tb +libext+.sv rtl/alu_pkg.sv rtl/hdl_prim_pkg.sv \
    rtl/tree_pkg.sv tb/alu_model_pkg.sv tb/tb_new_alu.sv
./obj_dir/Vtb_new_alu
```

## Files

- `rtl/simple_hdl_top.sv`: the top. It holds a 32-bit ALU (`ALU_N`), a
  4-bit adder (`ADDER_N`, ripple-carry) and a 32-bit adder (`WIDE_ADDER_N`,
  look-ahead) side by side. Each has its own ports.
- `rtl/new_alu.sv` and its parts: `tv_alu_help`, `t_cell`, `t_carry`, `mpg`,
  `carry_in_help`, `tv_shift_or_buf`, `carry_out_help`, `overflow_help`.
- `rtl/adder.sv`, `rtl/v_adder.sv`, `rtl/full_adder.sv`,
  `rtl/half_adder.sv`, `rtl/tv_adder.sv`, `rtl/tv_adder_tree.sv`: the adders.
- `rtl/b_gate.sv`: the primitive gates.
- `rtl/alu_pkg.sv`: op-codes and the control-vector type.
- `rtl/hdl_prim_pkg.sv`: the primitive gate names and their input counts.
- `rtl/tree_pkg.sv`: node numbering of the balanced look-ahead trees.

To resize a circuit, override `N` (or the top's three width parameters).
Every width from 1 bit up elaborates.
