# Counter-based stacking multiplier

An unsigned binary multiplier whose partial products are reduced by 6:3
counters, where each counter finds the number of 1s among six bits by
*stacking* them: the 1s are pushed to one end of a short vector, so the vector
becomes a thermometer code of the count, and the binary count is then read
off the stacks with a handful of AND/OR gates. The point of the stacking
counter is that no XOR gate sits on the paths that produce the two carry
bits of the count, which are the paths that decide the depth of a counter
tree. Only the weight-1 bit uses one XOR, and it is not on the critical path.

The RTL is plain combinational logic in SystemVerilog: no clock, no reset,
no registers. `stack_multiplier` computes `p_o = a_i * b_i` for N-bit
unsigned operands (N = 8 by default).

```
 a_i, b_i ──► pp_gen ──► ppr_tree ──► final_adder ──► p_o
             AND array   6:3 counters  3 rows → 1
                         (4 stages
                          for N = 8)
```

## The stacking 6:3 counter

A 6:3 counter takes six bits of equal weight and outputs their count as a
3-bit number `{C2, C1, S}` (weights 4, 2, 1). The stacking counter
(`counter63_stack`) builds it in two steps.

### 3-bit stacks

`stack3` stacks three bits `P` into `Q`, with the 1s first:

| output | function             | meaning                  |
|--------|----------------------|--------------------------|
| Q1     | P0 + P1 + P2         | at least one input is 1  |
| Q2     | P0P1 + P0P2 + P1P2   | at least two are 1       |
| Q3     | P0P1P2               | all three are 1          |

In the RTL `q_o[0]` is Q1, so `q_o` read as a vector is a thermometer code.

### Merging two stacks (`stack6`)

The six inputs X1..X6 are split in halves. X1..X3 are stacked into Y and
X4..X6 into Z. Write Y backwards next to Z:

```
 Y3 Y2 Y1 | Z1 Z2 Z3        e.g. 2 + 1 ones:  0 1 1 | 1 0 0
```

Because Y's 1s sit at its Y1 end and Z's at its Z1 end, the 1s of both form
one unbroken run around the middle. Fold this row in half, pairing Y3 with
Z1, Y2 with Z2, Y1 with Z3:

```
 L1 = Y3 + Z1     M1 = Y3 · Z1
 L2 = Y2 + Z2     M2 = Y2 · Z2
 L3 = Y1 + Z3     M3 = Y1 · Z3
```

Each pair holds at most two 1s, and OR plus AND of a pair equals the number
of 1s in it, so L and M together keep the input count. More useful is what
the fold does to the run: a pair has both bits set only when the run reaches
past the middle on both sides, which needs at least four 1s. So

* with three or fewer 1s, **M is all zero** and L holds them all;
* with three or more 1s, **L is all ones** and M holds the rest (count − 3).

Stacking L and M with two more `stack3`s and placing stack(M) after
stack(L) gives the full 6-bit thermometer code, which `stack6` outputs as
`stack_o`. It also outputs Y, Z and M, which is what the counter needs.

### From stacks to a binary count

The counter does not wait for the second stacking level. It reads the count
off Y, Z and M directly:

* **S (parity).** A 3-bit stack holds an even count (0 or 2) when
  `Ye = Y1' + Y2·Y3'`; likewise `Ze` for Z. The total is odd when exactly one
  half is even: `S = Ye ⊕ Ze`. This is the only XOR in the counter.
* **C1 (weight 2)** is set for counts 2, 3 and 6.
  Counts 2 or 3: at least two 1s (`Y2 + Z2 + Y1·Z1`: two in one half, or one
  in each) and no more than three (M all zero).
  Count 6: both halves full, `Y3·Z3`.
  `C1 = (Y2 + Z2 + Y1·Z1)·(M1 + M2 + M3)' + Y3·Z3`.
* **C2 (weight 4)** is set for four or more 1s, which is exactly when M is
  non-zero: `C2 = M1 + M2 + M3`.

Worked example, inputs `1 1 0 | 1 1 1` (five 1s): Y = 110, Z = 111;
pairs (Y3,Z1) = (0,1), (Y2,Z2) = (1,1), (Y1,Z3) = (1,1) give L = 111 and
M = 011. Then Ye = 1 (two 1s), Ze = 0, so S = 1; M ≠ 0 and not Y3·Z3, so
C1 = 0; C2 = 1. Count = 101 = 5.

## Two other 6:3 counter circuits

The same function has two more circuits in `rtl/`, selectable in the
multiplier with the `KIND` parameter (type `counter_kind_e` in
`stack_mult_pkg`) for comparison:

* `counter63_fa` (`CNT_FA`): full adder FA1 on bits 0..2, FA2 on bits 3..5,
  half adder HA1 on the two sums (giving S), and FA3 on the three carries
  (giving C1 and C2).
* `counter63_pg` (`CNT_PG`): bits are taken in pairs, each giving
  propagate `P = a ⊕ b` and generate `G = a·b`. Then `S = P0⊕P1⊕P2`,
  `C1 = maj(P) ⊕ G0 ⊕ G1 ⊕ G2`, and
  `C2 = maj(G) + P0P1G2 + P0P2G1 + P1P2G0`.

`counter63` is a small wrapper that instantiates one of the three according
to `KIND`. The default, and the design's main counter, is `CNT_STACK`.

## The multiplier

### Partial products (`pp_gen`)

`pp_gen` forms the N² bits `a[i]·b[j]` and files each under column
`c = i + j`. Column c holds 1, 2, …, N, …, 2, 1 bits (the top column, 2N−1,
is empty), packed from slot 0 upwards; higher slots are 0. Operands are
unsigned and there is no Booth recoding.

### Reduction tree (`ppr_tree`)

The tree works on columns, stage by stage. In each stage, a column of height
h:

* gets `h / 6` counters on full groups of six bits;
* gets one more counter, with its spare inputs tied to 0, if three to five
  bits remain; one or two leftover bits just pass to the next stage;
* is left alone if h ≤ 3.

Each counter keeps S in its column and sends C1 one column up and C2 two
columns up. Stages are added until no column is taller than three. From there
6:3 counters cannot help: a counter on a column of three still leaves one bit
there and pushes two into its neighbours.

The shape of the tree is fixed during elaboration by constant functions in
`stack_mult_pkg` (`counters_for`, `pass_for`, `col_height`, `num_stages`,
`tree_height`). They size and wire the generate loops and produce no
hardware. Inside a column of the next stage the bits sit in a fixed order:
passed bits, then the sums of the column's own counters, then the C1 bits
from the column below, then the C2 bits from two columns below. Counter
outputs that would land at weight 2^(2N) or above are dropped, because the
product of two N-bit numbers never reaches there.

Column heights for N = 8, column 15 on the left:

| after stage | heights (col 15 … col 0)                          | counters |
|-------------|---------------------------------------------------|----------|
| 0 (inputs)  | 0 1 2 3 4 5 6 7 8 7 6 5 4 3 2 1                   | –        |
| 1           | 0 1 3 5 3 3 3 4 5 4 3 2 1 3 2 1                   | 9        |
| 2           | 0 2 4 1 3 4 5 3 2 1 3 2 1 3 2 1                   | 4        |
| 3           | 1 3 1 2 5 2 1 3 2 1 3 2 1 3 2 1                   | 3        |
| 4           | 1 3 2 3 1 2 1 3 2 1 3 2 1 3 2 1                   | 1        |

17 counters in four stages. The number of stages grows slowly with N: 5 for
N = 16, 7 for N = 32.

### Final adder (`final_adder`)

The three rows left by the tree go through one row of full adders
(carry-save), and a 2N-bit `+` adds the sum and the shifted carry row. The
adder architecture is left to synthesis.

## Parameters and interface

| module             | parameter | default     | meaning                         |
|--------------------|-----------|-------------|---------------------------------|
| `stack_multiplier` | `N`       | 8           | operand width                   |
|                    | `KIND`    | `CNT_STACK` | counter circuit                 |
| `ppr_tree`         | `N`, `KIND` | 8, `CNT_STACK` | as above                   |
| `pp_gen`           | `N`       | 8           | operand width                   |
| `final_adder`      | `W`       | 16          | row width (2N)                  |

`stack_multiplier` ports: `a_i[N-1:0]`, `b_i[N-1:0]` in, `p_o[2N-1:0]` out.
The product is valid one combinational delay after the operands; register
the ports outside if a pipeline stage is wanted.

## How far it follows the source design, and where it departs

Taken from the published description of the counter-based stacking
multiplier:

* the 3-bit stacker, the L/M merge of two stacks into a 6-bit stack, and
  the conversion equations for S, C1 and C2;
* the full-adder and the propagate/generate forms of the 6:3 counter;
* the use of 6:3 counters to reduce the partial products.

Choices made here, where the description is silent:

* **Operand width.** No width is given for the proposed multiplier; 8 bits
  is the default, and the RTL is generic in N.
* **Exact, not approximate.** The published multiplier is evaluated as an
  *approximate* multiplier built with an approximate compressor, but that
  compressor is never specified. This RTL is an exact multiplier. An
  approximate variant is not included.
* **Equation readings.** Several printed equations lack operators or
  indices. The forms above are the ones that give a correct count, and each
  is checked exhaustively. For C1 of the P/G counter, C1 of the stacking
  counter (the count-of-six term Y3·Z3) and C2 of the stacking counter
  (M1 + M2 + M3), the readings are this design's.
* **Tree schedule, three-row stop and final adder** are this design's
  choices. So are the column layout, the partial-product generator and the
  purely combinational timing.
* Published results (power in mW, LUTs, slices, delay in ns) are FPGA
  measurements and are not reproduced here.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.

| testbench                      | what it checks                                                   |
|--------------------------------|------------------------------------------------------------------|
| `tb_stack3`                    | all 8 inputs give the thermometer code of the count              |
| `tb_stack6`                    | all 64 inputs: 6-bit stack, Y, Z, and M holding count − 3        |
| `tb_counter63_stack/_pg/_fa`   | all 64 inputs give the right binary count                        |
| `tb_pp_gen`                    | per-column count of 1s, empty high slots, weighted sum = a·b     |
| `tb_ppr_tree`                  | three rows sum to a·b: N = 8 exhaustive, N = 4 and 16; 4 stages at N = 8 |
| `tb_final_adder`               | sum of three random rows mod 2^W                                  |
| `tb_stack_multiplier`          | default multiplier, all 65,536 operand pairs; every count 0..6 reaches a full first-stage counter, and every count 0..5 reaches a counter with a tied-off input |
| `tb_stack_multiplier_variants` | P/G and FA counters at N = 8 (exhaustive), N = 4 (exhaustive), N = 16 (random) |

To run one with Verilator 5 from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/stack_mult_pkg.sv tb/tb_stack_multiplier.sv --top-module tb_stack_multiplier
./obj_dir/Vtb_stack_multiplier
```

To lint the RTL: `verilator --lint-only -Wall -y rtl rtl/stack_mult_pkg.sv
rtl/stack_multiplier.sv`. The remaining lint warnings are about bits that
are constant by construction: the top slots of the highest column, the last
carry of the final adder, and the 6-bit stack output of `stack6` that the
stacking counter does not need.

## Files

* `rtl/stack_mult_pkg.sv`: counter kind enum and tree-shape functions
* `rtl/stack3.sv`, `rtl/stack6.sv`: bit stackers
* `rtl/counter63_stack.sv`, `rtl/counter63_pg.sv`, `rtl/counter63_fa.sv`,
  `rtl/counter63.sv`: 6:3 counters and the selector
* `rtl/full_adder.sv`, `rtl/half_adder.sv`: adder cells
* `rtl/pp_gen.sv`, `rtl/ppr_tree.sv`, `rtl/final_adder.sv`: multiplier stages
* `rtl/stack_multiplier.sv`: top level
