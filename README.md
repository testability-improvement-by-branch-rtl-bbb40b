# Branch point control for a BIST-tested ALU

This is an ALU with built-in self-test (BIST) in which the opcode register
decides which functional unit gets each pseudorandom test pattern. It does not
leave that choice to chance. The method comes from the paper "Testability
Improvement by Branch Point Control for Conditional Statements With Multiple
Branches". This RTL implements the paper's modified circuit ("Circuit II"):
an 8-bit datapath with an adder, a subtractor, a multiplier and a shifter.

## The problem

A `case` statement on a 4-bit opcode `A` selects one of four units working on
operands `B` and `C`:

| A        | OUT       |
|----------|-----------|
| `0001`   | `B + C`   |
| `0010`   | `B - C`   |
| `0100`   | `B * C`   |
| any other| `B << C`  |

In a plain BIST setup, `A`, `B` and `C` all become pseudorandom pattern
generators (PRPGs). A unit is then exercised only by the fraction of patterns
whose opcode selects it. The problem is that the units need very different
numbers of random patterns for full stuck-at coverage. For the 8-bit units the
paper found these counts:

| unit       | random patterns for 100 % coverage |
|------------|-----------------------------------:|
| adder      | 30   |
| subtractor | 30   |
| multiplier | 400  |
| shifter    | 4000 |

The shifter is the hardest to test, but with a random 4-bit opcode it sees only
one pattern in 16. The session therefore needs 16 × 4000 = 64 000 patterns,
and over 90 % of them are wasted on units that are already fully tested. If the
shifter is moved to the default arm of the case statement, it gets 13/16 of the
patterns. The session then needs 6400 patterns, which is still 43 % more than
the 4460 that the four units need in total.

## The idea: test the units one after another

In test mode, `{C,B}` is one 16-bit PRPG, but `A` is no longer random. It holds
the one-hot code of the *unit under test*. The units are tested in a fixed
order: adder, subtractor, multiplier, shifter. Each unit receives exactly the
run of consecutive PRPG patterns it needs.

The PRPG sequence is fixed, so the last pattern of each unit's run is known in
advance. This pattern is the unit's **branch point**. When the PRPG produces
the current unit's branch point, `A` steps to the next unit on the next clock.
With the seed and feedback used here, the schedule is:

| pattern (0 = seed) | {C,B} at the branch point | unit under test | patterns |
|--------------------|---------------------------|-----------------|---------:|
| 0 – 30             | `1110000101101011` (30)   | adder      | 31 |
| 31 – 60            | `0011000001101010` (60)   | subtractor | 30 |
| 61 – 460           | `1111110001011001` (460)  | multiplier | 400 |
| 461 – 4460         | (`1110111111100000` at 4460, not checked) | shifter | 4000 |

The adder sees the seed as well, so it gets one pattern more than it needs.
The shifter is last, so it needs no branch point. The session simply ends after
pattern 4460: the BIST controller counts the cycles, or it watches `uut`.
4460 patterns replace 6400 or 64 000, and the extra logic is a few gates.

## Detecting a branch point cheaply: maximum cubes

A full 16-bit equality comparator for each branch point would work. However,
it is much larger than it needs to be. The detector only has to tell the branch
point apart from the patterns that *the same unit* saw before it. The patterns
of other units do not matter, because the detector for unit *i* is enabled only
while `A[i]` is set.

The detector therefore uses a **maximum cube**: a product term with as few
literals as possible that contains the branch point but none of the unit's
earlier patterns. To find it, XOR every earlier pattern of the unit with the
branch point. This gives a 0/1 *conflict matrix*, with one row per earlier
pattern and one column per bit. A 1 marks a bit in which that pattern differs
from the branch point. Any set of columns that has a 1 in every row separates
the branch point from all the earlier patterns. The smallest such set (a
minimum column cover) gives the bits of the cube. Those bits take the values
they have in the branch point, and all other bits are don't-cares.

For example, take a run of 4-bit patterns `0011, 1000, 1110, 0110` that ends
in the branch point `0100`. The rows are `0111, 1100, 1010, 0010`. Column 3
(counting from the left) has a 1 in every row except row 2. Column 2 covers
row 2, and no single column covers all four rows. So the cube is `x10x`,
which checks two bits instead of four.

The cubes of this design, with the opcode line that enables each one, are:

```
adder      : A[0] & B[6] & B[0]
subtractor : A[1] & ~C[6] & ~B[0]
multiplier : A[2] & C[6] & C[3] & ~C[1] & ~B[7] & ~B[2] & B[0]
branch     = OR of the three
```

The opcode enable is essential. A pattern that falls into a cube while another
unit is under test must not cause a branch. For example, the multiplier's
branch point `…01011001` has `B[6] = B[0] = 1`, so it lies in the adder's cube.
It causes no branch because `A[0]` is 0 by then.

In the RTL (`branch_point_select`), each cube is stored as a pair of 16-bit
parameters over `{C,B}`: a care mask and a value. These are `BP_CARE` and
`BP_VALUE` in `bpc_pkg`. Bit 0 is `B[0]` and bit 8 is `C[0]`:

| unit       | care     | value    |
|------------|----------|----------|
| adder      | `16'h0041` | `16'h0041` |
| subtractor | `16'h4001` | `16'h0000` |
| multiplier | `16'h4A85` | `16'h4801` |

The cubes are valid only for this PRPG, this seed and this unit order. If any
of these change, compute new cubes as described above. An all-ones care mask
gives the unminimised equality comparator.

## The PRPG

`bc_prpg` holds `B` and `C`. In normal mode, both registers load `b_input` and
`c_input` on every clock. In test mode, `{C,B}` shifts one place towards
`B[0]`. The new top bit is `C[7]`:

```
k = B[0] ^ C[3] ^ C[5] ^ C[6]        (taps = 16'h6801 over {C,B})
{C,B} <= {k, {C,B}[15:1]}
```

The sequence is maximal-length (period 65 535). The asynchronous reset loads
the seed `C = 0, B = 1`.

## Opcode register A

`opcode_reg` resets to `0001`, so the adder is the first unit under test. The
reset is asynchronous and active high. In normal mode, `A` loads `a_input`. In
test mode, `A` holds its value until `branch` goes high. It then steps
`0001 → 0010 → 0100 → 1000`; any other code goes back to `0001`. The branch is
detected combinationally during the cycle in which the branch-point pattern is
applied. The step takes effect at the clock edge that ends that cycle, so the
next pattern already goes to the next unit.

## Datapath

`bpc_alu` has the four units and the output multiplexer. All four results are
formed at 2W = 16 bits, so that the product fits:

- the sum keeps its carry;
- the difference is the 16-bit two's complement;
- `B << C` keeps the bits shifted above bit 7, and is 0 when `C ≥ 16`.

The paper does not give the width of `OUT`; 16 bits is this design's choice.

## Top level: `bpc_alu_top`

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock |
| `rst`       | in  | 1     | asynchronous reset, active high: `{C,B} = 1`, `A = 0001` |
| `test_mode` | in  | 1     | 1 = BIST session, 0 = normal operation |
| `a_input`   | in  | 4     | opcode loaded into A in normal mode |
| `b_input`, `c_input` | in | W | operands loaded into B, C in normal mode |
| `out`       | out | 2W    | selected result for the registered A, B, C |
| `uut`       | out | 4     | contents of A (the unit under test during BIST) |
| `branch`    | out | 1     | branch point detected in this cycle |

To run a self-test:

1. Pulse `rst` with `test_mode` high.
2. Clock 4461 cycles (patterns 0 to 4460).
3. Compact `out` every cycle in a response analyser.

A normal operation takes one clock to load the registers. `out` is valid after
that edge.

The only parameter is `W`, which defaults to 8. The PRPG taps and the cubes in
`bpc_pkg` are 8-bit values. Other widths compile, but they need their own taps
and cubes, passed through the `TAPS`, `SEED`, `CARE` and `VALUE` parameters of
the submodules.

## How this design departs from the paper, and what is left out

- **Response analyser:** not included. The circuit has no MISR, and `out` is a
  port for one.
- **Opcode map:** the shifter is on the default arm and the multiplier on
  `0100`. This is the paper's modified map. Its original example had them the
  other way round.
- **Cube choice:** the paper says the multiplier has several minimum cubes.
  This design uses one of them.
- **`OUT` width and observation ports:** the 2W-bit `out` and the `uut` and
  `branch` outputs are this design's own additions.
- **No end-of-test output:** the last branch point (pattern 4460) could signal
  the end of the session. As in the paper's circuit, it is not decoded here.
- **Not built:**
  - the baseline circuit with a random opcode register;
  - the 16-bit-operand version. The paper reports its pattern counts but not
    its PRPG polynomial or its cubes.

## Verification

Each testbench in `tb/` checks its block against values computed
independently of the RTL. Each one prints `TB_RESULT checks=N failures=M`.

- `tb_bc_prpg` checks the following:
  - the seed;
  - 5000 LFSR steps against a bitwise reference;
  - the four branch-point vectors at patterns 30, 60, 460 and 4460;
  - normal-mode loads;
  - asynchronous reset.
- `tb_bpc_alu` checks 4000 operand and opcode combinations, including all
  unused codes and shift amounts of 16 or more.
- `tb_branch_point_select` checks all 65 536 values of `{C,B}` under each unit,
  plus random non-one-hot codes, against the three product terms.
- `tb_opcode_reg` checks reset, hold, each step of the sequence, the return
  from `1000` and from invalid codes, and random mixes of the two modes.
- `tb_bpc_alu_top` runs the top at its default parameters, end to end, and
  checks the following:
  - a complete 4500-pattern session, checking `uut`, `branch` and `out` every
    cycle and the 31/30/400/4000 pattern split;
  - 400 normal-mode operations;
  - a restarted session.

  It counts each mechanism (each branch, the patterns per unit, normal
  operations, unused codes, mode switches and the restart). It fails if any
  mechanism never occurs.

To simulate with Verilator 5, for example the top-level test:

```
verilator --binary --timing --assert -Wall -Wno-UNUSEDPARAM \
  rtl/bpc_pkg.sv rtl/bc_prpg.sv rtl/bpc_alu.sv rtl/branch_point_select.sv \
  rtl/opcode_reg.sv rtl/bpc_alu_top.sv tb/tb_bpc_alu_top.sv --top-module tb_bpc_alu_top
./obj_dir/Vtb_bpc_alu_top
```

The package must come first. The other block tests build the same way, with
their own testbench and top-module name. Every test finishes in well under a
second.
