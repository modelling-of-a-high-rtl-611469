# Five-set gate-network magnitude comparator

This is a 64-bit unsigned magnitude comparator. It takes two operands A and B
and raises exactly one of three flags: A > B, A = B or A < B. There is no
clock. A single network of simple gates (XOR/XNOR, AND, NAND and NOR) computes
the result. The network is regular: it repeats every four bits, so the same
RTL works for any width that is a multiple of four.

The idea is the usual one for comparing magnitudes: **the most significant
bit where A and B differ decides the result.** Bits below it do not matter.
The network finds that bit in two halves:

* a chain of "everything above is equal" signals, one per 4-bit group;
* inside each group, a one-hot detector for the first differing bit.

The circuit was first designed as a full-custom CMOS schematic. Its
first-level cell is a 7-transistor EXOR/EXNOR gate. That schematic is what
makes it fast and small. The RTL here keeps the logic structure of that
schematic, gate level by gate level, but none of its transistor-level
properties. Synthesis will map the RTL onto whatever cells a library has.

## The five sets

The gates are arranged in five levels called *sets*. Sets 1 to 4 together
form the **comparison evaluation module (CEM)**. Set 5 is the **final module
(FM)**. The operands are cut into `N/4` groups of four bits. Group `N/4-1`
holds the most significant bits.

| Set | Gate type | Per | Output | Meaning |
|-----|-----------|-----|--------|---------|
| 1 | EXOR/EXNOR | bit | `x_i = A_i ^ B_i`, `xn_i = ~(A_i ^ B_i)` | bit differs / bit equal |
| 2 | AND | group | `E_(k-1) = E_k & xn` of group k | all groups above k-1 are equal |
| 3 | NAND | bit | `c_n_i` (active low) | bit i is where A > B is decided |
| 4 | NAND | group | `G_k = ~&c_n` of group k | A > B is decided inside group k |
| 5 | NOR | whole word | `ALB`, `AGB`, `AEB` | final result |

### Set 2: the equality chain

`E_k` is the control bit of group k. It is 1 when every group above k has
A equal to B. The most significant group has nothing above it, so its E is a
constant 1. Each set-2 stage ANDs its incoming E with the four XNOR bits of
its own group and passes the result down to the next group. What comes out of
group 0 is `AEB`, meaning the whole operands are equal.

The chain runs through all `N/4` groups, so it is the longest path in the
network: 16 AND stages at N = 64. The chain is kept because it is how the
schematic is drawn. A tree of ANDs would give the same function with a depth
of log2(N/4). Making that change touches only `cem.sv`.

### Set 3: finding the deciding bit

Inside a group, bit i decides "A > B" when all four of these hold:

* the groups above are equal (`E`);
* the bits above i inside this group are equal (the XNORs of the higher bits);
* the bits differ at i (`x_i`);
* A has the 1 there (`A_i`). Together with `x_i`, this means `A_i & ~B_i`.

Each flag is one NAND of those inputs, so it is active low. The most
significant bit of a group needs the fewest inputs, and bit 0 needs the most.
Only one bit in the whole word can meet the first three conditions. So at
most one `c_n` in the word is 0, and that happens only when A > B.

Nothing separate detects A < B. It is whatever is left once "greater" and
"equal" are ruled out.

### Set 4 and set 5

Set 4 NANDs a group's four flags into `G_k`. `G_k` is 1 only in the group
that decided A > B.

Set 5 works out the remaining outcome:

    ALB = NOR(G_(N/4-1), ..., G_0, AEB)
    AGB = NOR(ALB, AEB)
    AEB = E out of group 0

`AGB` is built from `ALB` rather than from an OR of the `G`s. This means
exactly one flag is always 1, for any values of the `G`s.

### Worked example (16 bits)

This is the example that `tb/tb_worked_example_16bit.sv` checks, set by set:

    A          1010 1010 1010 1010
    B          1001 1001 1001 1001
    set 1 XNOR 1100 1100 1100 1100
    set 1 XOR  0011 0011 0011 0011
    set 2      E3..E0 = 1 0 0 0, AEB = 0
    set 3      1101 1111 1111 1111   (bit 13: A=1, B=0, bits 15 and 14 equal)
    set 4      G3..G0 = 1 0 0 0
    set 5      ALB = 0, AGB = 1, AEB = 0

## Interface and timing

`magnitude_comparator #(parameter int unsigned N = 64)`

| Port | Dir | Width | |
|------|-----|-------|--|
| `a` | in | N | operand A, unsigned |
| `b` | in | N | operand B, unsigned |
| `res` | out | `mc_pkg::cmp_result_t` | packed struct `{agb, aeb, alb}`, exactly one bit set |

The design is purely combinational. It has no clock, no reset and no
handshake. The result is valid one propagation delay after the operands
settle. To use it in a clocked design, register the operands, the result, or
both, as timing requires.

`N` must be a non-zero multiple of 4. Any other value stops elaboration with
an error.

## Modules

All files are in `rtl/`. Shared definitions are in `mc_pkg.sv`: `GROUP_W = 4`,
`DEFAULT_N = 64` and the result struct.

| Module | Role |
|--------|------|
| `set1_xor_xnor` | one-bit XOR/XNOR cell (set 1) |
| `set2_group_eq` | one stage of the equality chain (set 2) |
| `set3_bit_decide` | a group's four active-low decision flags (set 3) |
| `set4_group_gt` | a group's result `G` (set 4) |
| `cem_group` | one 4-bit slice: four set-1 cells plus sets 2, 3 and 4 |
| `cem` | N/4 slices chained through E; outputs `g[N/4-1:0]` and `aeb` |
| `fm_final` | set 5 |
| `magnitude_comparator` | top: `cem` followed by `fm_final` |

`cem` has two deferred assertions. One checks that at most one `g` bit is
set. The other checks that no `g` bit is set together with `aeb`. Both are
consequences of the structure described above.

At N = 64, coarse synthesis gives 64 XORs, 32 four-input AND reductions,
roughly 220 two-input ANDs, one 16-input OR and some inverters. There are no
flip-flops.

## What is faithful, and what is a reading

These parts follow the original design directly:

* the split into a CEM (sets 1 to 4) and an FM (set 5);
* four-bit groups and the 64-bit width;
* the gate type of each set;
* the equality chain between groups;
* the two-NOR structure of set 5;
* all the intermediate values of the worked example above.

These parts are choices made by this RTL:

* **Inputs of the set-3 NANDs.** The original drawing shows four NANDs per
  group with growing input counts, fed by E and set-1 outputs. It does not
  say which wires go to which input. The inputs used here are E, `A_i`,
  `x_i` and the higher XNORs. That choice reproduces the worked example and
  gives correct results for every operand pair.
* **E of the top group is a constant 1.** This is what the worked example
  requires.
* **Operands are unsigned.**
* **No registers.** There is no information about clocking, so the design is
  left fully combinational.

These parts are not modelled:

* **The 7-transistor EXOR/EXNOR cell.** Its full-swing output, transistor
  count and the resulting area, power and delay cannot be expressed in RTL.
  The original design quotes 1524 transistors, 5 mW and 4.34 ns in 180 nm
  CMOS. None of these figures can be checked here.
* **The earlier 8-transistor variant and a 6-transistor variant** that does
  not give full swing. The original design was only compared against these,
  so they are not built.

## Simulating

Each module has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each one prints `TB_RESULT checks=N failures=M` and ends with `$finish`.

* The small blocks are checked exhaustively: all input combinations of a
  4-bit group.
* `tb_cem` and `tb_magnitude_comparator` run at N = 64. They use random
  operands, equal operands and pairs whose first difference is at every bit
  position, in both directions. Results are compared with plain integer
  comparison.
* The top testbench also counts how often the decision fell in each of the
  16 groups and at each of the four positions within a group. It fails if
  any of these never happened, or if any of the three outcomes never
  happened.
* `tb_worked_example_16bit` instantiates the top at N = 16. It checks every
  intermediate word of the example above.

With Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/mc_pkg.sv \
        tb/tb_magnitude_comparator.sv --top-module tb_magnitude_comparator
    ./obj_dir/Vtb_magnitude_comparator

Replace the testbench file and top-module name to run another testbench.
Each one finishes in well under a second.
