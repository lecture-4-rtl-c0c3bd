# Fast adders: a collection in SystemVerilog

An N-bit adder is easy to write down, since `sum_i = a_i ^ b_i ^ c_i`. Making it fast is the hard part, because the carry into bit i depends on every less significant bit. Each adder here computes those carries in its own way. They share one idea. A group of bits has a **generate** (it produces a carry out whatever comes in) and a **propagate** (a carry coming in goes straight out). Two adjacent groups merge with

    G = G_hi + P_hi · G_lo        P = P_hi · P_lo

This merge is associative. So the carries can be gathered in a tree of depth log N instead of a chain of length N. The adders differ in the shape of that tree, and in how much they compute ahead for both possible carries and then select.

Propagate is written as `a | b` wherever only carries depend on it, because OR is faster than XOR and gives the same carries. Sums always use `a ^ b`. Bit 0 is the least significant bit everywhere.

All of the logic is combinational: no clock, no registers and no reset. `adders_top` places all the adders side by side. Each adder has its own ports there, prefixed with its short name.

| module | width | carry in | idea |
|---|---|---|---|
| `hc_adder64` | 64 | no | dual-level carry select: 16-bit blocks selected by a 4-way lookahead |
| `cla64_radix4` | 64 | yes | three-level radix-4 carry-lookahead tree |
| `cla_folded32` | 32 | yes | two-level lookahead drawn as a folded tree |
| `carry_skip_adder` | 16 | yes | ripple groups plus a bypass chain, groups of unequal size |
| `carry_select_adder` | 16 | yes | each 4-bit group precomputes both carry vectors |
| `binary_tree_adder` | 8 | yes | radix-2 PG tree up, carry tree down |
| `kogge_stone_r2` | 16 | no | full radix-2 prefix tree |
| `kogge_stone_r4` | 16 | no | full radix-4 prefix tree |
| `han_carlson` | 16 | no | radix-2 tree on odd bits, one extra row for even bits |
| `ladner_fischer` | 16 | no | minimum depth, fanout doubling per row |
| `sparse_merge_adder32` | 32 | no | carry every 4 bits, 4-bit conditional sums |
| `ling_adder` | 16 | yes | Ling pseudo-carries, radix-4 group term |
| `sum_cell` | 1 | - | dual-rail `a ^ b ^ c` cell |

Widths are parameters wherever the structure allows. The table gives the defaults.

## The 64-bit dual-level carry-select adder

This is the most involved design. It reuses one trick at two levels.

**Top level (`hc_adder64`).** An ordinary lookahead adder sends generate/propagate up a tree and then carries back down. This adder stops the downward trip early. It only works out the carry into each of its four 16-bit blocks:

    cin16_0 = 0
    cin16_1 = g16_0
    cin16_2 = g16_1 + p16_1 g16_0
    cin16_3 = g16_2 + p16_2 (g16_1 + p16_1 g16_0)

Meanwhile, each 16-bit block has already formed its sum for both possible carry-ins. The block carry then only drives the final multiplexers. The adder has no carry in and no carry out. A subtracter would invert `b` outside this adder, and would need a carry-in of 1 that this design does not provide.

**16-bit block (`hc_block16`).** The block needs to be a very fast 16-bit adder itself, so it is built as a carry-select adder too, from four 4-bit blocks. For each 4-bit block, the carry into it is computed twice. The name `cin4c_b` means the carry into 4-bit block b, assuming the carry into the 16-bit block is c:

    cin40_0 = 0                          cin41_0 = 1
    cin40_1 = g4_0                       cin41_1 = g4_0 + p4_0
    cin40_2 = g4_1 + p4_1 g4_0           cin41_2 = g4_1 + p4_1 (g4_0 + p4_0)
    cin40_3 = g4_2 + p4_2 (...)          cin41_3 = g4_2 + p4_2 (...)

The block's own terms, `g16` and `p16`, are built from the same `g4`/`p4`. The 16-bit adder shares its generate/propagate logic with the 64-bit level.

**4-bit block (`hc_block4`).** This block holds two 2-bit leaves. The lower leaf takes `cin40`/`cin41` directly. For the upper leaf, the carry in is `g2_0 + p2_0 · cin4c`, again once for each c. The block outputs `g4 = g2_1 + p2_1 g2_0` and `p4 = p2_0 p2_1`.

**2-bit leaf (`hc_block2`).** This leaf forms `p2` and `g2`, and four speculative sum bits `sumc_b`: bit b of the pair, assuming a carry c into the pair:

    sum0_0 = a0 ^ b0           sum1_0 = ~(a0 ^ b0)
    sum0_1 = a1 ^ b1 ^ a0 b0   sum1_1 = a1 ^ b1 ^ (a0 + b0)

The result is selected in two steps. The speculative carries `cin2_0`/`cin2_1` first pick a candidate result for each guess of the 16-bit carry. Then `cin16` picks between those two candidates. `cin16` arrives last, so it goes through only the final multiplexer.

The speed of this structure comes from keeping every P, G and carry term monotonic, which suits domino logic. Only the sum multiplexers need both polarities. That circuit level is not expressible in RTL: dual-rail domino gates, delayed precharge clocks and skewed static gates. Only the logic is given here.

## Lookahead trees

`cla4_block` is the radix-4 lookahead block. From four (g, p) pairs and a carry `c0`, it gives the group terms G3:0 and P3:0 and the carries C1, C2, C3. The group terms do not depend on `c0`, and the code keeps the upward and downward paths apart.

`cla64_radix4` uses this block at three levels: 16 blocks over the bits, 4 over 4-bit groups and 1 over 16-bit groups. Group terms go up the tree. C0 comes down as C16/C32/C48, then C4…C60, then the individual bit carries. The slowest path is

    a,b → G0 → G3:0 → G15:0 → G47:0 → C48 → C60 → C63 → s63

`LEVELS` sets the depth, with `N = 4**LEVELS`.

`cla_folded32` uses the same block for 32 bits. Eight 4-bit blocks feed two 16-bit super-blocks. A final pair of AND-OR terms produces C16 and Cout.

`binary_tree_adder` is the radix-2 version, written as loops over levels. The lower half of every group inherits the group's carry. The upper half gets `G(lower) + P(lower) · carry`.

## Prefix trees

A lookahead tree forms only one group per node, so it needs a second tree to distribute carries. A **prefix tree** instead gives every bit position the group that reaches down to bit 0, `G(i:0)`. The carry into bit i is then `G(i-1:0)`, and the carry tree disappears. The prefix adders here differ only in which merges they place:

- `kogge_stone_r2`: at row l, bit i merges with bit i − 2^(l−1). It has log2 N rows and fanout 2, but many nodes and long wires. At 64 bits, its six rows are the basis of a minimum-delay estimate for any adder.
- `kogge_stone_r4`: each node merges four groups, so 16 bits need two rows.
- `han_carlson`: the same tree on odd bits only, about half the nodes. One more row recovers the even bits.
- `ladner_fischer`: minimum depth with few nodes. The node that ends a lower half drives the whole upper half, so fanout grows 1, 2, 4, 8.
- `sparse_merge_adder32`: the tree stops at every fourth carry (C3, C7, …, Cout). Each 4-bit slice computes its sum for carry-in 0 and 1 while the tree works. A 4-bit 2:1 multiplexer makes the final choice, so the missing carries cost no extra ripple.

`ling_adder` uses Ling's pseudo-carry `H_i = g_i + t_(i-1) H_(i-1)`, where `t = a | b`. It is related to the true carry by `G_i = t_i H_i`. Factoring `t_i` out makes the radix-4 group term one literal shorter per product:

    H_3 = g3 + g2 + t2 g1 + t2 t1 g0

That shortens the gate stacks and lightens the input load. The adder uses this term for 4-bit groups chained across the word, and the plain recurrence inside each group. The carry into bit i is `t_(i-1) H_(i-1)`.

## Bypass and select

`carry_skip_adder` ripples the carry within each group, with all groups working in parallel. A global chain links the groups: `Cout_g = ripple_out + Pg · Cin_g`. Equal groups are not optimal. The low groups should grow so that each produces its carry as the global chain reaches it. The high groups should shrink so that their last ripples all end together. Group sizes are therefore a parameter array, `GS`, least significant group first. The default is 2-3-4-4-3 for 16 bits.

`carry_select_adder` runs two carry chains in each 4-bit group, one for carry-in 0 and one for carry-in 1. The incoming carry selects a whole carry vector.

`sum_cell` is the logic of a dual-rail pass-gate sum cell. An XOR/XNOR stage feeds a multiplexer steered by C and C̄, and a buffer drives S and S̄.

## How far to trust it

Every module has a self-checking testbench in `tb/` that compares the module with integer addition. The 8-bit tree adder, `cla4_block`, the 2- and 4-bit leaves and the sum cell are checked exhaustively. The wider adders get 4,000 vectors each: random operands, operands whose carry must cross the whole word (`b = ~a` with a carry at bit 0), and a generate under a long propagate run. A testbench fails if no vector carried through the whole word.

`adders_top_tb` runs all adders at their default sizes. It counts each adder's distinctive event and fails if any event never happened:

- a 16-bit block taking its carry-in-1 result;
- C0 reaching C64;
- a bypass group carrying the chain;
- a select group or sparse slice taking its carry-in-1 result;
- a Ling chain running from the carry in to the top bit.

`kogge_stone_r2_64_tb` runs the radix-2 prefix tree at 64 bits. `binary_tree_adder_16_tb` runs the binary tree adder at 16 bits.

The testbenches check logic only. Delay, energy and transistor width, which are what distinguish these adders in practice, are circuit properties that RTL cannot show. A synthesis tool will also restructure much of this logic.

## Where the RTL makes its own choices

- **Equation readings.** Three equations are implemented in the following forms:
  - `p16` is the AND of the four 4-bit propagates, matching how `g16` is formed.
  - The carry into the upper 2-bit pair for guess 1 uses `cin41`.
  - The Ling sum is `(a_i ^ b_i) ^ t_(i-1) H_(i-1)`.
- **Unspecified widths.** Widths that were not fixed were chosen as 16 bits: the bypass, select and Ling adders.
- **Tree node placement.** The exact nodes of the Ladner-Fischer tree and of rows 3-5 of the sparse 32-bit tree were not fully specified. Both use the minimum-depth, growing-fanout pattern.
- **Carry out.** The prefix-tree adders output a carry out (`G(N-1:0)`) although their diagrams show only sums. They have no carry in.
- **No subtracter.** The 64-bit carry-select adder has no carry in or out, so nothing here subtracts.

## Simulating

Every module's file starts with a comment describing its interface and structure. Modules that use `adder_pkg` need the package first on the command line. To run one testbench:

    verilator --binary --timing --top-module hc_adder64_tb \
        rtl/adder_pkg.sv rtl/hc_block2.sv rtl/hc_block4.sv rtl/hc_block16.sv \
        rtl/hc_adder64.sv tb/hc_adder64_tb.sv
    ./obj_dir/Vhc_adder64_tb

To run the whole collection:

    verilator --binary --timing --top-module adders_top_tb -Irtl rtl/*.sv tb/adders_top_tb.sv
    ./obj_dir/Vadders_top_tb

Each testbench ends with a line `TB_RESULT checks=<n> failures=<m>`.
