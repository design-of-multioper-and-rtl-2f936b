# Carry-save multioperand adders built around the FPGA carry chain

Adding many operands at once (filters, multipliers, sums of absolute
differences) is normally done with a tree of carry-save adders, which never
propagate a carry and so cost one full-adder delay per level. On FPGAs such
trees are usually avoided: the dedicated carry chain makes an ordinary
carry-propagate adder (CPA) very fast, and a naive carry-save adder costs as
much area as a CPA without using that chain.

The idea in this design is to turn the carry chain to the carry-save tree's
advantage. The tree is laid out as a **linear array** of carry-save adders
(CSAs), and the carry word of every CSA is fed into the carry input of the
next one. The carry therefore runs in one unbroken chain from the first
operand to the final carry word, which is exactly the path an FPGA carry
chain makes fast. Only the sum words travel through general routing. If the
chained path is taken as free, the array behaves like a balanced tree of
`ceil(log2(Nop-1))` levels, although it has `Nop-2` CSAs in a row. The area
equals that of a CPA tree: `Nop-2` CSAs, each the size of a CPA.

All units are combinational and return the result in **carry-save form**: a
sum word `sf` and a carry word `cf` whose sum is the total. Converting to a
plain binary number (one final CPA) is left to the user.

## The units

| unit (module) | what it is | default size |
|---|---|---|
| `linear_array_3to2` | linear array of 3:2 CSAs, one chained carry word | 9 operands, 16 bits |
| `linear_array_5to3` | linear array of 5:3 stages (ternary-adder cells), two chained carry words | 11 operands, 16 bits |
| `compressor_tree_4to2` | classic tree of 4:2 compressors | 9 operands, 16 bits |
| `multioperand_adders_top` | all of them side by side: 9:2 and 5:2 binary arrays, 11:2 and 5:2 ternary arrays, 9:2 4:2-tree | 16 bits |

Building blocks: `full_adder` (3:2 counter), `csa_row` (W-bit CSA),
`counter_5to3` and `ternary_csa_row` (W-bit 5:3 stage), `compressor_4to2` and
`compressor_4to2_row` (W-bit 4:2 compressor), and the package `mop_pkg`
(default width and `cs_width()`).

## How the binary linear array is wired

A CSA has two *regular* inputs `a`, `b` and a *carry* input `ci`. Its carry
word leaves already shifted one place left, so bit `i` of one CSA's carry
enters bit `i+1` of the next CSA: the chain runs diagonally through the
array. The wiring rule is:

1. CSA 0 takes `a = I2`, `b = I1`, `ci = I0`.
2. Every later CSA takes `ci` from the carry of the CSA before it, and its two
   regular inputs from a first-in first-out list. The list holds the remaining
   operands `I3, I4, ...` first, then the sum words `S0, S1, ...` in the order
   they were produced.
3. The sum word of the last CSA is `sf`; its carry word is `cf`.

For 9 operands this gives:

```
CSA0: I2, I1 | ci = I0        -> S0
CSA1: I4, I3 | ci = carry0    -> S1
CSA2: I6, I5 | ci = carry1    -> S2
CSA3: I8, I7 | ci = carry2    -> S3
CSA4: S0, S1 | ci = carry3    -> S4
CSA5: S2, S3 | ci = carry4    -> S5
CSA6: S4, S5 | ci = carry5    -> sf, cf
```

Operands go in first and early sums are consumed first. This lets the slow
regular paths overlap with the chained carry as much as possible. In the
time model, CSA0 to CSA3 form level 0, CSA4 and CSA5 level 1 and CSA6 level 2.
With an even operand count, the last operand is paired with `S0`. In the
RTL the list is an array `item[]`: entry `j < Nop-3` is operand `I(j+3)`,
entry `Nop-3+k` is the sum of CSA `k`, and CSA `k >= 1` reads entries
`2k-2` and `2k-1`.

## The ternary (5:3) linear array

The same scheme built on ternary adders. Each bit of a 5:3 stage
(`counter_5to3`) adds three regular bits and two carry bits and gives a sum
bit and two carry bits (`a+b+c+cAi+cBi = s + 2(cA+cB)`). Inside, a first 3:2
counter reduces `a, b, c`, and its carry becomes `cA`. A second counter adds
the result to the two incoming carries, and its carry becomes `cB`. Both carry
words go to the next stage's carry inputs, so each stage removes two words:

```
stage 0: I4, I3, I2 | cBi = I1, cAi = I0
stage 1: I5, I6, I7  | carries of stage 0
stage 2: I8, I9, I10 | carries of stage 1
stage 3: S0, S1, S2  | carries of stage 2
closing: 0, 0, S3    | carries of stage 3   -> sf, cf  (cA is always 0 here)
```

The closing stage has two zero regular inputs. It merges the last sum and the
two carry words into two words. An assertion checks that its cA output is
always zero. Operand counts that are even, or below 5, are padded with zero
operands up to the next odd count of at least 5.

## The 4:2 compressor tree

The regular tree is the other structure offered, built from 4:2 compressors.
A 4:2 compressor is two 3:2 counters. The
carry of the first counter goes sideways to the next bit and does not depend
on that bit's incoming carry, so nothing ripples. Each compressor turns four
words into two, so `ceil(Nop/2) - 1` compressors are used. An odd `Nop` gets
one zero operand. The compressors take words four at a time from a
first-in first-out list of operands followed by their own outputs, which fills
the tree level by level.

## Widths and number format

Operands are unsigned `N`-bit numbers. Internally every bus is
`W = N + ceil(log2 Nop)` bits wide (`mop_pkg::cs_width`), so the exact sum
always fits. Carries out of bit `W-1` are dropped, so the result is
`(sf + cf) mod 2^W`, which equals the true sum. `cf` is already aligned: bit
0 is always 0, and you add it to `sf` as is.

## Interface and timing

Every unit has an input array `ops[NOP]` of `N`-bit words and outputs `sf`,
`cf` of `W` bits. There is no clock, reset or handshake. Outputs are valid one
combinational delay after the inputs settle. If you need registers, wrap a
unit in them. The top brings out each unit's own `*_ops`, `*_sf` and `*_cf`
ports. Its only parameter is `N`.

Parameters: `NOP` (operand count; at least 3 for the binary array), `N`
(operand width), `W` (bus width, derived by default). Row modules take `W`
(at least 2).

## How far it can be trusted, and where it departs

- The wiring of the 9:2 and 5:2 binary arrays and of the 11:2 ternary array
  follows the published arrangements. The testbenches rebuild those
  arrangements with independent CSA functions and require the outputs to match bit for bit.
  They also check the arithmetic of every unit at many operand counts.
- The RTL describes logic, not FPGA mapping. On an FPGA each CSA row is
  meant to sit on a LUT column plus its carry chain, so that the chained carry
  uses the fast carry path. Here the rows are plain full-adder equations, and
  how they map is up to the synthesis tool. The speed advantage depends on
  that mapping and is not reproduced by simulation.
- The internal structure of the 5:3 cell and of the 4:2 compressor is this
  design's own choice. Both are built from two 3:2 counters. A vendor's
  ternary-adder or 4:2 cell may split the logic differently; the
  arithmetic is the same.
- The 4:2 tree's shape beyond its compressor count, the zero padding rules,
  the wider `W` buses and the unsigned operand format are this design's own
  choices.
- A signed-digit version (done by inverting some inputs and outputs) and the
  final carry-propagate conversion are not included.

## Simulating

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/mop_pkg.sv \
    tb/tb_linear_array_3to2.sv --top-module tb_linear_array_3to2 -Mdir obj
./obj/Vtb_linear_array_3to2
```

- `tb_csa_row`, `tb_ternary_csa_row`, `tb_compressor_4to2_row`: exhaustive at
  a small width, random at 16 bits.
- `tb_linear_array_3to2`, `tb_linear_array_5to3`, `tb_compressor_tree_4to2`:
  several operand counts side by side, plus the bit-exact checks of the published
  9:2, 5:2 and 11:2 arrays.
- `tb_multioperand_adders_top`: the whole top at its default parameters. The
  two 9-operand units get the same operands, and so do the two 5-operand
  units, and their results must agree. It also counts that live carry words,
  results wider than `N` bits and the full-scale case all occur.
- `tb_workload_n64`: the top at `N = 64`, plus 32-operand arrays and tree of
  64-bit operands.

To change a size, override `NOP` and `N` on the unit. `W` follows
automatically.
