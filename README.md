# Delay-optimized sparse-4 Kogge-Stone adder, 16 bits

A 16-bit parallel prefix adder that computes `s = a + b + cin` (modulo 2^16)
in a single combinational pass. It starts from the *sparse-4 Kogge-Stone*
adder. That adder's prefix tree computes only every fourth carry, and short
ripple chains of full adders finish the sum between those carries. This
version shortens the tree in two ways:

* **Wide cells instead of more levels.** Each four-bit group's generate and
  propagate comes from one fan-in-4 cell (a flat sum of products) instead of
  two levels of two-input cells. The carries into bits 8 and 12 are formed
  side by side rather than one after the other.
* **A shortcut for the most significant bit.** In a plain sparse adder the
  MSB sum waits for the carry into bit 12 and then for a ripple through bits
  12-14. Here a dedicated fan-in-4 grey cell forms the carry into bit 15
  straight from the carry into bit 12 and the generate/propagate of bits
  12-14. One XOR then finishes the MSB.

The adder has no clock, no state and no carry out. Bit numbers in this
introduction are RTL indices, 0..15; the next section relates them to the
published numbering used in the tree table.

## Bit numbering

The published description numbers the bits 1..16, with the carry in below
bit 1. Group signals are written `G x:y`, the generate of bits x down to y.
`G x:cin` is the carry out of bit x, which is the carry *into* bit x+1. The
RTL numbers bits 0..15, so published bit k is RTL bit k-1. The
comments use the published names (`G4:1`, `G12:cin`, ...) because they make
the equations readable. The signal names use the RTL index of the bit the
carry goes into: `c4` is `G4:cin`, the carry into RTL bit 4.

## The three stages

```
 a,b,cin
   |
 pg_preprocess        g = a & b, p = a ^ b      (bits 0..14)
   |
 ds4_carry_tree       c4, c8, c12, c15          (4 cell levels)
   |
 ripple_carry_adder x4   bits 0-3 (cin), 4-7 (c4), 8-11 (c8), 12-14 (c12)
 msb_sum_cell            bit 15 = a15 ^ b15 ^ c15
```

### Generate and propagate (`pg_preprocess`)

`G_i = A_i & B_i` says that bit i creates a carry. `P_i = A_i ^ B_i` says that
it passes an incoming carry through. The shared stage covers bits 0..14. The
MSB's propagate is formed inside `msb_sum_cell`, next to the only gate that
uses it.

### The carry tree (`ds4_carry_tree`)

This is the part that makes the design what it is. Two kinds of prefix cell
are used:

* A **black cell** takes (G, P) pairs of adjacent spans and produces the
  (G, P) of the combined span.
* A **grey cell** is used when the lowest span already reaches down to the
  carry in. Only the generate is needed then, and that generate *is* the
  carry.

Both are written as one flat sum-of-products level for any fan-in n (operand
0 least significant):

```
G = g[n-1] + p[n-1]·g[n-2] + p[n-1]·p[n-2]·g[n-3] + ... + p[n-1]···p[1]·g[0]
P = p[n-1]·p[n-2]···p[0]                (black cell only)
```

The tree, in published bit numbering:

| level | cell | fan-in | equation | RTL signal |
|---|---|---|---|---|
| 1 | BC1 | 4 | `G4:1 = G4 + P4·G3 + P4·P3·G2 + P4·P3·P2·G1`, `P4:1 = P4·P3·P2·P1` | `gb[0], pb[0]` |
| 1 | BC2 | 4 | same over bits 8..5 | `gb[1], pb[1]` |
| 1 | BC3 | 4 | same over bits 12..9 | `gb[2], pb[2]` |
| 2 | GC1 | 2 | `G4:cin = G4:1 + P4:1·Cin` | `c4` |
| 3 | GC2 | 2 | `G8:cin = G8:5 + P8:5·G4:cin` | `c8` |
| 3 | GC3 | 3 | `G12:cin = G12:9 + P12:9·G8:5 + P12:9·P8:5·G4:cin` | `c12` |
| 4 | GC4 | 4 | `G15:cin = G15 + P15·G14 + P15·P14·G13 + P15·P14·P13·G12:cin` | `c15` |

Two points are easy to miss:

* GC3 does not wait for GC2. It reaches past it to the block pair `(G,P)8:5`
  from BC2 and to `G4:cin` from GC1. That is why a fan-in of 3 is needed, and
  why `c8` and `c12` appear at the same level.
* GC4 skips the ripple chain of bits 13-15. Its inputs are the raw
  generate/propagate bits of those three positions plus `G12:cin`, so the
  carry into the MSB is ready one cell level after `c12`.

The classic sparse-4 Kogge-Stone tree uses two-input cells throughout and
needs four cell levels to reach the carries into bits 9 and 13. Here those
carries are ready after three levels, and the carry into the MSB after four.

### Sum stage (`ripple_carry_adder`, `full_adder`, `msb_sum_cell`)

Each tree carry enters a chain of full adders. The chain ripples it through
its bits and produces their sums. The chains of bits 0-3, 4-7 and 8-11 are 4
long, and the chain of bits 12-14 is 3 long. The chains' own carry outs are
not used, because every chain after the first takes its carry from the tree.
In `ds4_ksa16` they are therefore left open: verilator reports this as
`PINCONNECTEMPTY`, and the warning is expected. The MSB sum is
`s15 = (a15 ^ b15) ^ c15`.

The longest paths therefore end in bits 12-14 (three cell levels, then a
ripple through up to three full adders) and bits 8-11 (three levels, then
up to four full adders). Bit 15 ends after four cell levels and one XOR.

## Files

| file | contents |
|---|---|
| `rtl/ppa_pkg.sv` | constants `WIDTH = 16`, `SPARSITY = 4`, `PG_BITS = 15` |
| `rtl/ds4_ksa16.sv` | top: `a[15:0]`, `b[15:0]`, `cin` → `s[15:0]` |
| `rtl/pg_preprocess.sv` | generate/propagate stage, parameter `WIDTH` (default 15) |
| `rtl/ds4_carry_tree.sv` | the tree above; `g, p [14:0]`, `cin` → `c4, c8, c12, c15` |
| `rtl/black_cell.sv` | wide black cell, parameter `FANIN` (default 4) |
| `rtl/grey_cell.sv` | wide grey cell, parameter `FANIN` (default 4, must be ≥ 2); `g[FANIN-1:0]` (bit 0 is the incoming carry), `p[FANIN-1:1]` |
| `rtl/ripple_carry_adder.sv` | chain of full adders, parameter `WIDTH` (default 4), with `co` |
| `rtl/full_adder.sv` | one-bit full adder |
| `rtl/msb_sum_cell.sv` | MSB propagate and sum |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Every module is purely combinational.

## Simulating

Each testbench prints one line `TB_RESULT checks=N failures=M` and ends.
From the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing -y rtl rtl/ppa_pkg.sv tb/tb_ds4_ksa16.sv --top-module tb_ds4_ksa16
./obj_dir/Vtb_ds4_ksa16
```

To run another testbench, replace `tb_ds4_ksa16` with its name.

What the testbenches check:

* `tb_ds4_ksa16` runs the whole adder. It uses the published example
  32768 + 28672 = 61440 and three more published 16-bit sums (513 + 770,
  12448 + 9376, 801 + 258). It also runs corners, propagate/generate runs
  at every position, and 200,000 random vectors, all against integer
  addition. It counts how often each carry of the tree was 1, how often
  `cin` crossed a whole group, and how often GC3 carried across bits 4-11. It
  also counts how often GC4 jumped bits 12-14, how often a carry rippled
  through a full chain, and how often the sum wrapped past 2^16. Any of these
  that never happens counts as a failure.
* `tb_ds4_carry_tree` compares each tree carry with bit k of the integer
  sum of the low k bits.
* The cell testbenches are exhaustive. `black_cell` and `grey_cell` are
  tested at fan-ins 2, 3 and 4, against a fold of the two-input prefix
  operator and, for the grey cell, against integer carries.
  `ripple_carry_adder` is tested at widths 3 and 4.

Every testbench has a watchdog that ends the run with a failure.

## Changing it

* The cell fan-ins are parameters, and the cells can be reused in other
  sparse trees.
* The tree itself is hand-wired for 16 bits and sparsity 4, which is why
  `WIDTH` and `SPARSITY` are package constants rather than parameters of the
  top. A different width means a different tree.
* Synthesis tools are free to restructure this logic. To keep the published
  cell structure for timing, keep the hierarchy of `black_cell`,
  `grey_cell` and `full_adder` (e.g. a keep-hierarchy attribute or option in
  your flow).

## Where this RTL departs from, or goes beyond, the published design

* **No carry out.** The published adder ends at the 16th sum bit and shows
  no carry out, and this RTL keeps it that way. If you need one, it is
  `G16:cin = G16 + P16·G15:cin`: one more grey cell of fan-in 2 beside
  `msb_sum_cell`.
* **GC1** is drawn in the published structure, but its equation is not
  written out. It is built as the two-input grey cell
  `G4:1 + P4:1·Cin`.
* **The final stage.** The prose speaks of "16 ripple carry adders", while
  the structure shows 15 full adders in four chains plus the separate MSB
  cell. The structure was followed.
* **Full-adder gates** are not specified. The textbook equations are used.
* **Generic cells.** The black and grey cells are each one module with a
  `FANIN` parameter rather than hand-written equations per cell. The logic
  function is the same.
* **Timing results are not reproduced.** The published evaluation reports
  delay, area and power:
  * FPGA (Spartan-7): 9.570 ns against 10.123 ns for the plain sparse-4
    Kogge-Stone adder.
  * ASIC (180 nm): 17.8 % less delay than sparse-4 Kogge-Stone.

  These depend on the synthesis flow and library, and simulation of this RTL
  says nothing about them. The RTL has been checked for function only.
