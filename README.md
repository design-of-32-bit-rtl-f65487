# 32-bit carry-select adder from Gate Diffusion Input cells

A ripple-carry adder is slow because the carry must walk through every bit.
A carry-select adder (CSLA) cuts the operands into groups and computes each
group's result for both possible carry-ins in advance; when the real carry
arrives it only has to steer a multiplexer. The classic CSLA pays for this
with a second adder per group. This design uses two cheaper ideas instead:

* each group adds with a small **Brent-Kung** parallel-prefix adder, assuming
  a carry-in of 0;
* the carry-in-1 result is made by a **binary-to-excess-1 converter (BEC)**,
  which just adds one to the carry-in-0 result, instead of a second adder.

Every gate in the adder (AND, OR, XOR, NOT and the multiplexer) is built from
the **Gate Diffusion Input (GDI)** cell, a two-transistor cell aimed at low
power and small area. The "full-swing" GDI variant adds a restoring buffer so
that outputs reach the supply rails. The RTL here describes the logic of that
circuit cell by cell, so the netlist it gives has the same structure as the
transistor design. Delay, power and voltage swing belong to the transistor
level and are not modelled.

## The GDI cell, the only primitive

A GDI cell is one PMOS and one NMOS transistor with a shared gate `G` and a
shared output `Out`. The PMOS source is a free input `P`, the NMOS source a
free input `N`. With `G = 0` the PMOS conducts and `Out = P`; with `G = 1`
the NMOS conducts and `Out = N`. Logically the cell is a multiplexer steered
by `G`. Tying `N` and `P` to inputs or rails gives the whole function table
(`G = A` in every row):

| N    | P   | Out              | name |
|------|-----|------------------|------|
| 0    | B   | ~A & B           | F1   |
| B    | 1   | ~A \| B          | F2   |
| 1    | B   | A \| B           | OR   |
| B    | 0   | A & B            | AND  |
| ~B   | B   | A ^ B            | XOR  |
| C    | B   | ~A & B \| A & C  | MUX  |
| 0    | 1   | ~A               | NOT  |

XOR needs `~B`, which a second GDI cell wired as an inverter provides.
`gdi_cell` is the cell; `gdi_gate #(.FUNC(...))` wires one row of the table,
with the row chosen by the `gdi_func_t` enum in `csla_pkg`. Every other module
is made only of `gdi_gate` instances, so a synthesized netlist is nothing but
2:1 multiplexer cells (339 of them for the 32-bit adder).

## Brent-Kung adder with a carry-in

`bk_adder` has three stages:

1. **Initial processing** (`bk_pg_unit`): `Gi = ai & bi`, `Pi = ai ^ bi`.
2. **Prefix carry** (`bk_prefix_carry`): a tree of two cell types.
   A *black cell* merges the (G, P) pair of an upper span with that of the
   span just below it: `G = Gh | Ph & Gl`, `P = Ph & Pl` (two ANDs and an OR).
   A *gray cell* produces only `G = Gh | Ph & Gl` (one AND and one OR), for
   spans whose lower end is already a carry.
3. **Final processing** (`bk_final_sum`): `S0 = cin ^ P0`, `Si = C(i-1) ^ Pi`.

The prefix tree is the part that takes the most care. The carry-in is folded
into bit 0 first, with a gray cell: `C0 = G0 | P0 & cin`. From then on the
carry out of bit `i` is simply the group generate of span `i:0`, and any
merge whose span reaches bit 0 needs a gray cell only. The tree is the
Brent-Kung one:

* **up-sweep**, level `l` (spans of `2^l`): bit `i` with `(i+1)` a multiple
  of `2^(l+1)` merges with bit `i - 2^l`;
* **down-sweep**, from the second-highest level down to 0: bits
  `k*2^(l+1) + 2^l - 1` (`k >= 1`) take the carry of bit `i - 2^l`.

Bits not merged at a stage pass straight through; these are the tree's
buffer cells, which only restore drive strength and are plain wires here.
For the 4-bit adder used in each group the tree is:

```
stage 0 : C0 = gray(bit0, cin)
up l=0  : C1 = gray(bit1, C0)        (3:2) = black(bit3, bit2)
up l=1  : C3 = gray((3:2), C1)
down l=0: C2 = gray(bit2, C1)
```

`WIDTH` may be any power of two (8 and 16 bits are tested too); an
elaboration-time `$error` rejects other widths. Each stage is its own
generate block (`g_st[t].v`), so that lint tools do not mistake the tree for
a combinational loop.

## Binary-to-excess-1 converter

`bec` adds one: `x0 = ~b0`, and `xi = bi ^ (b(i-1) & ... & b0)`, with a chain
of AND gates forming the "all lower bits are one" terms. At its default
4 bits it reproduces the excess-1 table (0000 to 0001, ..., 1111 to 0000).
Inside the adder it is 5 bits wide: it takes the group's 4-bit sum *and* its
carry. A group whose carry-0 sum is 0_1111 therefore gets 1_0000 for
carry-in 1, and the carry is produced by the BEC, not lost.

## One carry-select group and the 32-bit adder

`csla_group` (GROUP = 4 bits):

```
 a,b ──> bk_adder (cin = 0) ──> r0 = {c, s[3:0]} ──┬──────────────> mux A
                                                   └─> bec (5 bit) ─> mux B
 sel (carry of the group below) ──────────────────────────────────> mux S
                                                  mux Y = {cout, sum[3:0]}
```

`mux2x1` is one GDI cell per bit: select on `G`, input A on `P` (taken when
`S = 0`), input B on `N` (taken when `S = 1`), so `Y = A & ~S | B & S`.

`csla32` (WIDTH = 32, GROUP = 4) has eight groups. Group 0 (bits 3:0) is a
plain `bk_adder` fed by `cin`. Groups 1 to 7 are `csla_group`s, each selected
by the carry of the group below. `cout` is the selected carry of group 7.
After the group adders and BECs have settled in parallel, the carry crosses
one multiplexer per group, seven in all.

Interface of `csla32`:

| port  | dir | width | meaning                        |
|-------|-----|-------|--------------------------------|
| a, b  | in  | WIDTH | addends                        |
| cin   | in  | 1     | carry into bit 0               |
| sum   | out | WIDTH | low WIDTH bits of a + b + cin  |
| cout  | out | 1     | carry out of the top bit       |

The adder is purely combinational: no clock, no reset, no latency.
`WIDTH` must be a multiple of `GROUP` with at least two groups; `GROUP` must
be a power of two.

## Where this RTL departs from, or fills in, the circuit

* Logic level only. The GDI cell's threshold-drop swing loss, the full-swing
  restoring buffer and the tree's buffer cells are analog matters and have
  no logic function; they are not modelled (the buffers are wires). The
  transistor design's delay (about 0.14 ns for 32 bits in 180 nm) and power
  (about 16 uW) cannot be reproduced here.
* The GDI XOR puts `~B` on the N input, made by a GDI inverter, since tying
  `N = B` would only pass `B`.
* The BEC in each group is 5 bits wide (sum and carry); the stand-alone
  converter defaults to the 4-bit table.
* The multiplexer has no enable input. A block symbol of the multiplexer
  shows one, but its equation and transistor schematic do not.
* The exact cell arrangement of the prefix tree and the point where `cout`
  is taken are this design's reading of the standard Brent-Kung and CSLA
  structures (`cout` is the selected carry of the top group).
* The carry-in is a port. The demonstrated additions use `cin = 0`.

## Files

| file | contents |
|------|----------|
| `rtl/csla_pkg.sv` | `gdi_func_t` (GDI table rows), `gp_t` (generate/propagate pair) |
| `rtl/gdi_cell.sv` | GDI cell |
| `rtl/gdi_gate.sv` | one GDI-table function from GDI cells |
| `rtl/bk_pg_unit.sv`, `bk_black_cell.sv`, `bk_gray_cell.sv`, `bk_prefix_carry.sv`, `bk_final_sum.sv`, `bk_adder.sv` | Brent-Kung adder and its cells |
| `rtl/bec.sv` | binary-to-excess-1 converter |
| `rtl/mux2x1.sv` | 2:1 multiplexer, WIDTH bits, one select |
| `rtl/csla_group.sv` | one carry-select group |
| `rtl/csla32.sv` | the adder (top) |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_csla_cases.sv` | the gate, BEC, multiplexer and 32-bit demonstration cases |
| `tb/tb_csla16.sv` | the adder at 16 bits |

## Verification

Every testbench compares against values computed independently (integer
addition, a bit-serial carry recurrence, truth tables written as constants)
and ends with a line `TB_RESULT checks=N failures=M`.

* Cells, gates, pg unit, final sum, BEC, multiplexer, group: exhaustive.
* Prefix tree and Brent-Kung adder: exhaustive at 4 and 8 bits, 20 000
  random vectors at 16 bits.
* `tb_csla32`, at the default 32 bits: directed corner cases (a carry through
  all eight groups, the largest sum, carry-out with `cin = 0`) and 200 000
  random operands, half of them with whole groups forced to propagate. It
  counts, per group, how often the carry selected the adder result and the
  BEC result, how often a BEC produced a group carry and how often a carry
  crossed all groups, and fails if any of these never happened.

Each testbench was also run against a deliberately broken copy of its module
(swapped GDI terminals, a missing down-sweep cell, a wrong select line and
so on) and reported failures.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/csla_pkg.sv \
          tb/tb_csla32.sv --top-module tb_csla32 -o sim
./obj_dir/sim
```

Replace `tb_csla32` by any other testbench. Verilator lint warns that the
`c` input of `gdi_gate` is unused for every row except MUX, and that the top
carry of `bk_final_sum` is unused (the adder takes it as `cout` directly);
both are expected. To change the size, set `WIDTH` and `GROUP` on `csla32`,
for example `csla32 #(.WIDTH(64), .GROUP(8))`.
