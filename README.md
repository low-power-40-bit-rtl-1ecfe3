# Modified square-root carry select adder (40 bits)

A ripple carry adder is small but slow: the carry has to pass through every
bit. A carry select adder (CSLA) cuts the word into groups and computes each
group's sum twice in parallel, once for an incoming carry of 0 and once for
1; when the real carry arrives from below, a multiplexer only picks one of
the two. The classic CSLA pays for this with a second ripple adder per group.

This design keeps one ripple adder per group (for carry in 0) and derives the
carry-in-1 result from it with a **binary to excess-1 converter (BEC)**, a
small "add one" circuit made of an inverter, a chain of AND gates and XOR
gates. Because adding 1 is much simpler than a full addition, the BEC costs
fewer gates than the ripple adder it replaces, at the price of a few gate
delays. The groups grow in width from the LSB upward (a "square-root" CSLA),
so that each group's local result is ready at about the time the carry from
below reaches its multiplexer.

The RTL is purely combinational: `{cout, sum} = a + b + cin`, no clock, no
reset, no pipeline registers.

## Group layout

| group | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|---|
| bits (WIDTH = 40) | 1:0 | 3:2 | 6:4 | 10:7 | 15:11 | 21:16 | 28:22 | 36:29 | 39:37 |
| width | 2 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 3 |
| BEC / mux | – | 3-bit / 6:3 | 4-bit / 8:4 | 5-bit / 10:5 | 6-bit / 12:6 | 7-bit / 14:7 | 8-bit / 16:8 | 9-bit / 18:9 | 4-bit / 8:4 |

Group 0 is a plain 2-bit ripple adder that takes the external `cin`. For a
16-bit adder the layout is the first five groups, 2-2-3-4-5, which is the
reference structure the design is worked out for. Beyond 16 bits the same
rule (each group one bit wider than the one before) is continued, and the
last group is cut to the bits that remain: for 40 bits that leaves a 3-bit
top group. This continuation is a choice of this implementation; a different
split of the upper 24 bits would work the same way and only change timing.
The rule is in `csla_pkg.sv` (`group_lsb`, `group_width`, `num_groups`) and
holds for any `WIDTH >= 2`.

## How one group works

For an N-bit group (`csla_group`):

1. `rca_c0` adds the group's slices of `a` and `b` assuming no carry in: a
   half adder in the LSB, full adders above. Its result `{c0, s0}` has N+1
   bits.
2. `bec_select` (an (N+1)-bit BEC plus a (2N+2):(N+1) mux) produces
   `{c0, s0}` when the carry from below is 0 and `{c0, s0} + 1` when it is 1.
   The mux output is the group's sum bits and its carry out.

The BEC on N+1 bits computes `x[0] = ~b[0]`, `x[i] = b[i] ^ (b[0] & ... & b[i-1])`,
i.e. `b + 1 mod 2^(N+1)`. Its wrap from all ones to zero never happens inside
the adder, because `a + b` on N bits is at most `2^(N+1) - 2`; the carry out
of a group is therefore always correct. A carry passes *through* a group
(carry in 1, carry out 1 with a 0 local carry) exactly when the local sum is
all ones; then the BEC's top bit turns the carry on.

The carry chain across the adder is: `cin` into group 0's ripple adder, then
one mux per upper group. Every group's ripple adder and BEC work in parallel
with all the others.

## Cost in the unit-gate model

In the model this design is sized with, each basic gate (AND, OR, inverter)
costs one unit of delay and one unit of area. The leaf cells are built from
those gates so that the model can be read straight off the RTL:

| cell | gates | delay | area |
|---|---|---|---|
| XOR (`xor_aoi`) | 2 NOT, 2 AND, 1 OR | 3 | 5 |
| 2:1 mux, per bit (`mux2n`) | 1 NOT, 2 AND, 1 OR | 3 | 4 |
| half adder | XOR + AND | 3 | 6 |
| full adder | 2 XOR + 2 AND + OR | 6 | 13 |

Counting the gates of the RTL before any optimisation gives, per upper group
of width 2, 3, 4, 5: **43, 66, 89, 112** units (each extra bit adds one full
adder, one XOR and one AND of the BEC and one mux bit, 23 units). The 2-bit
figure, 43, is the published value for this structure; the published figures
for the 3-, 4- and 5-bit groups are 61, 84 and 107, 5 units lower than what
the same cell costs add up to. The published 16-bit totals (295 units against
408 for a CSLA with two ripple adders per group, a saving of 113) become 310
against 408 with these counts, a saving of 98. The RTL follows the structure,
not the lower numbers. Published unit-gate delays for the four upper groups
of the 16-bit adder are 13, 16, 19 and 22, against 11, 13, 16 and 19 for the
two-ripple-adder version.

The published circuit results for the 40-bit version (0.13 um CMOS, 1.5 V,
125 MHz) are a delay of 6.316 ns and a switching power of 1057.5 uW, against
5.986 ns and 1283.7 uW for the two-ripple-adder CSLA: about 15.6 % better in
power-delay product. Those depend on the process and layout and cannot be
checked from this RTL.

## Files

Modules, bottom-up (`rtl/`):

| module | what it is | parameters (default) |
|---|---|---|
| `csla_pkg` | group layout functions | – |
| `xor_aoi` | XOR from AND/OR/NOT | – |
| `mux2n` | N-bit 2:1 mux (`in0` for sel 0, `in1` for sel 1) | `N` (4) |
| `half_adder`, `full_adder` | 1-bit adders | – |
| `rca` | ripple adder with carry in (group 0) | `N` (2) |
| `rca_c0` | ripple adder for carry in 0 (HA + FAs) | `N` (2) |
| `bec` | binary to excess-1 converter | `N` (4, at least 2) |
| `bec_select` | BEC + 2N:N mux: `s = cin ? b+1 : b` | `N` (4) |
| `csla_group` | one upper group | `N` (2) |
| `sqrt_csla` | the adder, top level | `WIDTH` (40) |

Top-level ports of `sqrt_csla`: `a[WIDTH-1:0]`, `b[WIDTH-1:0]`, `cin` in;
`sum[WIDTH-1:0]`, `cout` out.

Testbenches (`tb/`) are self-checking and print
`TB_RESULT checks=N failures=M`:

- `tb_xor_aoi`, `tb_half_adder`, `tb_full_adder`, `tb_mux2n`, `tb_bec_select`:
  exhaustive.
- `tb_rca`: exhaustive at 2 and 7 bits; `tb_rca_c0`: exhaustive at 1, 2 and
  8 bits.
- `tb_bec`: the 4-bit function table and bit equations, plus 2- and 6-bit
  instances and the all-ones wrap.
- `tb_csla_group`: exhaustive for group widths 1, 2, 3, 4, 6.
- `tb_sqrt_csla`: the 40-bit default adder, directed corner cases and
  200,000 pseudo-random vectors against a 41-bit reference. Per upper group it
  counts selections of the carry-in-0 result, of the BEC result, and carries
  that pass through the group, plus carries from `cin` all the way to `cout`.
  It fails if any of these never happens.
- `tb_sqrt_csla16`: the same at `WIDTH = 16` (groups 2-2-3-4-5).

## Simulating

With Verilator 5 (the package must be read first):

    verilator --binary --timing -Irtl rtl/csla_pkg.sv tb/tb_sqrt_csla.sv \
        --top-module tb_sqrt_csla -o sim
    ./obj_dir/sim

Any other testbench is run the same way with its own name. Each finishes in
well under a second. Lint a module with

    verilator --lint-only -Wall -Irtl rtl/csla_pkg.sv rtl/sqrt_csla.sv

## Changing it

- Width: set `WIDTH` on `sqrt_csla`; the groups follow the rule above.
- Another group split: change `nominal_group_width` in `csla_pkg`. Any
  sequence of positive widths works functionally; the square-root growth is
  what balances the delay.
- The leaf cells are gate-level on purpose, so the unit-gate model can be
  read from the code; synthesis will restructure them anyway.

## Departures and open points

- The split of bits 16 to 39 into groups (6, 7, 8, 3) is this
  implementation's own; only the 16-bit layout is fixed by the reference
  design.
- The internals of the half adder, the full adder and the mux are chosen to
  match the unit delay and area costs above; only those costs are given.
- The gate counts of the 3- to 5-bit groups differ from the published ones as
  described above.
- The two-ripple-adder CSLA used as the comparison baseline is not included.
- The adder is unregistered. At the 125 MHz clock it was characterised at,
  it would sit between registers of the surrounding datapath (for instance a
  multiply-accumulate unit), which are not part of this design.
