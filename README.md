# Two-phase mixed dynamic/static arithmetic: a 16-bit carry-select adder and a 64-bit comparator

Dynamic CMOS logic is fast but only does useful work during half of each
clock cycle: while the clock is low it precharges, and only while the clock
is high does it evaluate. A way to use the whole cycle is to cut a circuit
into two groups of stages. The first group evaluates while the clock is high,
the second while it is low (it is built with the inverted clock), and a
clocked transmission gate between them keeps the first group's result alive
while that group precharges. Once a circuit is cut this way, each group can
be built in static or dynamic logic on its own. That choice trades delay,
minimum clock pulse and power against each other without changing what the
circuit computes. When several copies of a circuit run side by side on
staggered clocks (a "multiple-clock" arrangement), the clock pulse of one
copy matters less than the delay of one result. The slow first group can
then be made static, and cheap in power, while the result delay stays the
same.

This repository holds the logic of two circuits built this way, plus the
multiple-clock arrangement that hosts them:

* a **16-bit carry-select adder** made of four 4-bit ripple-carry groups,
  three binary-to-excess-1 converters and a chain of three multiplexers.
  The cut falls after the adders and converters;
* a **64-bit magnitude comparator** built as a tree of 2-bit comparators
  and result-merging stages. The cut falls after the per-byte results.

The RTL describes the *logic and the phase structure*. It does not describe
the transistor circuit style. Static, dynamic, half-time and full-time
versions of each stage compute the same Boolean function, so one
description covers every mix of styles. Delay and power are properties of
the transistor netlist and are outside this RTL.

## The two-phase timing, and what to sample when

Every unit has one clock input `clk`:

```
 clk      ____/‾‾‾‾‾‾‾‾‾‾‾\__________/‾‾‾‾‾‾‾‾‾‾‾\________
               group 1 evaluates      group 1 evaluates
               switch open            switch open
                               group 2 evaluates
                               switch holds
 operands  --X== stable ==X------- (free to change) ---X==
 result                    |== valid ==============|
                     falling edge             next rising edge
```

* **Group 1** (adder: ripple-carry adders and converters; comparator:
  2-bit comparators and the per-byte merge) is combinational logic on the
  operands.
* **`cmos_switch`** sits at the cut. It is a level-sensitive latch: it is
  transparent while `clk` is 1 and holds while `clk` is 0. Tools report it
  as a latch, and that is intended.
* **Group 2** (adder: multiplexer chain; comparator: 32-bit merge and final
  merge) is combinational logic on the held values.

The rules follow from this. Operands must be stable at the falling edge of
`clk`. The result is valid from the falling edge until the next rising
edge, and it stays valid even if the operands change in the meantime. That
gives one result per cycle, with one cycle from applying operands (at a
rising edge) to sampling the result (before the next rising edge). While
`clk` is high the switch is open, so the outputs follow the operands
combinationally. Do not sample them then. In the transistor circuit they
would be precharged rather than valid.

No unit has a reset. The only state is in the switches, and each switch is
overwritten in every high phase.

## 16-bit carry-select adder (`csa16`)

```
 group:        3 (bits 15:12)      2 (11:8)          1 (7:4)           0 (3:0)
 stage 1       4-bit RCA, cin=0    4-bit RCA, cin=0  4-bit RCA, cin=0  4-bit RCA, cin
 stage 2       5-bit BEC           5-bit BEC         5-bit BEC           -
 ------------------------------- cmos_switch (all of the above) -----------------
 stage 3       10:5 mux  <--c6--   10:5 mux  <--c3-- 10:5 mux  <--c1--  (c1 = carry of group 0)
               -> cout, sum[15:12] -> sum[11:8]      -> sum[7:4]        -> sum[3:0]
```

* Each upper group adds its slices of `a` and `b` with carry in 0. The
  result is a 5-bit word `{carry, sum}`.
* The **binary-to-excess-1 converter** (`bec`) replaces the second adder
  that a classic carry-select group needs for carry in 1. Adding 1 to the
  carry-in-0 word gives exactly the carry-in-1 word. The converter is one
  inverter, an AND chain and XOR gates:
  `x[0] = ~b[0]`, `x[i] = b[i] ^ (b[i-1] & ... & b[0])`.
  The converter works alongside its adder, bit level by bit level, so adder
  and converter finish almost together. That is why both belong to the
  first phase group.
* Each **10:5 multiplexer** (`mux_2n_n`, five 2:1 muxes on one select)
  picks the carry-in-0 or carry-in-1 word of its group. The select is the
  carry chosen by the group below. Its top bit is the carry passed on, and
  the top group's carry is `cout`.
* All four groups are 4 bits wide. A variant with groups of 2, 3, 4 and 5
  bits balances arrival times when the whole adder evaluates in one phase.
  Once the multiplexers get a phase of their own, equal groups let all
  first-phase results be ready together. The variable-size variant is not
  included.

## 64-bit comparator (`cmp64`)

A comparison result is three wires, `{gt, lt, eq}` (`mds_pkg::cmp_res_t`).
Exactly one of them is set. Four stages build the result:

| stage | block | count | merges |
|---|---|---|---|
| 1 | `cmp2`, 2-bit comparator | 32 | bit pairs |
| 2 | `cmp12`, 12-input comparator | 8 | four pairs into a byte result (`cmp8`) |
| — | `cmos_switch` | 2 × 12 bits | — |
| 3 | `cmp12`, 12-input comparator | 2 | four bytes into a 32-bit result (`cmp32`) |
| 4 | `cmp6`, 6-input comparator | 1 | two halves into the final result |

Every merging stage lets the most significant input that is not "equal"
decide. For example, `gt = gt3 | eq3&gt2 | eq3&eq2&gt1 | eq3&eq2&eq1&gt0`,
and `eq` is the AND of all the `eq` inputs. The 2-bit comparator is a
sum-of-products form of its 16-row truth table. The switch sits inside each
`cmp32`, between its four `cmp8` blocks and its `cmp12`. Stages 1-2 form
the first phase group, and stages 3-4 the second.

`cmp12` and `cmp6` carry an immediate assertion: when every input is a
legal one-hot result, the output must be one too.

## Multiple-clock platform (`csa16_multiclock`, `cmp64_multiclock`)

`LANES` copies of a unit (3 by default), each with its own clock, operands
and result. The lane clocks are inputs. The intended use is the same
frequency with phases staggered by `1/LANES` of a period, so that the
platform delivers `LANES` results per period. Nothing inside the platform
depends on the phase relation, and no clock generator is included. With
`LANES = 1` a platform is the plain single-clock unit.

## Top level (`mds_top`)

The adder platform and the comparator platform side by side. They share no
signal. Ports, per lane `l`:

| port | dir | width | meaning |
|---|---|---|---|
| `csa_clk[l]` | in | 1 | adder lane clock |
| `csa_a[l]`, `csa_b[l]` | in | 16 | addends |
| `csa_cin[l]` | in | 1 | carry in |
| `csa_sum[l]`, `csa_cout[l]` | out | 16, 1 | sum and carry out |
| `cmp_clk[l]` | in | 1 | comparator lane clock |
| `cmp_a[l]`, `cmp_b[l]` | in | 64 | operands |
| `cmp_res[l]` | out | 3 | `{gt, lt, eq}` |

Parameters: `CSA_LANES = 3`, `CMP_LANES = 3`.

## Files

| file | contents |
|---|---|
| `rtl/mds_pkg.sv` | `cmp_res_t` and `res_valid()` |
| `rtl/full_adder.sv`, `rtl/rca.sv` | full adder; `WIDTH`-bit ripple-carry adder (default 4) |
| `rtl/bec.sv` | `WIDTH`-bit excess-1 converter (default 5) |
| `rtl/mux_2n_n.sv` | 2n:n multiplexer (default N = 5, i.e. 10:5) |
| `rtl/cmos_switch.sv` | phase-boundary hold latch |
| `rtl/csa16.sv` | the two-phase adder |
| `rtl/cmp2.sv`, `rtl/cmp12.sv`, `rtl/cmp6.sv` | comparator building blocks |
| `rtl/cmp8.sv`, `rtl/cmp32.sv`, `rtl/cmp64.sv` | comparator hierarchy (switch inside `cmp32`) |
| `rtl/csa16_multiclock.sv`, `rtl/cmp64_multiclock.sv` | multiple-clock platforms |
| `rtl/mds_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_propagation_paths.sv` | the worst-case input transitions of both units |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mds_top \
    -y rtl -y tb +libext+.sv rtl/mds_pkg.sv tb/tb_mds_top.sv
./obj_dir/Vtb_mds_top
```

Replace `tb_mds_top` with any other testbench name. The package file must
be named first. Every testbench finishes in well under a second.

What the testbenches check:

* **Leaf blocks.** Exhaustive or truth-table tests: the full adder, the
  4- and 5-bit adders, 3/5/6-bit converters, the 2-bit and 8-bit
  comparators, and every legal input pair of `cmp6`. `cmp12` gets random
  digit-wise comparisons with every priority row forced.
* **Two-phase units** (`csa16`, `cmp32`, `cmp64`). Operands are applied
  after the rising edge and replaced by random values after the falling
  edge, and the result is checked before the next rising edge. This proves
  the hold. For each adder group, the tests also count that both the
  carry-in-0 and the carry-in-1 word were selected. For the comparator,
  they count that every byte position, and full equality, decided a result.
* **Platforms and top.** Three lanes on clocks staggered by a third of a
  period. The tests check every result, the aggregate rate of `LANES`
  results per period, and that lanes interleave. `tb_mds_top` runs the
  whole design at its default parameters. It reports how often each
  mechanism occurred (hold, carry selection per group, full carry ripple,
  decision per byte, lane interleaving) and fails any that never did.
* **`tb_propagation_paths`.** Drives the input transitions that define the
  worst-case paths: carry in to carry out and to `sum[15]`; `b[12]` to
  `sum[15]` and to `cout`; `a[0]` to the "equal" output. It also drives a
  5-bit adder feeding a 6-bit converter.

## Where this RTL departs from, or adds to, the circuit it models

* **No precharge behaviour.** In the dynamic circuit, the outputs of a
  precharging stage are 0. Here they keep computing. Results are only
  defined in the sampling window described above.
* **The switch holds everything at the cut.** That includes the low adder
  group's sum and carry, so all outputs are stable in the same window.
* **Adder bit 0.** The lowest bit of each carry-in-0 group is a full adder
  with carry in tied to 0, not a half adder. The function is the same.
* **Lane count and clocks.** Three lanes is the default, not a derived
  number. The phase relation between lane clocks and any way of handing
  operands to lanes are left to the user.
* **Transistor-level features are not modelled.** This covers transistor
  sizing, the clock-bar pull-down transistors that discharge internal
  nodes of the dynamic merge stages, and all delay and power figures.
* **Result encoding.** The field order `{gt, lt, eq}` in `cmp_res_t` is a
  choice of this RTL.
