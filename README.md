# Aging-aware variable-latency multiplier with adaptive hold logic

An ordinary multiplier's clock period has to cover its slowest path, plus a
margin for the years over which transistor aging (NBTI in pMOS, PBTI in
high-k nMOS) makes every path slower. Most operand patterns never use that
slowest path. This design runs a bypassing array multiplier with a clock
period shorter than the worst case and gives each operation one cycle or
two, decided from its operands:

* An **adaptive hold logic** (AHL) block counts the zeros in one operand.
  Each zero switches off a column or a row of adders, so many zeros means a
  short path. Few zeros means the AHL holds the registers for one extra
  cycle.
* A **Razor register** catches the result. It finds the one-cycle operations
  that did not make it after all, restores the right value one cycle late,
  and reports the error.
* An **aging indicator** counts those errors. When there are too many, the
  chip has aged, and the AHL moves to a stricter rule: one more zero is then
  needed before an operation gets a single cycle.

Everything is synthesizable SystemVerilog, parameterized by the operand width
`M` (default 32, giving a 64-bit product).

## Block structure

```
            md ──►[input reg]──┬──────────────►┌──────────────────┐
                               │               │ column- or row-  │
            mr ──►[input reg]──┼──────────────►│ bypassing array  │
                   ▲   ▲       │               └────────┬─────────┘
                   │   │       ▼ judged operand         │ 2M bits
              step │   │   ┌────────┐                   ▼
                   │   │   │  AHL   │  gating_n   ┌──────────┐
                   └───┴───┤ +aging │────────────►│  Razor   ├──► product
                           │indicat.│◄── error ───┤ register ├──► re_execute
                           └────────┘             └──────────┘
```

| Module | Role |
|---|---|
| `aham_top` | The two proposed units side by side: a column-bypassing unit (`col_*` ports) and a row-bypassing unit (`row_*` ports). They share `clk`, `clk_del` and `rst_n`. |
| `aging_aware_multiplier` | One unit: input registers, multiplier, Razor register and AHL. `BYPASS` picks the array type. |
| `column_bypass_multiplier` | Array multiplier that bypasses a column of adders for each zero bit of the multiplicand. |
| `row_bypass_multiplier` | Array multiplier that bypasses a row of adders for each zero bit of the multiplier. |
| `razor_ff` | Main flip-flops, shadow latches, comparator and restore mux for `W` bits. |
| `adaptive_hold_logic` | Zero counter, the two judging thresholds, the aging mux and the hold flip-flop. |
| `aging_indicator` | Counts errors over a window of operations. |
| `full_adder`, `aham_pkg` | The adder cell; the `bypass_e` type. |

## The bypassing arrays

Both arrays are carry-save (Braun) arrays. Row 0 holds the partial products
`a_i·b_0`. Each of the rows `j = 1 … M-1` adds `a_i·b_j` to the sums and
carries of the row above. A final ripple-carry row forms the upper half of
the product. The low half leaves the array at the right edge. The operands
are unsigned.

**Column bypassing.** Each adder in row `j` at position `i` lies on the
diagonal of multiplicand bit `a_i`. When `a_i = 0`, every partial product on
that diagonal is 0, and so is every carry. Isolation gates controlled by
`a_i` switch off the adder's inputs, and a mux passes the sum from the upper
adder straight through. The number of active adders, and with it the length
of the critical path, follows the number of ones in the multiplicand. That
makes the multiplicand the operand to judge.

**Row bypassing.** When multiplier bit `b_j = 0`, the whole of row `j`
adds nothing. Its inputs are isolated by `b_j`. A sum mux per adder passes
the upper sum through. A carry mux per adder passes the upper carry through,
moved one place to the right so that it keeps its weight. One carry per
bypassed row then falls off the right end: the carry of weight `j` from the
rightmost adder of row `j-1`. A correction chain of full adders along
product bits `P_2 … P_{M-1}` adds each such carry, gated by `!b_j`, into
`P_j`. The chain's carry enters the final adder. For this array the
multiplier is the operand to judge.

The tri-state isolation gates of a transistor-level bypassing array are
written as AND gates, so the RTL has no high-impedance nodes. Functionally
both arrays equal `a*b`. The bypass changes the switching activity and the
path delay, which only show in a gate-level or transistor-level timing
model.

## The hold decision (AHL)

`adaptive_hold_logic` counts the zeros of the judged operand. The operand is
taken from the input register, so it belongs to the operation currently in
the array. Two thresholds are computed from the count:

* `zeros > N_SKIP`: the normal rule;
* `zeros > N_SKIP + 1`: the stricter rule, selected once `aged` is 1.

The selected result means "one cycle is enough". It is ORed with `!Q` of a
D flip-flop clocked on the **falling** edge of `clk`. `Q` is `gating_n`.

* One-cycle pattern: D = 1, so `gating_n` stays 1.
* Two-cycle pattern: the operand was loaded while `gating_n` was 1. At the
  next falling edge D = 0, and `gating_n` goes low for exactly one cycle;
  then `!Q = 1` forces it back high. The rising edge inside that cycle is a
  hold edge.

Because `gating_n` only changes while `clk` is low, ANDing it with `clk`
would give a glitch-free gated clock. Here it is used as a clock enable
instead (see the departures section).

## Detecting late results (Razor)

`razor_ff` samples the array output on the rising edge of `clk` into its main
flip-flops. Its shadow latches are transparent while the delayed clock
`clk_del` is high, so they keep following the data for a while after the
edge. If the path was too slow, the shadow latches end up with the settled
value while the main flip-flops hold a stale one. The comparator then raises
`error`, which is `re_execute` at the unit's port. At the next rising edge
the restore mux copies the shadow value into the main flip-flops.

The comparison is only meaningful in the cycle right after the main
flip-flops sampled new data. An internal flag masks it after a hold or a
restore, when the shadow latches are already following the next, unfinished
operation.

Requirements on the clocks and paths, as for any Razor design:

* `clk_del` rises after `clk` and falls before the next rising edge of
  `clk`. `error` is valid from the fall of `clk_del` to the next rising
  edge, which is where it is used.
* Every path into the Razor register must take longer than the time from
  the `clk` edge to the fall of `clk_del`. Otherwise the shadow latches
  would already capture the next operation (the short-path rule). Path
  delays up to one period plus that window are corrected; later ones go
  unseen.

## Timing of one unit

A *step* is a rising edge of `clk` at which `gating_n = 1` and `error = 0`.
At each step the Razor register samples the array output. The input
registers take `md`/`mr` if `en = 1`. `ready` equals "the next edge is a
step", so an operand pair is taken when `en && ready`.

| Case | Load edge | Product valid in `product` |
|---|---|---|
| one-cycle pattern | k | after edge k+1 |
| two-cycle pattern | k (edge k+1 is held) | after edge k+2 |
| one-cycle pattern that was too slow | k | a wrong value after k+1, `re_execute` high during that cycle; restored at k+2 |

When an error is restored at edge k+2, the input registers do not advance at
that edge. The operation loaded at k+1 therefore gets two cycles. With
back-to-back one-cycle patterns the unit accepts one operation per cycle.

The aging indicator counts one operation per load and samples `error` at
every rising edge. After `OP_WINDOW` operations it clears both counts. If
the error count is above `ERR_THRESHOLD` at that moment, it sets `aged`, which
then stays 1 until reset.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `M` | 32 | Operand width. 16 and 32 are the sizes the design was evaluated at. |
| `N_SKIP` | `M/2` | The normal rule is `zeros > N_SKIP`; the stricter rule is `zeros > N_SKIP+1`. |
| `OP_WINDOW` | 1024 | Operations per aging-indicator window. |
| `ERR_THRESHOLD` | 32 | More errors than this in one window sets `aged`. |
| `BYPASS` | `BYPASS_COLUMN` | Set only on `aging_aware_multiplier`; `aham_top` builds both kinds. |

`N_SKIP`, `OP_WINDOW` and `ERR_THRESHOLD` are this design's choices. Tune
them from a timing analysis of the array at the chosen clock period: pick
`N_SKIP` so that every pattern with more than `N_SKIP` zeros meets the period
on a fresh chip. Leave enough margin that the patterns with exactly
`N_SKIP+1` zeros are the first to fail as the chip ages.

## Departures and choices

* **Clock gating as an enable.** The block diagram clocks the input and
  Razor registers through an AND of `clk` and `!gating`. Here they are
  clocked by `clk` with an enable. They load on the same edges. Using an
  enable also lets the Razor restore happen on an edge that the AHL holds.
* **Re-execution.** The source says only that an error makes the system
  re-execute the operation with two cycles. Here the Razor register restores
  the result from its shadow latches, and the input registers hold for that
  edge. The caller sees `re_execute` and a `ready` that is low for one cycle.
  It does not need to resend anything.
* **Row-bypass correction circuit.** The need for extra correction logic is
  given, but its structure is not. The chain along the low product bits is
  this design's own.
* **Aging indicator.** It is sticky. The window length and threshold are
  chosen here.
* **Ports not in the block diagram:** `en`, `ready`, `rst_n` (asynchronous,
  active low; it sets the hold flip-flop and clears the registers) and
  `clk_del`. The delayed clock is an input; generating it (a delay line or
  a phase of a PLL) is left to the integration.
* **Not built:** the fixed-latency array and bypassing multipliers the
  design was compared with. Also not built is a "recovery boosting"
  extension that is only named as future work.
* **No timing model.** Delays, aging and the reported performance and
  energy gains cannot be reproduced in RTL simulation. The testbenches model
  path delays explicitly (below).

## Simulation

Each testbench prints `TB_RESULT checks=N failures=F` and exits. Two
assertions in the RTL are active under `--assert`: a Razor error never lasts
two cycles, and the AHL hold never lasts two cycles. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv rtl/aham_pkg.sv tb/tb_aham_top.sv --top-module tb_aham_top
./obj_dir/Vtb_aham_top
```

| Testbench | What it checks |
|---|---|
| `tb_column_bypass_multiplier`, `tb_row_bypass_multiplier` | All operand pairs at M = 4 and M = 8. At M = 32: the published example pairs, corner cases and 20 000 random pairs with biased bit densities. |
| `tb_razor_ff` | On-time and late data, restore from the shadow latch (not from the data input), no false error after a restore or a hold, data later than the shadow window, reset. |
| `tb_aging_indicator` | Threshold edge (exactly the threshold does not set `aged`), clearing per window, stickiness, a reference model, and the default 1024/32 instance. |
| `tb_adaptive_hold_logic` | `gating_n` and `aged` against a reference model. A pattern with `N_SKIP+1` zeros takes one cycle before aging and two after. |
| `tb_aging_aware_multiplier` | Both unit types at M = 32 and at M = 16, with a short aging window, 1000 operations each. |
| `tb_aham_top` | The top at its default parameters, 4000 operations per unit. |

The last two use `tb/aam_harness.sv`. RTL has no delays, so the harness
models them. It forces the Razor register's data input to a copy of the
array output that changes a set time after each load:

* 8 ns for patterns with many zeros;
* 15 ns for two-cycle patterns;
* for patterns with exactly `N_SKIP+1` zeros, 8 ns at first and 12 ns after
  a chosen point ("aging").

With the 10 ns clock and `clk_del` high from 2 to 7 ns after each edge, the
12 ns patterns are caught and corrected by the Razor register. The harness
checks every product against `md*mr`, the latency of every operation, the
hold signal against a model, and each restore. It also requires every
mechanism to occur: one- and two-cycle operations, idle cycles, Razor
errors, the switch of the aging indicator, and border patterns held after
the switch. After the switch, operations issued later must see no further
Razor errors.
