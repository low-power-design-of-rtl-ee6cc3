# A 16-bit synchronous counter with per-bit clock gating

In a binary counter, bit *n* changes only once every 2^*n* counts. A plain
synchronous counter still clocks all sixteen flip-flops on every edge, so most
of the clock power goes to flip-flops that keep their value. This design keeps
the counting behaviour of a plain counter but gives each upper bit a clock gate
that passes an edge only when that bit is about to toggle. Bit 15 then receives
one clock edge in 32768 counts instead of one per count.

The counter is a chain of toggle flip-flops FF_0 .. FF_15:

```
            clk ──┬──────────────┬──────────────┬──────── ... ──┐
                  │              │              │               │
   t ─► en[0] ─► FF_0 (T)        │              │               │
          │ Q0 ──► AND ─ en[1] ─► FF_1 (T)      │               │
          │          Q1 ──► AND ─ En2 ─► icg ─► FF_2 (T=1)      │
          │                   Q2 ──► AND ─ En3 ─► icg ─► FF_3   │
          │                                 ...                 │
          │                                  En15 ─► icg ─► FF_15 (T=1)
   rst ─► every flip-flop (asynchronous clear)
```

* **FF_0 and FF_1** run on the free clock. They toggle on every count and every
  second count, so gating them would save nothing and only add a gate.
* **The clock enable chain** (`clk_en`, the "clock monitoring" circuit)
  computes, with one two-input AND per stage,
  `En2 = Q0·Q1` and `En_n = En_(n-1)·Q_(n-1)` for n = 3..15.
  En_n is 1 exactly when all bits below n are 1: the condition for bit n to
  change on the next count, i.e. the carry into bit n.
* **One clock gate per upper bit** (`icg`, fourteen of them) passes the clock to
  FF_n only in cycles where En_n is 1.
* **The gated flip-flops have T tied to 1.** Every edge that reaches them is a
  useful one; the clock gate alone decides whether the bit toggles.

## Why the gate needs a latch

The enables are combinational functions of the counter state, which changes
just after each rising clock edge. A plain `clk & En` gate would let those
changes through while the clock is high and produce a runt pulse or a cut-short
pulse. `icg` is the usual latch-based cell: a latch transparent while `clk` is
low captures `En`, and the gated clock is `clk` ANDed with the latched value.
During the high phase the latch is closed, so the gated clock is either a
complete copy of the clock pulse or stays low for the whole cycle.

Consequences for timing:

* The whole enable chain (15 AND stages from Q0 to En15) must settle
  within the low phase that follows the state change, i.e. in the time from the
  clock-to-Q delay after the rising edge to the next rising edge, less the
  latch setup. This is the critical path of the design, not the flip-flops.
* The gated flip-flops see their clock one AND-gate delay after the free-running
  ones. Since each gated flip-flop only feeds back its own state (T = 1), this
  skew is harmless for the counter itself; downstream logic that samples `q`
  on `clk` sees the upper bits settle slightly later.

## The count enable `t`

`t` is the counter's enable: while it is 1 the counter advances by one per
clock; while it is 0 it holds. It is the head of the enable chain
(`en[0] = t`, `en[1] = t·Q0`, `En2 = t·Q0·Q1`). This is required by the tied-1
T inputs: without `t` in the chain, a paused counter sitting at a value with
Q0 = Q1 = 1 would keep toggling bit 2. The original description states the
enables without `t` (`En2 = Q0·Q1`); with `t = 1` the two are identical.

## Interface and timing

`cg_counter16` (top):

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock; the design was evaluated at 500 MHz |
| `rst` | in | 1 | active-high asynchronous clear of all 16 bits |
| `t`   | in | 1 | count enable |
| `q`   | out | 16 | count |

`q` advances one rising edge after `t` is sampled 1 and wraps from `FFFF` to
`0000`. `rst` clears every bit immediately, including bits whose clock is gated
off; release it away from a rising clock edge. Parameters: `WIDTH` (16) and
`FIRST_GATED` (2, the lowest gated bit); defaults are in `cgc_pkg`.

## Measured clock activity

With `t` held at 1, bit *n* (n ≥ 2) receives 1/2^*n* of the clock edges, and
bits 0 and 1 receive all of them. Over a full period of 65536 counts the gated
flip-flops together receive 32766 edges instead of 14 × 65536 = 917504: 3.6 %
of what the same flip-flops see in an ungated counter. The end-to-end testbench
prints these counts per bit. How much power that saves depends on the cell
library and the clock tree and is not modelled here. In the original 180 nm
evaluation the gated counter used about 77 % less power than a plain counter,
at about 15 % more area (224 gates against 195).

## Files

| file | contents |
|------|----------|
| `rtl/cgc_pkg.sv` | counter width (16) and first gated bit (2) |
| `rtl/t_ff.sv` | toggle flip-flop with asynchronous reset, Q and Q̄ outputs |
| `rtl/clk_en.sv` | the AND chain producing the T inputs of bits 0/1 and En2..En15 |
| `rtl/icg.sv` | latch-based clock gate |
| `rtl/cg_counter16.sv` | the counter: 16 `t_ff`, 14 `icg`, one `clk_en` |
| `tb/t_ff_tb.sv` | random toggle/hold sequences, asynchronous reset mid-cycle |
| `tb/clk_en_tb.sv` | exhaustive: all 2^17 values of (t, q) against the carry condition |
| `tb/icg_tb.sv` | random enables, including changes during the high phase; no glitch, exact pulse count |
| `tb/cg_counter16_tb.sv` | end to end at full size (see below) |
| `tb/cg_counter16_fig5_tb.sv` | the published behavioural waveform: count 200 in 400 ns at 500 MHz, hold while `t` is 0, resume |

## Verification

`cg_counter16_tb` runs the counter at its default size with a 2 ns clock:
a full period of 2^16 + 16 counts (every enable En2..En15 fires, the count
wraps), 20000 cycles of random `t` with asynchronous resets at random moments,
and a hold at `FFFF` where all Q bits are 1 but no gated clock may pass. It
checks `q` after every edge against a model, and checks the number of rising
edges each flip-flop's clock carried against the number of times the model says
that bit toggled: equal for every gated bit, equal to the cycle count for bits 0
and 1. It fails if a reset, a hold, a wrap-around, or a passed and a cut clock
edge on every gated bit did not occur. Each testbench prints
`TB_RESULT checks=N failures=M`.

To simulate with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -Irtl rtl/cgc_pkg.sv tb/cg_counter16_tb.sv --top-module cg_counter16_tb
./obj_dir/Vcg_counter16_tb
```

Swap in any other testbench file and top-module name the same way. The full
end-to-end run takes well under a minute.

## Where this RTL goes beyond or departs from the original description

* The count enable `t` is folded into the enable chain (see above); the
  original equations omit it.
* Reset is asynchronous, active high, clearing to 0. The published waveforms
  show reset high at start and low while counting; polarity-inverting symbols
  in the schematic were not followed, and synchronous versus asynchronous is not
  stated.
* The inside of the clock gate is not specified in the original; the standard
  latch-and-AND cell is used. It has no test-enable input.
* What drives the T inputs of the gated flip-flops is not specified; they are
  tied to 1. The T inputs of FF_0 and FF_1 follow the plain counter (`t` and
  `t·Q0`).
* Power, area, gate count and chip temperature figures belong to a 180 nm
  standard-cell implementation and cannot be reproduced from RTL.

For an FPGA target, note that gating clocks in fabric logic is generally
discouraged; there the same enables would normally drive clock-enable pins of
the flip-flops instead. This RTL models the ASIC style, with explicit gates.
