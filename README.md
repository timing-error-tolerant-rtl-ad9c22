# Timing-error-tolerant flip-flops: transparent-window correction, time borrowing and time dilation

When a path of combinational logic is slower than the clock period, its result
reaches the next flip-flop after the rising edge and the flip-flop stores the
old, wrong value. This RTL implements two ways of repairing such a *late
arrival* at run time without slowing down or stopping the system clock:

1. **Transparent-window correction with time borrowing.** The flip-flop at the
   end of a critical path watches its own input. If the input changes after
   the rising edge, the flip-flop briefly becomes transparent and lets the late
   value through. The next stage now starts late, so it gets a clock whose
   rising edge is delayed for one cycle ("borrowed time").
2. **Time dilation.** Each flip-flop has a multiplexer-latch in front of it and
   an XOR comparator behind it. A late arrival is noticed as a mismatch, the
   latch holds the late but correct word, and the flip-flop takes it one cycle
   later. Every error costs exactly one clock cycle.

Both schemes are built here side by side in one top module,
`timing_error_tolerant_top`. The circuits follow a published description of
the two techniques; everything that description leaves open (widths, delays,
reset, the exact gating in a few places) is this design's own choice and is
listed under [Departures and open points](#departures-and-open-points).

These are clock-level circuits: they work with latches, generated clocks and
deliberately sized delay elements. The delays are modelled with SystemVerilog
`#` delays and need `verilator --timing` to simulate. A synthesis tool drops
the delays, so a netlist made from this RTL needs real delay cells and timing
sign-off before it can work (see [Building a netlist](#building-a-netlist)).

## 1. The transparent window

A positive-edge master-slave flip-flop is two latches. The master is open
while the clock is low, the slave while it is high; at the rising edge the
master closes and the slave shows what the master held.

`error_tolerant_ff` keeps the slave on the system clock `clk` but drives the
master with a separate master clock `cm`:

```
cm = ~clk | (er & clk)
```

`er` comes from `transition_detector`, which compares the data input with a
copy of itself delayed by a `delay_buffer`. Each input transition, up or down,
gives a pulse of width `PULSE_PS` (1 ns by default) on that bit.

* **On-time data** changes while `clk` is low. The master is open anyway; the
  pulse changes nothing and the word is captured at the rising edge.
* **Late data** changes while `clk` is high. Normally the master would be
  closed, but now the pulse opens it for `PULSE_PS`. The slave is open too, so
  the late value flows straight to `q`, replacing the wrong word.

```
            rising edge
clk     ____|‾‾‾‾‾‾‾‾‾‾‾‾|______
d       ==old===X==new=========      (new arrives 1 ns after the edge)
er      ________|‾‾|___________      (PULSE_PS wide)
cm      ‾‾‾‾|___|‾‾|_____|‾‾‾‾‾      (master reopened by the pulse)
q       ==old===X==new=========      (a plain flip-flop would keep old)
```

Requirements on the surrounding timing (not checked by the RTL):

* the late data must arrive before the falling edge, and the pulse must end
  before it too, otherwise the correction overlaps the next master phase;
* the pulse must be long enough to pass data through the master latch (its
  setup time) and short enough that a fast path from the *next* launch cannot
  sneak in (a hold-style constraint);
* `q` now changes late in the cycle, so the logic after it starts late. That
  is what the time-borrowing circuit is for.

`er` also pulses on every on-time transition; that is harmless because `cm`
is already high in the low phase. Only a pulse during the high phase is an
error window, and that is how the rest of the design recognises one:
`cm & clk`.

## 2. Time borrowing for the following stage

The pipeline in the top module is

```
s1_d -> FF1 -> s1_q -> [logic 1] -> s2_d -> FF2 -> s2_q -> [logic 2] -> s3_d -> FF3 -> s3_q
         clk                          error-tolerant         clk_tb
```

If FF2 corrected a late word in cycle *k*, its output changed roughly
`PULSE_PS` late, and the result of logic 2 reaches FF3 late as well, after the
rising edge that ends cycle *k+1*. `time_borrowing_circuit` moves that one
edge:

1. `cm & clk` (an error window) sets an SR latch; its output is `cm_sr`.
2. A D flip-flop clocked on the **falling** edge of `clk` samples `cm_sr`;
   its output `borrow` (Q) rises at the end of cycle *k*.
3. `clkd` is `clk` through a delay buffer of `CLKD_DELAY_PS` (3 ns by
   default), and `clkdd = clk & clkd` has its rising edge delayed and its
   falling edge unchanged.
4. `clk_tb = borrow ? clkdd : clk` clocks FF3. In cycle *k+1* FF3 therefore
   captures `CLKD_DELAY_PS` after the normal edge.
5. `borrow` clears the SR latch, and at the next falling edge `borrow`
   returns to 0 unless a new error window set the latch again; back-to-back
   errors therefore give back-to-back borrowed cycles.

`borrow` only changes while `clk` is low, when `clk` and `clkdd` are both 0,
so the multiplexer switches without a glitch on `clk_tb`.

```
clk      __|‾‾‾‾|____|‾‾‾‾|____|‾‾‾‾|____
             k         k+1       k+2
cm&clk   _____|‾|________________________    error window in cycle k
cm_sr    _____|‾‾‾‾‾‾‾‾‾‾‾|______________
borrow   __________|‾‾‾‾‾‾‾‾‾‾|__________    falling edge to falling edge
clk_tb   __|‾‾‾‾|______|‾‾|____|‾‾‾‾|____    rising edge of cycle k+1 delayed
```

The latch is cleared only while both `clk` and `clkd` are low. Clearing it
directly with `borrow` would race with the flip-flop at the very falling
edge where `borrow` rises, and would also wipe out an error window that occurs
in the high phase of the borrowed cycle itself.

Budget: with a late arrival of *e* after the edge at FF2, logic 2 must
satisfy `e + t_logic2 <= T_clk + CLKD_DELAY_PS`, and `CLKD_DELAY_PS` must be
shorter than either phase of the clock. FF3's own output is then late by up
to `CLKD_DELAY_PS`; the scheme protects one extra stage, not an unbounded
chain.

## 3. Time dilation

`td_register` is a word of `td_flip_flop` bits between two logic stages.

Per bit:

* a **MUX-latch**: a multiplexer whose input 0 is `d` and input 1 its own
  output `m`; with select (`memory`) = 1 it holds, with 0 it passes `d`;
* the **main flip-flop** `q <= m` on the rising edge of `clk`;
* an **XOR comparator** `error = m ^ q`.

Per register: the comparators are ORed into `error_r`, and the **Error
flip-flop**, clocked by `main_clk`, turns `error_r` into `memory`, which
drives every bit's multiplexer select.

In the top module and the testbenches `main_clk` is the inverted clock, so
errors are sampled at the falling edge. During the high phase `m` differs
from `q` only if `d` changed after the edge. The sequence after a late word:

| time | what happens |
|---|---|
| rising edge *k* | main flip-flops take the stale word |
| high phase *k* | late word reaches `m`; `m != q`, `error_r = 1` |
| falling edge *k* | `memory = 1`; the MUX-latches close on the late word |
| rising edge *k+1* | main flip-flops take the held, correct word |
| falling edge *k+1* | `m == q`, `memory = 0`, latches reopen |

So `memory` is high for one cycle per error, and that cycle is a bubble. The
register does not stall anything by itself. The stages around it must:

* **upstream** holds its output word for one more cycle while `memory` is high
  (the latch is closed and would miss it);
* **downstream** ignores the word on `q` in a cycle whose `memory` is high
  (sampled after the falling edge): it is the stale word from edge *k*.

`error_r` is combinational and also high during the low phase whenever a new
word is on its way. Only `memory` is a valid error flag. A new word that
arrives before the falling edge of the cycle in which it is launched would be
mistaken for a late one. This is the usual short-path constraint of
error-detecting flip-flops.

## 4. Top module

`timing_error_tolerant_top` instantiates both schemes. The logic stages are
not part of the design (their function is left open), so their inputs and
outputs are ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | system clock; asynchronous active-high reset |
| `s1_d` / `s1_q` | in / out | `WIDTH` | FF1 input / output (to logic 1) |
| `s2_d` / `s2_q` | in / out | `WIDTH` | logic 1 result into FF2 / FF2 output (to logic 2) |
| `s3_d` / `s3_q` | in / out | `WIDTH` | logic 2 result into FF3 / FF3 output |
| `er`, `cm` | out | `WIDTH` | FF2 error pulses and master clocks |
| `cm_sr`, `borrow`, `clk_tb` | out | 1 | time-borrowing latch, select and clock |
| `main_clk` | in | 1 | clock of the TD Error flip-flop (drive with `~clk`) |
| `td_d` / `td_q` | in / out | `TD_WIDTH` | TD register input / output |
| `td_m` | out | `TD_WIDTH` | MUX-latch outputs |
| `td_error_r`, `td_memory` | out | 1 | comparator OR, registered error (hold) |

Parameters, all this design's choices: `WIDTH = 8`, `TD_WIDTH = 8`,
`PULSE_PS = 1000`, `CLKD_DELAY_PS = 3000`, sized for a 10 ns clock. The two
delay defaults live in `tet_pkg`.

## 5. Module hierarchy

```
timing_error_tolerant_top
├── ms_flip_flop            FF1 (clk_m = ~clk, clk_s = clk)
├── error_tolerant_ff       FF2
│   ├── transition_detector
│   │   └── delay_buffer    (behavioural delay)
│   ├── master_clock_generator
│   └── ms_flip_flop        (clk_m = cm, clk_s = clk)
├── time_borrowing_circuit
│   └── delay_buffer        (clk -> clkd)
├── ms_flip_flop            FF3 (clk_m = ~clk_tb, clk_s = clk_tb)
└── td_register
    └── td_flip_flop × TD_WIDTH
```

`tet_pkg` holds the shared delay constants. Every file starts with a comment
on what the module does, its interface and its timing.

## 6. Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`, which prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl rtl/tet_pkg.sv \
          tb/tb_timing_error_tolerant_top.sv --top-module tb_timing_error_tolerant_top
./obj_dir/Vtb_timing_error_tolerant_top
```

`--timing` is required (delays, falling-edge processes). With a two-state
simulator, drive the reset with a 0→1 edge; every testbench does.

What the testbenches cover:

* `tb_timing_error_tolerant_top` runs the whole design at its default
  parameters. It models logic 1 as `+37` with a 6 ns (on time) or 11 ns
  (1 ns late) transport delay and logic 2 as a nibble swap XOR `0x5A` with a
  9.5 ns delay, so that a corrected word reaches FF3 only within borrowed
  time. It checks every word at FF2 and FF3, the delay of every borrowed
  `clk_tb` edge, one error window and one borrowed edge per late word
  (including back-to-back late words), and, on the TD register, that 200 words
  arrive once, in order, with one stall cycle per late word. It fails if any
  of these mechanisms never happened.
* The block testbenches check the delay buffer's delay; pulse width and
  polarity of the transition detector; the master clock exhaustively; the
  master-slave flip-flop as an edge-triggered register and as a transparent
  window; correction of late words; the offset of every `clk_tb` edge; the
  MUX-latch and comparator; and the one-cycle cost of each time-dilation
  error.

## Building a netlist

* `delay_buffer` is a behavioural model (`assign #`). Synthesis turns it into
  a wire, which turns the transition detector's output into a constant 0 and
  `clkdd` into `clk`. Replace it with a sized delay cell, and keep it and the
  detector gates from being optimised away.
* The design uses latches on purpose (both halves of each master-slave
  flip-flop, the SR latch, the MUX-latches) and gated or multiplexed clocks
  (`cm`, `clk_tb`). These need explicit clock definitions and latch-aware
  timing analysis.
* Where to place error-tolerant flip-flops comes from static timing analysis
  (the critical endpoints) and is not part of the RTL.

## Departures and open points

Taken from the source description: the detector built from a delay buffer
and a comparison of the input with its delayed copy; the master clock
generator combining `er` and the clock; the master-slave flip-flop with
separate master and slave clocks; the time-borrowing circuit made of an SR
latch set from `cm` and `clk`, a D flip-flop on the inverted clock, a delay
buffer producing `clkd`/`clkdd` and a multiplexer choosing `clk_tb`; the
TD flip-flop made of MUX, main flip-flop and XOR comparator; the OR gate,
Error flip-flop, `memory` and `main_clk` of the TD register; the one-cycle
penalty of time dilation.

This design's own choices:

* all widths and delay values;
* `er` on both edges of the input, and `cm = ~clk | (er & clk)`;
* per-bit master clocks in FF2, and the OR of all bits as the time-borrowing
  input;
* the SR latch's clear: driven by `borrow`, qualified by `clk` and `clkd`
  both low, with set taking priority;
* `clkdd = clk & clkd`;
* the multiplexer-latch feedback (input 1 = `m`);
* `main_clk` driven by the inverted clock;
* the handshake around the TD register (upstream hold, downstream skip);
* asynchronous active-high reset everywhere. The SR latch's set pin is
  unused.

Not built: the combinational logic stages, whose function is left open; and
the earlier "dynamic flip-flop conversion" scheme, which served only as the
comparison point for area (quoted as 430 % against 175 %) and power (36 %
against 24 %) overhead. Those transistor-level overhead figures cannot be
reproduced from RTL.

Tool notes: Verilator may report `NOLATCH` for `td_flip_flop` when it is
elaborated inside `td_register`. The MUX-latch is a latch all the same, and
synthesis infers a D latch. Verilator also reports `tet_pkg` constants as
unused in modules that do not need them.
