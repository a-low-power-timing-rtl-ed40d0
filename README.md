# Timing-error tolerant flip-flop stage with time borrowing

A pipeline stage whose logic is occasionally too slow for the clock (a corner
of process, voltage or temperature, ageing) normally samples wrong data at the
rising edge. This design lets such a stage repair itself within the same cycle
and without a second clock. The flip-flop is split into a master latch and a
slave latch with separate clocks. A transition detector on the flip-flop's data
input sees the late data arrive, and reopens the master latch while the slave
is still transparent. The late value then flows straight to Q and replaces the
wrong one before the clock falls.

Repairing Q late in the cycle shifts the problem to the next stage: its input
now settles late too. A small time borrowing circuit covers that case. For the
one cycle after a correction, it delays the rising edge of the next stage's
master clock, so that stage's master stays open a little past the edge. The
system clock itself never changes.

The RTL models one protected 1-bit path in a three-flip-flop pipeline:

```
          +-----+ q1   (logic 1)   d2 +-----+ q2   (logic 2)   d3 +-----+
   d ---->| FF1 |----> outside ------>| FF2 |----> outside ------>| FF3 |----> q3
          +-----+                  |  +-----+                     +-----+
      master: ~clk                 |   master: CM                  master: ~CLK_TB
      slave:   clk                 |   slave:   clk                slave:   clk
                                   v          ^                       ^
                          transition_detector |                       |
                                   | er       |                       |
                                   v          |                       |
                          master_clock_generator -- CM --> time_borrowing -- CLK_TB
```

The logic between the stages is the user's and stays outside the top module:
`q1`/`q2` leave it and `d2`/`d3` come back in.

## How a timing error is corrected (stage 2)

| signal | meaning |
|---|---|
| `er` | transition detector output: a pulse of width `PULSE` on every edge of `d2` |
| `cm` | FF2's master clock, `cm = er | ~clk` |

While `clk` is low, `cm` is high and FF2's master is open, as in any
master-slave flip-flop. Transitions of `d2` in the low phase also produce `er`
pulses, but these change nothing because `cm` is already high.

At the rising edge, `cm` falls and the slave opens. This is where the scheme
starts to matter:

1. **Data on time.** `d2` settled in the low phase. The master holds it and
   the slave passes it to `q2`. This is ordinary flip-flop behaviour.
2. **Data late.** `d2` changes after the edge, while `clk` is high. `q2` first
   shows the stale value. The edge of `d2` makes an `er` pulse, so `cm` goes
   high for `PULSE`. Master and slave are now both transparent, and the new
   `d2` reaches `q2`. When the pulse ends the master closes again, holding the
   corrected value. No cycle is lost: `q2` is right before the falling edge.

The transition detector inverts `d2`, delays the inverted copy by `PULSE` in a
delay buffer, and ANDs it with the live input. It uses one AND for a rising
edge (`d2 & delayed(~d2)`) and one for a falling edge
(`~d2 & ~delayed(~d2)`), then ORs the two. While the input is stable the
delayed inverted copy is its complement, so both ANDs are 0.

### The timing window this relies on

Every edge of `d2` produces a pulse, so the scheme only tolerates edges that
come either in the low phase or late. An edge early in the high phase would
reopen the master and let the *next* cycle's data through, which is a hold
failure. Hence:

* **Minimum delay.** The logic before a protected flip-flop must take more
  than half a clock period, so that its normal results arrive in the low phase.
  This scheme is meant for critical paths, where that holds.
* **Maximum delay.** Late data are corrected only if they arrive before the
  clock falls. With an error pulse of `PULSE`, a path may be late by up to
  about `T/2 - PULSE`.
* **Pulse width.** `PULSE` must cover the master latch's set-up time. It must
  also be shorter than the time between two edges of `d2`.

The testbench keeps normal delays between 5.5 and 9 ns and late ones between
10.6 and 12.4 ns, with a 10 ns clock.

## How the next stage borrows time (stage 3)

`time_borrowing` is built from these parts:

* **SR latch.** Its output `cm_sr` is set by `cm & clk`. That product can only
  be 1 when an `er` pulse falls in the high phase, which means a correction
  took place.
* **Flip-flop.** It is clocked on the falling edge (`clkb = ~clk`) and samples
  `cm_sr`. Its output does two things: it resets the SR latch, and it selects
  the clock source.
* **Multiplexer.** It outputs `clk_tb = clk` when the select is 0. When the
  select is 1 it outputs `clkdd = clk & clkd`, where `clkd` is `clk` through a
  delay buffer of `BORROW`.

`clkdd` rises `BORROW` after `clk` and falls with it. FF3's master is enabled
by `~clk_tb`, so in a borrow cycle it stays open until `BORROW` after the
rising edge. A late `d3` can therefore still be taken. The select changes only
at the falling edge, when both mux inputs are 0, so `clk_tb` does not glitch.

Sequence for an error whose late data arrive in cycle *k*:

| when | what happens |
|---|---|
| cycle *k*, high phase | `er` pulse, `q2` corrected, SR latch set |
| falling edge of *k* | borrow flip-flop goes to 1, SR latch cleared |
| rising edge of *k+1* | FF3's master stays open for `BORROW`, taking `d3`, which may arrive up to `BORROW` late |
| falling edge of *k+1* | borrow flip-flop back to 0 |

For FF3 to capture correctly, the lateness of `q2` plus the delay of logic 2
must fit within `T + BORROW`. FF3 itself has no error detection.

**Limitation.** The SR latch is reset-dominant, because it is built like a
cross-coupled NOR pair. An error in cycle *k+1*, while the borrow flip-flop is
still 1, is therefore not recorded. Errors in two consecutive cycles of stage 2
are corrected at FF2, but FF3 gets no extra time for the second one.

## Modules

| file | kind | what it is |
|---|---|---|
| `rtl/delay_buffer.sv` | behavioural model | delay cell, `y` follows `a` after `DELAY` (default 0.5 ns) |
| `rtl/transition_detector.sv` | gates + delay cell | `er` pulse of width `PULSE` on every edge of `in_d` |
| `rtl/master_clock_generator.sv` | gates | `cm = er | ~clk` |
| `rtl/master_slave_ff.sv` | latches | master latch (enable `clk_m`) feeding slave latch (enable `clk_s`), asynchronous reset |
| `rtl/time_borrowing.sv` | gates, latch, flip-flop, delay cell | `clk_tb`, either `clk` or `clk & delayed clk` |
| `rtl/timing_error.sv` | top | the three stages wired as in the diagram |

Top parameters:

| parameter | default | meaning |
|---|---|---|
| `PULSE` | 0.5 ns | error pulse width |
| `BORROW` | 2.0 ns | extra master window of FF3 in a borrow cycle |

All files use `timescale 1ns / 1ps`. The data path is one bit wide. Protecting
a wider register means one detector per bit with the `er` outputs ORed, which
this RTL does not do.

### About synthesis

The circuit works through real delays: a pulse width and a delayed clock. The
two delay buffers are behavioural (`assign #DELAY`). A synthesis tool turns
them into wires, which collapses the transition detector's output to 0 and
`clk_tb` to `clk`. For an implementation they must be replaced by sized delay
cells that are kept (don't-touch), and the latches and clock gating must be
timed by hand or with custom constraints. The RTL is exact as a timing-level
model for simulation, and structural enough to map gate for gate.

The latches in `master_slave_ff` and `time_borrowing` are intended.

## Simulation

Each testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. For example, the whole pipeline:

```
verilator --binary --timing --assert -Irtl -Itb tb/timing_error_tb.sv --top timing_error_tb -o sim
./obj_dir/sim
```

The same command works for any `tb/<block>_tb.sv`, changing the names.
Verilator warns `ZERODLY` about delays held in variables in the testbenches;
this is expected.

| testbench | what it checks |
|---|---|
| `delay_buffer_tb` | output unchanged just before `DELAY`, changed just after |
| `transition_detector_tb` | `er` high for exactly `PULSE` after random rising and falling edges, low otherwise |
| `master_clock_generator_tb` | truth table of `cm` |
| `master_slave_ff_tb` | reset; edge-triggered capture; data ignored in the high phase; transparency during a master pulse in the high phase |
| `time_borrowing_tb` | `clk_tb = clk` normally; in the cycle after an error it rises exactly `BORROW` late and falls with `clk`; no glitches |
| `timing_error_tb` | 400 random cycles at the default parameters; see below |

`timing_error_tb` uses `tb/comb_path_model.sv`, a delayed inverter, as both
logic blocks. Logic 1 is made randomly late, but never in two consecutive
cycles, and logic 2 takes 9 ns. Half a nanosecond before every falling edge
it checks three things:

* `q1 = d(k)`
* `q2 = ~d(k-1)`: corrected errors must be repaired in the same cycle
* `q3 = d(k-2)`

It counts each mechanism and fails if any never occurs: error pulses in the
low phase, error pulses in the high phase, errors seen on `q2` at the edge and
corrected, borrow cycles on `clk_tb`, and `d3` arriving after the rising edge
and still captured by FF3. A typical run has 166 low-phase pulses, 47
corrected errors, 48 borrow cycles and 36 late captures in FF3.

## Choices made in this RTL

The structure of every block and of the pipeline follows the original
description of the scheme. The following were not specified there and were
chosen here:

* **Delays.** `PULSE` = 0.5 ns and `BORROW` = 2 ns. The testbenches use a
  10 ns clock period. No absolute delays were given.
* **Master enables.** The master enable of FF1 and FF3 is the inverse of `clk`
  and `clk_tb`, done in the top. `master_slave_ff` itself has two active-high
  enables, matching the way `cm` drives FF2's master directly.
* **Time borrowing gates.** The gate types and the mux polarity in
  `time_borrowing` were read from a circuit drawing with no gate types stated:
  an AND for `cm & clk`, a NOR-style SR latch, an AND for `clk & clkd`, and
  `clk` selected when the flip-flop output is 0.
* **Resets.** An asynchronous active-high reset clears the latches of each
  flip-flop and the borrow flip-flop. The SR latch is not reset; whatever it
  holds at power-up is cleared within two cycles.
* **Gate delays.** All gates are zero-delay. Only the two delay buffers carry
  delay.
* **Width.** One data bit.
