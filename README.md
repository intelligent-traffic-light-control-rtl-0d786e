# Queue-aware traffic light controller for a T-junction

A conventional traffic light gives every approach its full green time whether
or not anybody is waiting. This controller serves the three approaches of a
T-junction in turn, but ends a green as soon as a queue detector on that
approach reports that no vehicles are left, and skips the green altogether if
the approach is empty when its turn comes. The next approach then gets right
of way at once.

The controller is specified as an algorithmic state machine with twelve
states and flattened into a **state transition table (STT)**: one row per
*link path* (a present state plus the qualifier values that select one exit
from it). There are 27 link paths. The RTL keeps that one-to-one mapping:
`rtl/stt_controller.sv` has one assignment per link path, each tagged
`L1` ... `L27`, so a row of the table can be found in the code and checked
against it directly.

## The junction and its signal plan

The approaches are called **N**, **E** and **LE**. Each has a red, an amber
and a green lamp. There are also two auxiliary lamps, **HR1** and **HR2**.
Right of way goes N, then E, then LE, then back to N. Every hand-over takes
four states:

| state | code | lamps (others red)            | leaves when               | length           |
|-------|------|-------------------------------|---------------------------|------------------|
| ST0   | 0000 | LE amber                      | T = 1                     | 6 s              |
| ST1   | 0001 | all red                       | T = 0                     | 2 s              |
| ST2   | 0010 | N red + amber                 | T = 1                     | 6 s              |
| ST3   | 0011 | N green, HR2                  | T = 0 or N has no queue   | up to 18 s       |
| ST4   | 0100 | N amber                       | T = 1                     | 6 s              |
| ST5   | 0101 | all red                       | T = 0                     | 2 s              |
| ST6   | 0110 | E red + amber                 | T = 1                     | 6 s              |
| ST7   | 0111 | E green, HR1                  | T = 0 or E has no queue   | up to 18 s       |
| ST8   | 1000 | E amber                       | T = 1                     | 6 s              |
| ST9   | 1001 | all red                       | T = 0                     | 2 s              |
| ST10  | 1010 | LE red + amber                | T = 1                     | 6 s              |
| ST11  | 1011 | LE green, HR1                 | T = 0 or LE has no queue  | up to 18 s       |

State codes are plain binary, so the four-state group of an approach is
selected by bits D C and the step within it by bits B A. Codes 12 to 15 are
never used. If the register ever holds one, the controller goes to ST0 and
restarts the timer, and the lamps show all red meanwhile.

## How time is kept: the counter and T

The controller does not count time itself. A 4-bit counter (D C B A,
`rtl/interval_timer.sv`) advances once every 2 seconds and wraps from 15 to
0, so one turn of the counter is 32 s. The single timing qualifier T is a
fixed function of the count:

```
count  0 1 2 3 4 5 6 7 8 9 10 11 12 13 14 15
T      0 0 0 1 0 0 0 1 1 1 1  1  1  1  1  1      T = D | (B & A)
       |amber| R |r+amb| ------ green -------|
         6 s  2 s  6 s         18 s
```

Each approach's four states follow the runs of T: wait for T to rise, then
for it to fall, then to rise, then to fall. The 4-bit counter therefore
times all four phases on its own, and the state machine only needs to look
at T.

## HCLRT: ending a green early

A green state is left on one of two conditions:

* **T falls.** The counter wrapped after its 9 green counts, so the full
  18 s have passed (link paths L8, L17, L26).
* **The approach's detector reports no queue** (QN, QE or QLE = 1), whatever
  T is (L9, L18, L27).

Both exits assert the conditional output **HCLRT**. HCLRT clears the counter
and the 2-second divider, so the next hand-over starts at count 0 with a
whole first count. This is what keeps the timing right after an early exit:
without it the counter would still be somewhere in its green run, and the
next approach's amber would be cut short or skipped. In the natural case the
counter is already 0 and the clear does nothing.

In this RTL, HCLRT is a combinational (Mealy) output of the controller. The
clear takes effect on the same clock edge as the state change. The
controller also keeps a registered copy of the word a program would write to
its output port, `{next state, HCLRT}` (5 bits, for example `09h` = go to
ST4 and clear). That copy is brought out as `port_word` for monitoring only;
nothing inside uses it. HCLRT is never used as a delayed clear because the
new hand-over state would then see the old count's T for one cycle and could
leave at once. An assertion in `stt_controller` checks that HCLRT only
occurs when a green state is left.

## Lamp outputs: a ROM, not a decoder

Every lamp is lit in several states. A 4-to-16 decoder of the state code
with an OR gate per lamp would do the job, and that structure is a ROM. So
the lamps come from a 16-word by 11-bit ROM addressed by the present state
(`rtl/state_output_rom.sv`). The word layout is `traffic_pkg::lamps_t`,
MSB first:

```
bit 10      9      8      7       6      5      4    3      2      1    0
  HAMBLE  HREDN  HREDE  HREDLE  HAMBN  HGRNN  HR2  HAMBE  HGRNE  HR1  HGRNLE
```

A 1 switches the lamp on through its solid-state switch. The ROM is
combinational, so the lamps follow the state register within the same
cycle. The approach about to receive right of way shows red and amber
together. HR1 is lit with the E and LE greens, and HR2 with the N green.
What the auxiliary lamps stand for at the junction is not defined here; they
are two more switched outputs.

## Cycle-level timing

With `TC = CLK_HZ * COUNT_PERIOD_S` clock cycles per count (65536 by
default), and after reset or HCLRT:

| state group step  | length in clock cycles                             |
|-------------------|----------------------------------------------------|
| hand-over amber   | 3·TC + 2 (tick register and state register, 1 cycle each) |
| all red           | TC                                                 |
| red + amber       | 3·TC                                               |
| green, queue kept | 9·TC                                               |
| green, queue ends | 3 cycles after the detector line rises (2 synchroniser stages + state register) |
| green, no queue   | 1 cycle                                            |

A full turn with every queue present takes 3·(16·TC + 2) cycles, that is
96 s plus 6 clock cycles.

## Top level: `traffic_light_top`

```
 qn,qe,qle ──► sync2 ──► stt_controller ──state──► state_output_rom ──► lamps
                             ▲        │
                             T      hclrt
                             │        ├──────────────────┐
                       interval_timer ◄── clear          │
                             ▲                           │
                            tick                         │
                             │                           │
                          timebase ◄── clear ────────────┘
```

| port        | dir | width | meaning                                               |
|-------------|-----|-------|-------------------------------------------------------|
| `clk`       | in  | 1     | system clock, `CLK_HZ` (default 32 768 Hz)            |
| `rst`       | in  | 1     | power-up pulse, synchronous, active high              |
| `qn` `qe` `qle` | in | 1  | queue detectors, **1 = no queue**, asynchronous       |
| `lamps`     | out | 11    | lamp lines (`lamps_t`), 1 = on                        |
| `state`     | out | 4     | present state code                                    |
| `count`     | out | 4     | interval counter                                      |
| `t`         | out | 1     | timing qualifier T                                    |
| `hclrt`     | out | 1     | HCLRT                                                 |
| `port_word` | out | 5     | registered `{next state, HCLRT}`                      |

Parameters: `CLK_HZ` (default 32768) and `COUNT_PERIOD_S` (default 2). After
`rst` the junction is in ST0 (LE amber) with the counter at 0. The queue
inputs go through a two-flop synchroniser (`rtl/sync2.sv`), which resets to
"queue present".

Files in `rtl/`: `traffic_pkg.sv` (state enum, lamp struct, widths),
`stt_controller.sv`, `state_output_rom.sv`, `interval_timer.sv`,
`timebase.sv`, `sync2.sv` and `traffic_light_top.sv`.

## What is outside the RTL

The surrounding parts have no logic function of their own and are left as
ports:

* the power-up one-shot that resets the counter, which enters as `rst`;
* the three queue detectors, which enter as `qn`, `qe`, `qle`;
* the solid-state switches that connect mains power to each lamp, driven by
  `lamps`.

The original arrangement runs the STT as a program on a small processor: one
statement per link path, with the next state and HCLRT written to an output
port and the lamps decoded from that port by the ROM. Here the program
becomes clocked logic that evaluates the table every clock cycle. The
behaviour at the ports is the same, and no processor is needed. A conflict
monitor of the kind used in commercial cabinets is not part of this design.

## Choices made in this implementation

These points are fixed by this RTL rather than by the original design:

* **Clock.** 32.768 kHz, so the 2-second count is 65536 cycles. Change
  `CLK_HZ` for any other clock.
* **HCLRT timing.** HCLRT is combinational and clears the counter and the
  divider on the edge of the state change. The original latches HCLRT in the
  output port with the next state.
* **Detector polarity.** A line is 1 for "no queue".
* **Synchroniser.** The detector lines pass through two flip-flops.
* **Reset.** The power-up pulse resets the state register and the divider
  as well as the counter.
* **Unused codes 12-15.** They lead back to ST0, and the ROM shows all red
  for them.
* **The N green word (ST3).** It is built by the same rule as the other
  greens: N green, E and LE red.
* **HR2.** It is lit with the N green, by analogy with HR1, which is lit
  with the E and LE greens.

## Verification

Each block has a self-checking testbench in `tb/`. Every testbench ends with
a `TB_RESULT checks=N failures=M` line and has a watchdog.

| testbench               | what it checks |
|-------------------------|----------------|
| `tb_stt_controller`     | 20 000 random cycles of T and queue inputs against a reference built from the four-step phase rule; state, HCLRT and port word every cycle; all 27 link paths must be taken; mid-run reset |
| `tb_state_output_rom`   | all 16 words against a pattern built from each approach's role; at most one green, never green and red on one approach |
| `tb_interval_timer`     | count and T against the 16-entry T table; T runs of 3/1/3/9 counts; clear and reset |
| `tb_timebase`           | single-cycle tick exactly every TC cycles, restart on clear; the 65536-cycle default period |
| `tb_traffic_light_top`  | whole design at 4 cycles per count. Every approach sees a full green, an early end and a skipped green; counter wraps; mid-run reset. `tl_monitor` checks state order, every phase length, HCLRT, lamps and green conflicts each cycle. A mechanism that never occurs is a failure. |
| `tb_traffic_light_full` | whole design at default parameters (65536 cycles per count): one complete turn from power-up. N keeps its queue, E's queue clears 4 s into its green, LE is empty. The turn length is checked to the cycle. |

`tb/tl_monitor.sv` is the shared per-cycle checker used by the two
top-level testbenches.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/traffic_pkg.sv tb/tb_traffic_light_full.sv --top-module tb_traffic_light_full
./obj_dir/Vtb_traffic_light_full
```

The testbenches build without warnings. The full-size run simulates about
2.1 million clock cycles and takes a couple of seconds. To lint the synthesizable part, run
`verilator --lint-only -Wall -Irtl -y rtl rtl/traffic_pkg.sv rtl/traffic_light_top.sv`.
It reports no warnings.

## Changing it

* **Different phase lengths.** Edit the T decode in `interval_timer`. The
  state machine only sees T, so any pattern of four runs works (low, high,
  low, high within one counter turn). A longer plan needs a wider counter.
* **Different lamp wiring.** Edit the `ROM` table in `state_output_rom`.
  The testbenches hold their own expected patterns, so update
  `tb_state_output_rom` and `tl_monitor` as well.
* **A fourth approach.** Add four states and three link paths per approach
  in `stt_controller`, widen the ROM, and add a detector input.
