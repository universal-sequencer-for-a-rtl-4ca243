# Universal pulse sequencer for a four-phase unipolar stepper motor

A four-phase unipolar stepper motor (phases A, B, C, D) turns one step each
time the pattern of energised phases moves on by one position. The sequencer
takes a train of command pulses, a rotation sense S and a drive-mode select.
It produces the four phase commands that a power switching stage amplifies
into the motor windings. One small circuit covers all three usual drive modes
in both directions.

The main idea: the position is not kept in a ring shift register holding the
phase pattern itself. It is kept in a **3-bit up/down counter built from T
flip-flops, counting in natural binary**. A combinational decoder turns the
count into the phase pattern. A stray pulse can then only move the motor by one
step. It cannot turn the pattern into one with the wrong number of phases on,
as it can in a shift register. The count has eight stable states, S0..S7. That
is enough for half-step drive, and it repeats the four-step patterns of the
other two modes twice.

## Drive modes and sequences

| mode | select | phases on | clockwise (S = 1) | anticlockwise (S = 0) |
|---|---|---|---|---|
| wave drive | SS | one | A, B, C, D, A, ... | A, D, C, B, A, ... |
| normal drive | SD | two | AB, BC, CD, DA, AB, ... | AB, DA, CD, BC, AB, ... |
| half-step drive | SM | one and two in turn | A, AB, B, BC, C, CD, D, DA, A, ... | A, DA, D, CD, C, BC, B, AB, A, ... |

The state assignment that the decoder implements:

| state Q2 Q1 Q0 | S0 000 | S1 001 | S2 010 | S3 011 | S4 100 | S5 101 | S6 110 | S7 111 |
|---|---|---|---|---|---|---|---|---|
| wave (SS) | A | B | C | D | A | B | C | D |
| normal (SD) | AB | BC | CD | DA | AB | BC | CD | DA |
| half-step (SM) | A | AB | B | BC | C | CD | D | DA |

Clockwise rotation counts up through this table and anticlockwise counts down.
The sense therefore reverses the motor at any point without any other state.

## The counter: T flip-flops and their excitation

A T flip-flop toggles when T = 1 and holds when T = 0 (Q⁺ = T ⊕ Q). So the
T input of each bit is 1 exactly where that bit must change on the next step.
For a binary up/down counter this gives equations that are the same in every
drive mode:

```
T0 = 1                          LSB toggles on every step
T1 = NOT (S xor Q0)             up: toggle when Q0 = 1; down: toggle when Q0 = 0
T2 = S'.Q1'.Q0' + S.Q1.Q0       toggle when the two lower bits wrap
```

Q2 does not appear in any of them. These are the reasons for T flip-flops and a
binary state code: the next-state logic is reduced to one XNOR and two
three-input products. Other flip-flop types or state codes need more
next-state logic (`rtl/excitation_logic.sv`).

## The decoder

Each phase output is an OR of one product term per mode. The mode lines gate
the terms:

```
A = SS.Q1'.Q0' + SD.NOT(Q1 xor Q0) + SM.(Q2'.Q1' + Q2.Q1.Q0)
B = SS.Q1'.Q0  + SD.Q1'            + SM.Q2'.(Q1 + Q0)
C = SS.Q1.Q0'  + SD.(Q1 xor Q0)    + SM.(Q2'.Q1.Q0 + Q2.Q1')
D = SS.Q1.Q0   + SD.Q1             + SM.Q2.(Q1 + Q0)
```

Wave and normal drive use only Q1 Q0. Half-step drive uses all three bits
(`rtl/state_decoder.sv`).

The mode select is meant to be one-hot. The decoder does not enforce that. With
no mode line high every phase is off, which is a safe idle state for the
switching stage. With two lines high the outputs are the OR of the two
patterns. The mode can change between pulses without moving the counter. For
example, switching from normal to wave drive in state S1 changes the output
from BC to B.

## Clocking and the command inputs

A discrete version of this sequencer would clock the T flip-flops directly
with the command pulse train. This RTL runs from one free-running system clock
instead, which is the usual practice for synthesizable logic.
`rtl/command_input.sv` passes the pulse, the sense and the mode lines through
a `SYNC_STAGES`-deep synchroniser (default 2). One more register detects the
pulse's rising edge and turns it into a one-clock step enable. All three T
flip-flops share that enable. Sense and mode go through the same number of
stages as the pulse. The sense that goes with a step is therefore the one
present when the pulse rose.

The synchroniser, the edge detector and the asynchronous active-low reset are
this design's own choices. The reset puts the counter in S0, so A (wave,
half-step) or AB (normal) is energised out of reset.

## Interface and timing of the top, `pulse_sequencer`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock |
| `rst_n` | in | 1 | asynchronous reset, active low, to state S0 |
| `step_pulse` | in | 1 | command pulse train; one step per rising edge |
| `sense` | in | 1 | S: 1 clockwise (count up), 0 anticlockwise (count down) |
| `mode` | in | `mode_t` {sm, sd, ss} | drive-mode select, one-hot |
| `phases` | out | `phases_t` {a, b, c, d} | phase commands, 1 = energise |
| `state` | out | 3 | counter Q2 Q1 Q0 |

- **Step latency:** the state moves on the clock edge `SYNC_STAGES + 1` cycles
  after the first edge that samples `step_pulse` high. The phases follow the
  state combinationally.
- **Pulse width:** the pulse must be high for at least two clock periods, and
  low for at least two, to be counted once. A pulse held high for any longer
  still gives exactly one step.
- **Mode change:** it reaches the outputs `SYNC_STAGES` cycles later.

Two assertions in the top check that the counter moves by exactly one position
in the commanded direction on every step enable, and never moves without one.

The types `mode_t` and `phases_t`, and the constants `MODE_WAVE`,
`MODE_NORMAL`, `MODE_HALF`, `SENSE_CW` and `SENSE_CCW`, are in
`rtl/stepper_pkg.sv`.

## Not included

The command pulse generator, the power switching stage and the motor itself
lie outside the sequencer. The generator is the open- or closed-loop
controller. The switching stage is analog power electronics. None of them is
part of this RTL. The `phases` outputs are meant to drive the switching stage.

## Design choices worth knowing

- **One counter for all modes.** Wave and normal drive alone would need only
  two flip-flops. The universal sequencer uses three for every mode and lets
  the decoder ignore Q2 in the four-step modes.
- **Normal-drive phase A.** A is on in AB and DA, states S0 and S3, so
  `A = SD.NOT(Q1 xor Q0)`, the complement of C's normal-drive term. Note that
  `Q1' xor Q0'` equals `Q1 xor Q0`, not its complement.
- **Mode select.** It is treated as three independent lines, not as an encoded
  field. This keeps the decoder a plain sum of products.

## Files

| file | contents |
|---|---|
| `rtl/stepper_pkg.sv` | shared types and constants |
| `rtl/t_flip_flop.sv` | T flip-flop with clock enable and async reset |
| `rtl/excitation_logic.sv` | T2 T1 T0 from S and the state |
| `rtl/state_decoder.sv` | phase commands from mode and state |
| `rtl/command_input.sv` | synchroniser and step-edge detector |
| `rtl/pulse_sequencer.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_t_flip_flop`: random T and enable, with resets in mid-run, compared with
  the truth table.
- `tb_excitation_logic`: all 16 combinations of sense and state. The expected
  T is (next state) xor (state), where the next state is state ± 1 mod 8.
- `tb_state_decoder`: all 8 × 8 mode and state combinations against the
  pattern table above. This includes the OR behaviour for mode inputs that are
  not one-hot.
- `tb_command_input`: random pulse widths. Checks one enable per rising edge at
  the stated latency, and the delayed sense and mode.
- `tb_pulse_sequencer`: runs the whole design at its default parameters.
  - Six directed runs from reset, compared with the sequences in the first
    table.
  - 600 random operations: steps, reversals, mode switches, resets in mid-run,
    and long pulses. A position model, independent of the counter encoding,
    checks them.
  - Every pulse checks the latency. The test fails if any of these mechanisms
    never occurred.

To simulate with Verilator, for example the top:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pulse_sequencer \
    rtl/stepper_pkg.sv rtl/t_flip_flop.sv rtl/excitation_logic.sv \
    rtl/state_decoder.sv rtl/command_input.sv rtl/pulse_sequencer.sv \
    tb/tb_pulse_sequencer.sv
./obj_dir/Vtb_pulse_sequencer
```

For a block testbench, list the package, the module and its testbench.
Verilator starts uninitialised variables at random values:
`+verilator+rand+reset+2` on the simulation command line checks that the
reset covers all state.
