# Switch-programmable stepper motor controller

This design drives a four-phase, 48-pole stepper motor (7.5 degrees per step,
48 steps per revolution) from a 50 MHz clock. It needs no processor. Five
slide switches choose whether the motor runs, which way it turns, how fast it
steps, and whether it turns continuously or by a fixed 45, 90 or 135 degrees.
Four output lines switch the motor's coils through external transistor
drivers. The whole controller is a clock divider, a small move counter and a
two-bit phase ring: about fifty flip-flops.

## The stepping code

One coil pattern is applied at a time. Each pattern is written as a hex digit,
one bit per coil, and the motor steps one pole each time the pattern moves to
its neighbour in the ring:

| position | pattern | Phase 1 | Phase 2 | Phase 3 | Phase 4 |
|---|---|---|---|---|---|
| 0 | `A` = 1010 | on | off | on | off |
| 1 | `9` = 1001 | on | off | off | on |
| 2 | `5` = 0101 | off | on | off | on |
| 3 | `6` = 0110 | off | on | on | off |

Walking the ring forwards (A, 9, 5, 6, A, ...) turns the shaft clockwise.
Walking it backwards (6, 5, 9, A, ...) turns it counter-clockwise. On the
`motor_fases[3:0]` output, bit 3 drives Phase 1 and bit 0 drives Phase 4. A 1
switches the coil's driver transistor on.

The sequencer stores only its position in the ring, so a change of direction
always continues from the pattern the coils hold at that moment. The shaft
never jumps two phases. After reset all four lines are 0 and the coils are
unpowered. The first step then only energizes the coils, which pulls the rotor
onto the nearest pole. Every later step is a real 7.5 degree step.

## Speed: the step period

The motor accepts 2 ms to 10 ms between patterns. The controller uses the two
ends of that range:

| switch 3 | speed | period | clock cycles at 50 MHz |
|---|---|---|---|
| 0 | high | 2 ms | 100,000 |
| 1 | low | 10 ms | 500,000 |

A 20-bit counter (maximum 1,048,576 cycles, or 20.97 ms) counts clock cycles.
It returns to zero on the cycle it reaches the selected period less one, and
that cycle is the step tick. While the motor is not meant to move, the counter
is held at zero. As a result:

- the first step of any move comes exactly one period after the move starts;
- later steps are exactly one period apart;
- if the speed switch shortens the period while the count has already passed
  the new end, the next cycle ticks and the counter restarts.

At high speed the motor turns 7.5 degrees every 2 ms, which is 625 rpm. At low
speed it turns 7.5 degrees every 10 ms, which is 125 rpm.

## The switch panel and how moves start

| switch | 0 | 1 |
|---|---|---|
| 1 `on_off` | motor stopped | motor may rotate |
| 2 `direction_of_rotation` | clockwise | counter-clockwise |
| 3 `low_speed` | high speed (2 ms) | low speed (10 ms) |

| switches 5, 4 (`angle_sel[1:0]`) | motion |
|---|---|
| 00 | continuous rotation |
| 01 | 45 degrees = 6 steps |
| 10 | 90 degrees = 12 steps |
| 11 | 135 degrees = 18 steps |

The move controller has four states:

- **IDLE**: switch 1 is off.
- **CONT**: continuous rotation.
- **MOVE**: a fixed move is counting down its steps.
- **DONE**: a fixed move has finished. The coils keep the last pattern, so the
  shaft is held in place.

A switch panel has no "go" button, so this design chooses the rule for
starting a move itself. A new move starts:

- when switch 1 turns on; or
- when, with switch 1 on, the angle switches or the direction switch change.

In the cycle a move starts, the step timer is cleared. The move then runs from
the beginning with the new settings: its full step count, and the new
direction from the current pattern. So the following all start a new move:

- flipping switch 1 off and on again repeats the last move;
- changing from 45 to 90 degrees after a move turns the shaft 90 degrees more;
- reversing the direction during a move starts the full move in the other
  direction.

The speed switch is not a restart condition. It changes the period of the
move already under way.

Turning switch 1 off stops stepping at once. The coils keep the last pattern.

The five switches are mechanical and asynchronous, so each one passes through
a two-flip-flop synchronizer before the controller sees it.

## Structure

```
 switches ──► switch_sync ──► move_controller ──run──► step_timer
   (5)        (2 flip-flops)     │    ▲                  │ tick
                                 │    └──────tick────────┤
                                 │ direction             ▼
                                 └──────────────► phase_sequencer ──► motor_fases[3:0]
                                                  (ring + FDC-style     to the coil drivers
                                                   output register)
```

| file | contents |
|---|---|
| `rtl/stepper_pkg.sv` | stepping code, 7.5 degree geometry, direction and angle enums, steps per angle |
| `rtl/switch_sync.sv` | two-flop synchronizer for the switches |
| `rtl/move_controller.sv` | IDLE/CONT/MOVE/DONE state machine, remaining-step counter, restart rule |
| `rtl/step_timer.sv` | 20-bit divider that makes the 2 ms / 10 ms step tick |
| `rtl/phase_sequencer.sv` | two-bit ring position and the registered coil outputs |
| `rtl/stepper_controller_top.sv` | the controller, with the board-level ports |

Top-level ports of `stepper_controller_top`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 50 MHz clock |
| `rst` | in | 1 | asynchronous clear, active high |
| `on_off` | in | 1 | switch 1 |
| `direction_of_rotation` | in | 1 | switch 2 |
| `low_speed` | in | 1 | switch 3 |
| `angle_sel` | in | 2 | bit 1 = switch 5, bit 0 = switch 4 |
| `motor_fases` | out | 4 | coil lines, bit 3 = Phase 1 |

Parameters of the top, passed down to `step_timer`:

| parameter | default | meaning |
|---|---|---|
| `CNT_W` | 20 | divider counter width |
| `FAST_DELAY_CYCLES` | 100000 | 2 ms at 50 MHz |
| `SLOW_DELAY_CYCLES` | 500000 | 10 ms at 50 MHz |

For a different clock, scale both delays. Widen `CNT_W` if the slow delay
exceeds 2^20 cycles; the timer refuses to elaborate if it is too narrow.

## Timing from switch to shaft

| event | cycles |
|---|---|
| switch change to the controller | 2 (synchronizer) |
| start of a move to timer running | 1 |
| timer running to first tick | one period |
| tick to new pattern on `motor_fases` | 1 (output register) |
| later steps | one period apart |

A 45 degree move at high speed ends about 12 ms after switch 1 turns on. At
low speed it ends about 60 ms after. A 135 degree move at low speed takes
180 ms.

## Outside the logic

Two parts around the controller are not logic:

- **Coil drivers.** Each phase line drives one NPN power transistor through a
  current-limiting resistor. The four windings share a common connection to
  the 5 V motor supply.
- **Clock.** The 50 MHz clock comes from the board oscillator.

Neither is modelled in `rtl/`. The testbenches use a behavioural motor model
(`tb/stepper_motor_model.sv`). It turns pattern changes into shaft position,
and it flags any change that is not a single step along the ring.

## Where this RTL goes beyond the original description

The following parts are choices made for this RTL. The original description
does not give them:

- The restart rule for fixed moves. The original only says what each switch
  setting does.
- The switch synchronizer.
- The exact 2 ms and 10 ms periods as the two speeds. The original gives the
  range 2 to 10 ms and calls one speed high and the other low.
- Clearing the outputs to all-off on reset. The output register of the
  original is a clearable flip-flop, but what drives its clear is not shown.
- The `rst`, `low_speed` and `angle_sel` port names.

The port name `motor_fases` keeps the spelling of the original netlist.

The original reports 38 flip-flops. This RTL has 49:

| flip-flops | what |
|---|---|
| 20 | divider |
| 4 | outputs |
| 2 | ring position |
| 10 | synchronizer |
| 13 | controller |

The original also reports 8 bonded I/O pins. That is fewer than its own five
switches plus four phase lines, so it cannot be matched exactly. This RTL uses
11 pins: clock, reset, five switches and four phase lines.

## Verification

Every testbench is self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_step_timer` | tick spacing at both speeds, the first tick after enable, hold while disabled, shortening the period mid-count; one 2 ms and one 10 ms interval measured at full size |
| `tb_phase_sequencer` | all-off after reset, A-9-5-6 forwards and backwards against an independent table, random direction changes, hold between steps, asynchronous clear |
| `tb_move_controller` | 6/12/18 steps per move in both directions with duration and hold, continuous mode, immediate stop, restart on angle, direction or on/off change, change of angle mid-move |
| `tb_stepper_controller_top` | end to end with 20/60-cycle periods and the motor model. Covers continuous rotation both ways at both speeds, a full 48-step revolution, stop, every fixed angle with timing and hold, and restarts. It counts each of these and fails if any never happened. |
| `tb_stepper_controller_full` | all defaults and a 20 ns clock. A 45 degree clockwise move at 2 ms per step, then a 45 degree counter-clockwise move at 10 ms per step, with the spacing of every pattern change checked exactly (about 3.7 M cycles, a few seconds) |

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    rtl/stepper_pkg.sv tb/tb_stepper_controller_top.sv \
    --top-module tb_stepper_controller_top -o sim
./obj_dir/sim
```

Swap in another testbench's file and module name to run it. For lint only:
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/stepper_pkg.sv rtl/stepper_controller_top.sv`.
The remaining lint warnings are expected:

- the unconnected `busy`/`done` status pins at the top;
- the reset used both as an asynchronous clear and in assertion disables;
- a package constant that some modules do not use.
