# Remote car starter controller

A key-fob style controller that lets a driver unlock the doors and trunk,
start the engine and run the heater from a distance, so the car is warm when
they get in. Two safety timers are built in. Doors that are unlocked but
not opened lock themselves again after 30 s. An engine started remotely stops
after 2 minutes so it cannot idle indefinitely. An overheat alarm also stops
the engine. The heater takes waste heat from the engine, so it can only run
while the engine runs.

The design is a single six-state Moore machine. The main idea is that the two
timers are attached to two *overlapping superstates* instead of being spread
over many timing states:

```
                 doors unlocked superstate {S1,S3,S5}
                 (door counter runs, 30 s)
                        |
   S0 locked/off     S1 unlocked/off
   S2 locked/engine  S3 unlocked/engine            engine-on superstate
   S4 locked/engine+heater  S5 unlocked/engine+heater   {S2,S3,S4,S5}
                                                   (engine counter runs, 2 min)
```

Each state is one combination of (doors, engine, heater), with the heater only
allowed when the engine runs. The machine can be in either superstate, in both
or in neither. Each superstate owns a down-counter that keeps running while the
machine moves between the superstate's member states.

The RTL targets a Basys 3 (Artix-7) board: seven slide switches act as the remote's
buttons and the overheat alarm, and LEDs show the status.

## States and outputs

| State | code | doors unlocked | engine | heater | superstates |
|-------|------|:--:|:--:|:--:|---|
| S0 | 000 | 0 | 0 | 0 | none |
| S1 | 001 | 1 | 0 | 0 | doors |
| S2 | 100 | 0 | 1 | 0 | engine |
| S3 | 110 | 1 | 1 | 0 | engine, doors |
| S4 | 101 | 0 | 1 | 1 | engine |
| S5 | 111 | 1 | 1 | 1 | engine, doors |

The code column is the state register's encoding (`state_t` in
`remote_starter_pkg`). The outputs are decoded from the state alone
(`status_of()`), so they are glitch-free register decodes and change only on a
tick.

## Transitions

Inputs: `U` unlock, `L` lock, `Eon`/`Eoff` engine on/off, `Hon`/`Hoff` heater
on/off, `Oh` overheat; `DC`/`EC` door/engine counter. All inputs are levels
sampled once per tick. Within a state the rows are tried top to bottom, and the
first one that matches wins. If no row matches, the machine stays in the state.
A prime (') means the input is low. "All others low" refers to the inputs
the state looks at: Oh, Eoff, L, U, Hon in S3; Oh, Eoff, Hoff, U in S4;
Oh, Eoff, L, U, Hoff in S5. Inputs a state does not look at (for example
engine-on in S2 to S5) are ignored there.

| From | Condition (priority order) | To | Counter action |
|---|---|---|---|
| S0 | Eon U' | S2 | EC := ENGINE_COUNT |
| S0 | U Eon' | S1 | DC := DOOR_COUNT |
| S1 | Eon L' U' | S2 (doors lock) | EC := ENGINE_COUNT |
| S1 | DC=0 **or** L U' Eon' | S0 | |
| S1 | U Eon' L' | S1 | DC := DOOR_COUNT |
| S1 | otherwise | S1 | DC - 1 |
| S2 | EC=0 **or** (Oh+Eoff) Hon' U' | S0 | EC - 1 (in every engine state) |
| S2 | Hon Oh' U' Eoff' | S4 | |
| S2 | U Oh' Hon' Eoff' | S3 | DC := DOOR_COUNT |
| S3 | EC=0 **or** (Oh xor Eoff) L' U' Hon' | S1 | DC kept |
| S3 | DC=0 **or** L, all others low | S2 | |
| S3 | Hon, all others low | S5 | |
| S3 | U, all others low | S3 | DC := DOOR_COUNT |
| S3 | otherwise | S3 | DC - 1 |
| S4 | EC=0 **or** (Oh xor Eoff) Hoff' U' | S0 | |
| S4 | Hoff, all others low | S2 | |
| S4 | U, all others low | S5 | DC := DOOR_COUNT |
| S5 | EC=0 **or** (Oh xor Eoff) L' U' Hoff' | S1 | DC kept |
| S5 | DC=0 **or** L, all others low | S4 | |
| S5 | Hoff, all others low | S3 | |
| S5 | U, all others low | S5 | DC := DOOR_COUNT |
| S5 | otherwise | S5 | DC - 1 |

Three properties of these guards are worth knowing before the design is used:

* **An expired counter wins over the buttons.** A held unlock does not restart
  a door counter that has already reached 0: the doors lock first. The one
  exception is in S1, where engine-on (with lock and unlock released) is
  checked before the door counter.
* **Conflicting buttons are ignored.** Most guards require the other relevant
  buttons to be released, so pressing two at once usually leaves the state
  unchanged. In particular, overheat does not stop the engine while
  unlock, or the lock or heater button that the state looks at, is held at
  the same time. With overheat and engine-off
  both high in S3, S4 or S5, the engine also keeps running. Only the engine
  counter stops the engine regardless of the inputs.
* **Starting the engine locks the doors** (S1 to S2). Unlock again to get S3.

## The two counters

Both counters count ticks (1 ms at full size) and are plain registers with an
enable. Where the table gives no counter action they hold their value, so no
latches are inferred.

* **Engine counter** (`ENGINE_COUNT` = 120000, 17 bits). It is loaded on entry to
  the engine superstate (S0/S1 to S2) and decremented on every tick in S2 to S5,
  whatever the inputs. Holding engine-on does not reload it, so a remote start
  cannot be extended. When it reads 0 the machine leaves the superstate and the
  doors keep their state: S2 and S4 go to S0, S3 and S5 go to S1. The engine is
  therefore on for `ENGINE_COUNT + 1` ticks, 120.001 s. The counter stops at 0
  rather than wrapping.
* **Door counter** (`DOOR_COUNT` = 30000, 15 bits). It is loaded on entry to the
  doors superstate from a locked state (S0 to S1, S2 to S3, S4 to S5) and
  reloaded by every tick on which unlock is pressed inside it. It is
  decremented on the ticks where the machine stays in the same doors state.
  When it reads 0 the doors lock: S1 to S0, S3 to S2, S5 to S4. Moves inside
  the superstate (S3 to S5, S5 to S3, and engine-off S3/S5 to S1) keep the count,
  so turning the engine off does not extend the unlocked time. An unlock with
  no further input keeps the doors open for `DOOR_COUNT + 1` ticks.

The door counter does not move on a tick where the machine changes state, and
in S2/S4 it does not move at all. Its value is only meaningful inside the doors
superstate.

## Time base

`clock_divider` counts `DIV` = 100000 cycles of the 100 MHz board clock and
emits a one-cycle `tick` pulse, which gives 1 kHz. The controller runs on the
board clock and updates its state and counters only in cycles where `tick` is
high. There is no second clock domain and no divided clock. The first tick
comes in the cycle after the `DIV`-th edge following reset, and the
controller first samples the switches on the edge after that.

## Board top

`remote_starter_top` connects the divider and the controller to the board:

| Switch | command |
|---|---|
| SW0 | unlock |
| SW1 | lock |
| SW2 | engine on |
| SW3 | engine off |
| SW4 | heater on |
| SW5 | heater off |
| SW6 | overheat alarm |

| LED | shows |
|---|---|
| LED0 (`led_doors_unlocked`) | doors and trunk unlocked |
| LED2 (`led_engine`) | engine on |
| LED4 (`led_heater`) | heater on |
| LED10 to LED15 (`led_state`) | current state S0 to S5, one-hot |

Each status LED sits above the switch that turns its function on. In a
car, `overheat` would come from an engine temperature alarm (195 °F) and the
three status outputs would drive the car's actuators. No such sensor is
modelled here. `rst` is a synchronous, active-high reset into S0 with both
counters cleared. A Basys 3 build needs a pin for it, for example a push button.

The switches go to the controller without synchronisers or debouncing, as in
the original design. They are only sampled once per millisecond, but a
product should add a two-flop synchroniser per input before `cmd`.

## Where this RTL departs from the original design

* **S5 overheat exit.** The original next-state logic for S5 requires overheat
  to be both high and low, so overheat could never stop the engine in S5. The
  state diagram and the requirement that an overheating engine stops both say
  otherwise. Here S5 uses the same overheat guard as S3.
* **Guard wording.** The table above follows the original next-state logic.
  The published state diagram states a few guards slightly differently. Its
  S1 to S0 edge, for example, also requires unlock and engine-on to be low when
  the door counter expires, and its engine exits allow overheat and engine-off
  together. The diagram's state codes are used as the state encoding. Its S1
  code (001) does not follow the output order used for the other states, so the
  outputs come from the per-state assignments, not from the codes.
* **Clock enable instead of a divided clock.** The original divider toggles a
  slow clock every 100000 cycles, which gives 500 Hz, although the design's
  timing is specified at 1 kHz. Here a tick every 100000 cycles gives 1 kHz,
  so 30000 ticks are 30 s and 120000 ticks are 2 min.
* **Reset** is added. The original relies on power-up values.

## Files

| File | Contents |
|---|---|
| `rtl/remote_starter_pkg.sv` | `state_t`, `remote_cmd_t`, `car_status_t`, output decode |
| `rtl/clock_divider.sv` | 1 kHz tick generator |
| `rtl/remote_controller.sv` | state machine and both counters, with assertions (heater implies engine; an expired door counter always leaves the state) |
| `rtl/remote_starter_top.sv` | board top: switches, LEDs, divider, controller |
| `tb/tb_clock_divider.sv` | tick period at DIV = 7 and 100000, reset in mid-count |
| `tb/tb_remote_controller.sv` | the two reference scenarios tick by tick (door 30, engine 120), every transition, and 20000 random ticks against a reference model |
| `tb/tb_remote_starter_top.sv` | end to end through the switches, at a tick of 10 clocks. Counts every mechanism and measures the relock time (31 ticks) and the engine run time (121 ticks) in clock cycles |
| `tb/tb_remote_starter_full.sv` | one full remote session at the default sizes (100 MHz, 1 kHz tick), checking that each command takes effect exactly one tick later |

Each testbench prints `TB_RESULT checks=N failures=M` and finishes.

## Simulating

With Verilator 5 (the testbenches reset or initialise everything they read,
so they also run under two-state simulation):

```
verilator --binary --timing --assert -Irtl \
  rtl/remote_starter_pkg.sv rtl/clock_divider.sv rtl/remote_controller.sv \
  rtl/remote_starter_top.sv tb/tb_remote_starter_top.sv \
  --top-module tb_remote_starter_top
./obj_dir/Vtb_remote_starter_top
```

Swap in another testbench and its `--top-module` for the others.
`tb_remote_controller` needs only the package and the controller, and
`tb_clock_divider` only the divider. Lint with
`verilator --lint-only -Wall -Irtl <files> --top-module remote_starter_top`.
The only warnings are for the three observation outputs of the controller
(`state`, `door_count`, `engine_count`), which the top deliberately leaves
unconnected.

Simulation speed is about 2 million clock cycles per second. The full-size
session takes a few seconds. Waiting out the real 30 s and 2 min timeouts
would take 3·10⁹ and 1.2·10¹⁰ cycles, so those timeouts are only simulated
with the counts reduced (`DOOR_COUNT` = 30, `ENGINE_COUNT` = 120, `CLK_DIV` =
10). The counters' logic does not depend on their size.

## Changing it

* Timeouts: `DOOR_COUNT` and `ENGINE_COUNT` (in ticks) and `CLK_DIV` (clock
  cycles per tick) are parameters of the top. The counter widths follow from
  them.
* New functions fit the superstate scheme: a new state needs an output row in
  `status_of()`, an entry in `state_t` and a case arm in the next-state
  logic. A new timer is another counter register loaded on entry to its
  superstate.
* The synthesized top is about 190 word-level cells and 56 flip-flops, with
  no latches.
