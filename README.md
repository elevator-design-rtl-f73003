# Elevator main controller

An elevator car has to do four things between one floor and the next:
run at full speed, recognise that it is coming up on a floor, decide in
time whether to pass that floor or slow down for it, and stop exactly level
with it. This controller does that with an eight-state machine and a small
front end that turns the shaft's position sensors into two clean conditions,
*near a floor* and *at the floor*. Requests (buttons) and doors are handled by
other units. They talk to this controller through three signals only.

The original target was a small CPLD. The whole design is ten flip-flops and
four decoded outputs.

## Signals at the boundary

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | controller clock |
| `rst` | in | 1 | asynchronous, active high; car stopped, direction down, `flr` = 0 |
| `f` | in | 5 | floor code from the shaft: a floor's number while the car is near it, all ones (`5'h1F`) elsewhere |
| `stb` | in | 1 | active-low strobe; pulses low as the car enters a floor's window |
| `here` | in | 1 | high while the car is exactly level with a floor |
| `keep_going` | in | 1 | from the call logic: a call lies beyond the current floor in the present direction |
| `stop_here` | in | 1 | from the call logic: stop at the floor now being approached |
| `start` | in | 1 | from the car controller: finished at this stop, doors closed |
| `flr` | out | 5 | registered number of the floor last approached |
| `run` | out | 1 | motor on |
| `slow` | out | 1 | reduced speed for the final approach |
| `brake` | out | 1 | brake on; car stopped |
| `up`, `dn` | out | 1 each | direction. Always opposite; the call logic watches them to learn the direction |

The call logic computes `keep_going` and `stop_here` against `flr` and the
direction. So reversing `up`/`dn` at a stop changes what those two inputs mean
on the next clock.

## The shaft front end (`shaft`)

* **Floor register.** `flr` loads `f` on the **falling edge of `stb`**. It
  is a second clock domain by design: the sensor strobe itself clocks the
  register, so the floor number is captured while `f` is known to be valid.
  Nothing in the `clk` domain depends on `flr`'s timing. The call logic
  outside reads it.
* **Near floor.** `nr_flr` is a `clk` flip-flop. It is set on any clock edge
  where `stb` is low and cleared on any edge where `here` is high. Otherwise it
  holds, and set wins if both are active. It therefore stays high from the
  strobe until the car is level with the floor. That is true whether the car
  stops there or passes through at speed.
* **At floor.** `at_flr` is `here` through one flip-flop.

`f` must be stable around the falling edge of `stb`. In the test model, the
floor code appears one position before the strobe.

## The motion state machine (`updn_fsm`)

The state is three bits. Bit 2 is the direction (1 = up). Bits 1:0 are the
phase, chosen so that every output is a gate or two away from the flip-flops:

| phase (bits 1:0) | up state | down state | run | slow | brake |
|---|---|---|---|---|---|
| 11 full speed between floors | `UP_FULL` | `DN_FULL` | 1 | 0 | 0 |
| 10 passing a floor at speed | `CONT_UP` | `CONT_DN` | 1 | 0 | 0 |
| 01 slow final approach | `UP_SLOW` | `DN_SLOW` | 1 | 1 | 0 |
| 00 stopped | `STOP_UP` | `STOP_DN` | 0 | 0 | 1 |

The transitions are listed below for the up half. The down half is its
mirror image.

* `UP_FULL`: nothing happens until `nr_flr` rises. Then:
  * With `keep_going` high and `stop_here` low, go to `CONT_UP` and pass the
    floor.
  * Otherwise, go to `UP_SLOW`. This covers `stop_here` high, and also the
    case where neither input is high. That case can only mean that the one
    call left at this floor is for the *other* direction, for example a down
    button above every other call. The car must stop there anyway and then
    turn round.
* `CONT_UP`: when `nr_flr` falls (the car went level with the floor and
  `here` cleared it), go back to `UP_FULL`.
* `UP_SLOW`: when `at_flr` rises, go to `STOP_UP`.
* `STOP_UP`: wait for `start`. Then:
  * If `keep_going` is high, go to `CONT_UP`. `nr_flr` is already low at a
    stop, so this becomes `UP_FULL` on the next clock.
  * Otherwise, go to `STOP_DN`. The direction flips without moving.

With no calls at all, every `start` flips the machine between `STOP_UP` and
`STOP_DN`. The call logic therefore sees both directions in turn. A new call
in either direction is picked up at the next `start`.

### Timing

All outputs except `flr` are Moore outputs. Each changes on the clock edge
after the state changes. Some examples, counted in `clk` edges:

* From `stb` low to the car slowing: 2. The first edge sets `nr_flr`, the
  second changes the state.
* From `here` rising during a slow approach to `brake`: 2. The first edge sets
  `at_flr`, the second moves the state to `STOP_*`.
* From `start` to `run`: 1.

The car must still be in the floor's window when `slow` takes effect. It must
also not move past the level position in the two clocks after `here` rises.
Both are properties of the motor drive and the sensor spacing, not of this
logic.

## Where this implementation makes its own choices

* **Reset.** The original logic has no reset; it relied on the device's
  power-up state. `rst` is added. It is asynchronous so that it also clears
  `flr`, whose clock (`stb`) may not toggle during reset. The state resets to
  `STOP_DN`, which is all zeros.
* **`nr_flr` holds** between the strobe and `here`, so it stays high after
  `stb` returns high; this is what lets `CONT_*` wait for the floor to be
  passed.
* **The `DN_FULL` → `CONT_DN` condition** is `nr_flr & keep_going &
  !stop_here`, the exact mirror of the up side. One drawing of the state
  diagram labels that arrow with an OR; that reading would let the car pass
  a floor it was told to stop at, so it was not followed.
* `at_flr` is synchronized with one flip-flop, as in the original. If `here`
  is truly asynchronous to `clk`, a second stage would be prudent. It would
  add one clock to the stopping latency.

Not part of this RTL: the call logic (floor and car buttons), the car
controller (doors, `start`), and the shaft sensors. Their signals are the
top's ports.

## Files

| file | contents |
|---|---|
| `rtl/elevator_pkg.sv` | `state_t` (state encoding above), `motion_t` (output bundle) |
| `rtl/shaft.sv` | front end |
| `rtl/updn_fsm.sv` | motion state machine |
| `rtl/updn.sv` | top: front end + state machine |
| `tb/tb_shaft.sv` | approach-to-floor-5 sequence, then random stimulus against a history model |
| `tb/tb_updn_fsm.sv` | random inputs; reference is the minimized sum-of-products next-state equations; checks all twelve arrows occur and no other |
| `tb/tb_updn.sv` | whole controller in a model building (8 floors, car, sensors, calls, car controller) |

The top-level test runs a scripted sequence and then 120 random calls. The
script covers idle alternation, a run up past two floors, a stop and reversal
for a down call, and a run down. The test checks the following:

* The car stops only level with a called floor, and `flr` names that floor.
* `brake` follows `here` by exactly two clocks.
* The car stays inside the shaft.
* Every call is served.

It also counts every mechanism: strobes, passes in both directions, stops for
`stop_here`, stops to turn round, departures both ways, turns at a stop and
idle flips. Any mechanism that never happens is counted as a failure.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. It has a
cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_updn \
    -y rtl -y tb +libext+.sv rtl/elevator_pkg.sv tb/tb_updn.sv
./obj_dir/Vtb_updn
```

Use `tb_shaft` or `tb_updn_fsm` the same way. Each runs in well under a
second. Because the reset is asynchronous, the testbenches start with `rst`
low and raise it after 1 ns. A two-state simulator only sees a reset edge if
the signal actually rises.

To adapt the building model, change the `NF`, `UNIT`, `ZONE`, `SLOW_DIV` and
`DOOR` localparams in `tb/tb_updn.sv`. Keep `NF` at 31 or fewer, because
`5'h1F` means "no floor". A wider floor bus is the `FLR_W` parameter of
`updn` and `shaft`.
