# FPGA trip logic for a nuclear plant protection system

A plant protection system (PPS) watches a handful of plant parameters. It
trips the reactor when one of them reaches its limit. Each parameter has a
*bistable*: a comparator with memory that raises a **pretrip** (a warning
short of the limit) and a **trip**. Once raised, a signal clears only after
the parameter has come back past the setpoint by a *hysteresis* margin.
What makes the bistables differ is where the setpoint comes from:

| algorithm | setpoint | channels here |
|---|---|---|
| fixed setpoint | a constant supplied from outside | high log power, high pressurizer pressure, low and high steam-generator (SG) water level, high containment pressure |
| variable, automatic rate limiting | follows the process with a margin, limited in how fast it may rise, between a floor and a ceiling | variable overpower trip (VOPT) |
| variable, manual reset | follows a rising process; when the process falls, the operator lowers it step by step | low pressurizer pressure trip (LPPT) |

This RTL implements all three algorithms as synchronous logic with no
processor, and places them side by side in one top, `pps_trip_logic`. A
seven-segment display driver for bench testing on a small FPGA board is
included. All values are 16-bit unsigned engineering units: percent for
power and level, psia for pressure.

## Fixed-setpoint bistable (`fixed_sp_bistable`)

For a channel that trips on a rising value (`TRIP_HIGH = 1`):

* trip sets when `PI >= trip_sp`, and clears when `PI < trip_sp - HYS`;
* pretrip works the same way on `pretrip_sp`;
* while a signal is set, the setpoint it reports (`trip_spc`,
  `pretrip_spc`) is `sp - HYS`, the level at which it will clear.

With setpoints 90/75 % and `HYS = 5`, a level sequence
0, 20, 60, 80, 85, 70, 60, 75, 80, 90, 95, 80, 90, 75, 40 gives a pretrip from
80 that holds through 70, drops at 60, and returns at 75. It gives a trip at
90 and 95 that drops at 80, then trips again at 90. `TRIP_HIGH = 0` mirrors
every comparison for the low SG level channel. Latency: `pi_out` one clock
after the input, and trip/pretrip two clocks after.

## Variable overpower trip (`vopt_bistable`)

On each power sample (`sample = 1`):

```
target   = power + MARGIN                         (15 %)
tsp_next = min(target, tsp + RATE)                (RATE = 11 % per sample)
tsp_next = clamp(tsp_next, FLOOR, CEIL)           (20 %, 110 %)
pretrip setpoint = tsp - PRETRIP_OFF              (6 %)
```

A falling power pulls the setpoint down at once. A rising power can raise it
by at most `RATE` per sample. Two kinds of trip therefore come out of one
comparison, `power >= tsp`:

* **ceiling trip**: the setpoint is pinned at 110 % and power reaches it;
* **rate trip**: power rises more than `MARGIN` + `RATE` in one sample, or
  keeps outrunning the limit, and catches the setpoint below the ceiling.
  `rate_limited` shows that the last update was held back.

Hysteresis (5 %) works as in the fixed bistable. Example: a ramp of 10 %
per sample gives setpoints 20, 25, 35, ... 105, then 110 from 95 % power.
The pretrip comes at 106 % and the trip at 110 %. While tripped, the
setpoints read 105/99. A step from a steady 30 % (setpoint 45) to 70 %
limits the setpoint to 56 and trips. After two more samples at 70 % the
setpoint has climbed to 78 and the trip clears.

Reset puts the setpoint at the floor. A plant already at power therefore
sees a rate trip at start-up until the setpoint has climbed, which is the
conservative side. An assertion checks that the setpoint never leaves the
floor-to-ceiling range.

## Low pressurizer pressure trip (`lppt_fsmd`)

This is the most involved channel. It is a finite-state machine with
datapath (FSMD): `lppt_datapath` holds registers and comparators, and
`lppt_controller` holds two state machines. They exchange two structs from
`pps_pkg`: `lppt_ctrl_t` (enables, mux select) and `lppt_flags_t`
(comparator results).

### Setpoint behaviour

```
 pressure rising          : trip SP = P - 400, up to the ceiling 1700 (P >= 2100)
 pressure falling         : trip SP held
 operator reset (held 10 s, and P - SP <= 400):
        P > 700           : trip SP = P - 400       (one step per press)
        P <= 700          : trip SP = 300 (floor)
 pretrip SP               : trip SP + 100
 trip                     : P <= trip SP;  clears when P > trip SP + 100
 pretrip                  : P <= pretrip SP; clears when P > pretrip SP + 100
 operating bypass         : permitted when P <= 400, removed when P >= 500;
                            when permitted and requested (sob), suppresses the trip at the floor
```

During a slow depressurisation (a planned cooldown) the operator walks the
setpoint down one 400 psia step at each pretrip. Near the bottom of the range
a bypass is permitted, so the channel does not trip on a pressure that is
low by intent. Above 500 psia the bypass is removed automatically.

### Datapath

Registers: `PI` (pressure), `PI1` (previous pressure), `TSP` (trip
setpoint) and `PTSP` (pretrip setpoint). `TSP` loads from a mux: `00` floor
300, `01` ceiling 1700, `10` `PI - 400`. Here `PI - 400` is kept at or above
the floor. `PTSP` loads `TSP + 100`. The comparators produce: `PI <= PTSP`,
`PI <= PTSP + hys`, `PI <= TSP`, `PI <= TSP + hys`, `PI >= 2100`, `PI > 700`,
`PI >= 500`, `PI <= 400`, `PI >/< PI1` and `PI - TSP > 400`. While
tripped, the setpoint outputs carry the hysteresis.

### Controller

*Rate / bypass-permission FSM* (`START, WAIT, UPD1, UPD2, REMOVE, ALLOW`).
In `WAIT` it compares `PI` with `PI1`. A rise passes through `UPD1`, which
sets `rate_up`. A fall passes through `UPD2`, which clears it. Both reload
`PI1`. With the pressure steady, `REMOVE` (P >= 500) and `ALLOW` (P <= 400)
clear and set the bypass permission `pob`. `PI` loads only in `START`/`WAIT`,
so every comparison sees a stable pair.

*Setpoint FSM* (`FOLLOW, CEILING, HOLD, STEP, FLOOR, TRIP, UNTRIP`):

| from | condition (first match wins) | to |
|---|---|---|
| FOLLOW | not rising | HOLD |
| FOLLOW | P >= 2100 | CEILING |
| CEILING | P >= 2100 | CEILING |
| CEILING | not rising | HOLD |
| CEILING | otherwise | FOLLOW |
| HOLD | P <= TSP | TRIP |
| HOLD | rising | FOLLOW |
| HOLD | valid reset, P - TSP <= 400, P > 700 | STEP → HOLD |
| HOLD | valid reset, P - TSP <= 400, P <= 700 | FLOOR |
| FLOOR | P <= TSP and not (pob and sob) | TRIP |
| FLOOR | rising and P > 700 | FOLLOW |
| TRIP | P > TSP + hys | UNTRIP → FOLLOW |

Here "rising" means the `rate_up` flag with no fall shown by the
comparator in the current clock. The flag itself lags a fall by two clocks.
Without this qualification, `FOLLOW` would lower the setpoint on the first
falling sample. For the same reason `FOLLOW` loads the setpoint only while
rising.

A *valid reset* means `mrst` has been held for `MRST_CYCLES` clocks (10 s at
50 MHz = 500,000,000). Each press gives one step: `mrst` must be released
before it counts again.

Timing: a new pressure is taken within two clocks. A trip follows within
four clocks of the pressure crossing the setpoint. The rate FSM needs
about four clocks to classify a change, so the pressure input should stay
steady for at least that long. Real plant signals change much more slowly
than that.

The controller carries two assertions, checked in every simulation: a
pressure at or below a held setpoint trips on the next clock, and a trip
is never left while the pressure is inside the hysteresis band.

## Top level and display

`pps_trip_logic` instantiates five `fixed_sp_bistable`s, one `vopt_bistable`
and one `lppt_fsmd`, each with its own ports, plus `seg7_display`. The fixed
channels are arrays indexed 0 high log power, 1 high pressurizer pressure,
2 low SG level, 3 high SG level and 4 high containment pressure. The
channels share only the clock and reset.

`disp_chan` (0–4 fixed, 5 VOPT, 6 LPPT) picks the channel, and `disp_mode`
picks what it shows:

* 0: the process value;
* 1: the trip setpoint;
* 2: the bench-test layout. The process value's low byte is on the left two
  digits and the trip setpoint's low byte on the right two. This matches a
  board where eight switches set the process input.

Digits are hexadecimal and multiplexed, with active-low anodes and
segments, one digit every `REFRESH_CYCLES` clocks.

## Parameters and where they come from

| parameter | default | origin |
|---|---|---|
| fixed `HYS` | 5 | read from the SG-level example (setpoint 90 shown as 85 while tripped) |
| VOPT `CEIL`, `FLOOR`, `PRETRIP_OFF` | 110, 20, 6 | stated design values |
| VOPT `RATE` | 11 | stated "change greater than 11 %"; applying it per sample is this design's reading |
| VOPT `MARGIN`, `HYS` | 15, 5 | read from the VOPT example values |
| LPPT 300 / 1700 / 400 / 100 / 2100 / 700 / 500 / 400 | – | stated design values |
| LPPT `HYS` | 100 | read from the LPPT example (floor 300 shown as 400 while tripped) |
| `MRST_CYCLES` | 500,000,000 | 10 s, at an assumed 50 MHz board clock |
| `REFRESH_CYCLES` | 50,000 | own choice (1 ms per digit at 50 MHz) |

## Where this design makes its own choices

* LPPT hysteresis is *added* to the setpoint for the reset level. Some
  labels of the reference description say "−hys", but that would clear a
  low-pressure trip below its setpoint.
* The floor trip condition is taken as "not (bypass permitted and
  requested)". A literal reading, "permitted and not requested", differs
  only in the two clocks the permission takes to update. In those clocks
  the literal reading would delay the trip.
* The ceiling-to-follow exit, the transition priorities, one step per
  reset press and the floor clamp on `P - 400` are not in the reference
  state diagrams. The same goes for the pretrip as a separate bistable,
  the `ob_active` status output and the enable timing.
* The VOPT rate limit is per sample, with an explicit `sample` strobe.
  The reference results are not detailed enough to pin down the exact rate
  rule.
* Setpoint data for the fixed channels is a set of ports. The LPPT
  constants are parameters, not a run-time setpoint input.
* Not built: the low SG pressure trip and low reactor-coolant-flow trip.
  They belong to the same algorithm classes as LPPT and VOPT, but their
  setpoints are not known. Also not built: the contact trips computed
  elsewhere (low DNBR, high local power density), the ADC front end, the
  test and status-reporting functions, and the downstream coincidence logic.

## Files

```
rtl/pps_pkg.sv            types, LPPT control/flag structs, state enums
rtl/fixed_sp_bistable.sv  fixed-setpoint bistable
rtl/vopt_bistable.sv      variable overpower trip
rtl/lppt_datapath.sv      LPPT registers, setpoint mux, comparators
rtl/lppt_controller.sv    LPPT rate/bypass FSM and setpoint/trip FSM
rtl/lppt_fsmd.sv          LPPT datapath + controller
rtl/seg7_display.sv       4-digit multiplexed display driver
rtl/pps_trip_logic.sv     top: all channels and the display
tb/tb_*.sv                one self-checking bench per module
tb/tb_fixed_sp_triangle.sv    triangular process against setpoints 90/75
tb/tb_pps_trip_logic.sv       end-to-end bench, shortened timing
tb/tb_pps_trip_logic_full.sv  end-to-end bench at default parameters (real 10 s reset)
```

## Simulating

Every bench prints `TB_RESULT checks=N failures=M` and stops itself. It
also has a watchdog that counts a failure if the run hangs. For example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_lppt_fsmd rtl/pps_pkg.sv tb/tb_lppt_fsmd.sv
./obj_dir/Vtb_lppt_fsmd
```

What the benches cover:

* **Block benches.** They check each module against hand-worked sequences
  and against reference models written in the bench: random stimulus for
  the bistables and the datapath, and directed transitions for the
  controller.
* **`tb_pps_trip_logic`.** It runs all channels together. It counts each
  mechanism: fixed trips in both directions, hysteresis hold, VOPT ceiling
  and rate trips, LPPT steps, floor reset, ceiling, bypassed floor trip,
  trip and untrip, and the display in every mode. A mechanism that never
  happens counts as a failure.
* **`tb_pps_trip_logic_full`.** It runs the top unmodified, holding the
  operator reset for the real 500,000,000 clocks. It takes about four
  minutes of simulation.

## How far to trust it

All behaviour above is simulated and self-checked. None of it has been run
on hardware or against plant data. The LPPT state diagrams and datapath
come from a reference design and were followed closely. The VOPT rate rule,
the hysteresis values and the display format are reconstructions from
example values, or plain choices; treat them as adjustable parameters.
The full design has about 260 flip-flops after coarse synthesis.
