# IGBT dead-time compensation in a CPLD

A voltage-source inverter must leave a short *dead time* between turning one
IGBT of a bridge arm off and turning the other on, or the arm shorts the DC
bus. During that gap the phase voltage is set by the direction of the load
current, not by the command, so every switching edge lands late by an amount
that depends on the current sign, the dead time and the driver delays. The
output voltage loses amplitude, its pulses are no longer centred, and the
current waveform distorts, worst at low current.

This design removes that error in hardware, next to the gate drivers, without
any extra analog circuitry and without a compensation algorithm in the motor
controller. It measures, for every phase, how late the real phase voltage
(fed back as `TFBx`) follows each command edge, and shifts the next edge of
the command by the measured amount. The controller keeps sending plain
theoretical switching commands; the CPLD delivers gate signals whose phase
voltage pulses have the width the controller asked for.

The RTL targets a small CPLD clocked at 40 MHz (25 ns resolution) and drives a
three-phase bridge: six gate outputs `CT1..CT6`, three feedbacks.

## Structure

```
                 CONF SHCONF BCV     T1 T3 T5        T4 T6 T2   PASS BSAFE BRST
                   |    |     |       |  |  |          |  |  |     |    |
   (all inputs through two-flop synchronizers, sync2)
                   v    v     v       v  v  v          |  |  |     |    |
              +-------------+   +------------------+   |  |  |     |    |
              | serial_port |-->| dt_comp  x3      |   |  |  |     |    |
              | REGCONF     |   | (COMP) C_P1/3/5  |<--+--+--+-- TFB1 TFB3 TFB5
              +-------------+   +------------------+   |  |  |
                 | INSE, mode          | C_P           |  |  |
                 |              +------------------+   |  |  |
                 +------------->| dt_insert  x3    |   |  |  |
                                | (RIV) iCT1..iCT6 |   |  |  |
                                +------------------+   |  |  |
              +-------------+          |               v  v  v
              | prot        |--------->+--> output_control <-- PASS, BSAFE
              | open circuit|                    |
              +-------------+                    +--> CT1 CT4 CT3 CT6 CT5 CT2
```

| Module | Role |
|---|---|
| `dtc_cpld` | top: wiring, synchronizers, arm mapping |
| `dtc_pkg` | clock rate, counter width, REGCONF layout, state encoding |
| `sync2` | two-flip-flop synchronizer for the asynchronous pins |
| `serial_port` | REGCONF shift register, configuration / normal mode |
| `dt_comp` | one per phase: the compensation counter |
| `dt_insert` | one per arm: dead-time insertion |
| `prot` | open-circuit protection from the feedbacks |
| `output_control` | selects what reaches `CT1..CT6` in each circuit state |

Arms: `T1`/`TFB1` drive `CT1` (upper) and `CT4` (lower); `T3`/`TFB3` drive
`CT3`/`CT6`; `T5`/`TFB5` drive `CT5`/`CT2`.

## The compensation counter (`dt_comp`)

This is the part worth understanding. Each phase has one signed counter and
three rules, evaluated every clock:

| `T` | `TFB` | counter |
|---|---|---|
| 1 | 0 | count down |
| 0 | 1 | count up |
| equal | equal | hold |

and the compensated command `C_P` takes the level of `T` at the moment the
count reaches zero: going down for a rising edge, going up for a falling one.

Follow one period. Say the counter holds a positive value `N1` when `T` rises.
It counts down, reaches zero `N1` cycles later, and `C_P` rises. The feedback
is still low (dead time, driver delays), so counting continues below zero until
`TFB` rises; the counter then holds `N2 < 0`, where `-N2` is the rising-edge lag
`Dr`. When `T` falls, the counter counts up from `N2`, reaches zero `Dr` cycles
later, and `C_P` falls. Counting continues until `TFB` falls, leaving
`N3 = Df`, the falling-edge lag, ready for the next rising edge.

So a rising edge of `C_P` is delayed by the previous falling lag `Df` and a
falling edge by the previous rising lag `Dr`:

```
TFB rises  = T rises + Df + Dr
TFB falls  = T falls + Dr + Df
```

Both edges of the real phase voltage lag the command by the same total
`Dr + Df`. The pulse width at the phase is therefore the commanded width,
whatever the current sign, dead time or driver asymmetry, and the error is
learnt again on every edge, so it follows changes in load current. The cost
is a constant delay of `Dr + Df`, which a current controller sees as a little
extra transport delay.

Details:

* The counter has `N = 10` magnitude bits plus a sign and saturates at
  ±1023 cycles, i.e. up to 25.6 µs of compensation in 25 ns steps. If a
  feedback never arrives the counter simply saturates; `prot` handles that case.
* `C_P` is *set to T's level* at the zero crossing rather than toggled. In
  normal operation that is the same; it also makes the first edge after reset
  (counter at zero) pass after one cycle and keeps `C_P` from getting out of
  step.
* With compensation disabled (`enable = 0`) the counter is cleared and `C_P`
  is `T` delayed by one clock. This is the case when REGCONF does not request
  compensation, in configuration mode, in PASS, and while the protection holds
  the outputs off (otherwise the counter would saturate against a missing
  feedback).
* The counter is ±1 cycle approximate: a lag of 0 and of 1 cycle give the same
  one-cycle delay. The testbenches accept one cycle per edge, two per pulse.

## Dead-time insertion (`dt_insert`)

One counter per arm runs up towards `INSE` while `C_P` is high and back down
towards zero while it is low. The upper switch turns off as soon as `C_P` goes
low and turns on only once the counter has reached `INSE`; the lower switch
turns off as soon as `C_P` goes high and turns on only at zero. Each switch
therefore turns on exactly `INSE` cycles after its partner turned off. A `C_P`
pulse shorter than `INSE` turns no switch on, and because the count on the way
down starts from where the way up stopped, short pulses are handled
symmetrically. An assertion checks that the two outputs of an arm are never
high together.

## Configuration (`serial_port`) and the REGCONF layout

After reset the circuit is in configuration mode and all gate outputs are 0.
The controller shifts REGCONF in on two pins:

* `CONF` is the data bit, `SHCONF` the shift clock. On each rising edge of
  `SHCONF`, `CONF` enters the MSB and the register shifts towards the LSB, so
  the bit sent first ends in bit 0 after eight shifts.
* `SHCONF` must stay high and low at least 100 ns each (4 clocks); `CONF` must
  be stable from the rising to the falling edge of `SHCONF`.
* A falling edge on `BCV` ends configuration mode. REGCONF is then locked
  until the next reset. `BCV` held low since reset does not count as a falling
  edge.

REGCONF layout (this implementation's choice, in `dtc_pkg`):

| Bits | Field | Meaning |
|---|---|---|
| 7 | `comp_en` | 1 = dead-time compensation on |
| 6:0 | `INSE` | dead time in clock cycles (0 to 127, up to 3.175 µs) |

Reset value `8'h28`: compensation off, `INSE = 40` (1 µs), so an unconfigured
part still inserts a dead time.

## Circuit states (`output_control`)

| State | Condition | `CT1..CT6` |
|---|---|---|
| reset | `BRST = 0` | all 0 |
| configuration | from reset until `BCV` falls | all 0 |
| safe | `BSAFE = 0`, or a latched open-circuit fault | all 0 |
| PASS | `PASS = 1` | `T1..T6` repeated, no compensation, no dead time |
| normal | otherwise | compensated, dead-time-inserted commands |

Priority is top to bottom, so the protection stays active in PASS. In PASS
the six controller inputs go straight to the six outputs; the controller alone
is then responsible for keeping the two switches of an arm apart. The state is
brought out on `STATE` (encoding `circuit_state_e` in `dtc_pkg`) for
observation.

One point of interpretation: the original state table lists all outputs at 0
for PASS, while its description of the simulated behaviour has PASS inhibiting
the compensation with the outputs repeating the inputs. This RTL does the
latter, which is also the only use of the `T2`, `T4`, `T6` inputs. If your
application wants PASS to mean "outputs off", change the `ST_PASS` branch in
`output_control`.

## Protection (`prot`, `BSAFE`)

* `BSAFE = 0` forces the safe state for as long as it is low (not latched).
  It is the input for over-current and over-voltage detection, which has to be
  done outside the CPLD; the pin goes straight to `output_control`.
* Open circuit (`prot`): while the outputs are driven, a phase whose
  feedback disagrees with its command `C_P` for 1023 consecutive cycles (the compensation range)
  is declared open. The fault is latched and holds the safe state until reset.

How over-current and over-voltage are sensed is not part of this design.

## Timing

All logic runs on one 40 MHz clock; `BRST` is an asynchronous active-low reset.
Latencies from a pin change to `CT`:

| Path | Cycles |
|---|---|
| `Tx` → `CTx`, compensation off, `INSE = 0` | 5 (2 sync + `dt_comp` + `dt_insert` + output register) |
| `Tx` → `CTx`, PASS | 3 |
| `BSAFE` low → all outputs 0 | 3 |
| `BCV` falling → normal state | 4 |
| switch off → partner on (normal mode) | `INSE` |

The synchronizers delay `T` and `TFB` alike, so they do not bias the measured
lags.

## Departures and own choices

Taken from the original description: the block partition and pin names, the
compensation counting rule and its 10-bit, 40 MHz sizing, the dead-time
insertion algorithm, the serial shift protocol and its 100 ns timing, the
state table (with the PASS reading above), and protection staying active in
PASS.

Choices of this RTL: the two-flop input synchronizers, the REGCONF width,
layout and reset value, saturation of the compensation counter, "set to T"
instead of "toggle" at the zero crossing, registered outputs, the open-circuit
detector and its timeout, the non-latched BSAFE, and the `STATE` output. Two
outputs of the original pin map, `OPTOH` and `OPTOB`, are not described
anywhere and are not implemented. The 24 mA output drive is a property of the
CPLD pads, not of the logic.

## Simulation

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|---|---|
| `tb_dt_comp` | plant with 37/13-cycle and 1014/512-cycle rising/falling feedback lags: TFB width = T width ±1, learnt N2/N3, bypass, saturation |
| `tb_dt_insert` | INSE = 0, 1, 5, 40, 127: exclusivity, exact turn-on delay, short pulses |
| `tb_serial_port` | reset value, serial loading, BCV exit, locking |
| `tb_prot` | open-circuit timing per phase against a reference model |
| `tb_output_control` | random state combinations against the state table |
| `tb_dtc_cpld` | whole chip at default sizes, see below |

`tb_dtc_cpld` models a three-phase bridge (each feedback follows the upper
switch for positive current and the inverted lower switch for negative current,
with different driver delays) and runs: configuration with compensation off
(pulses come out `INSE + 1` cycles too short or too long, depending on the
current sign), reset and configuration with compensation on (pulses within two
cycles of the command), PASS, BSAFE and an open feedback. It counts every
mechanism and fails if one never happened.

With plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_dtc_cpld rtl/dtc_pkg.sv tb/tb_dtc_cpld.sv
./obj_dir/Vtb_dtc_cpld
```

Replace `tb_dtc_cpld` with any other testbench name. `-Wno-fatal` keeps
lint warnings (unused package constants, testbench width extensions) from
stopping the build; the RTL has no latch, loop or multiple-driver warnings. The full-chip run
simulates about 2 ms of chip time in well under a second.

## Changing sizes

* Counter range: `CNT_BITS` in `dtc_pkg` (range = `2^CNT_BITS - 1` cycles).
* REGCONF and the INSE width: `REGCONF_W` and `REGCONF_RST` in `dtc_pkg`; the
  INSE field is always `REGCONF_W - 1` bits wide.
* Open-circuit timeout: `TIMEOUT` of `prot`.
* Clock: nothing depends on the rate except the meaning of a cycle; at another
  frequency, rescale INSE, the timeout, and the 4-cycle minimum SHCONF pulse.
