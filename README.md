# Home automation system controller

A small synchronous controller that sits between a house's sensors and its
actuators. Every clock it reads a motion (PIR) sensor, a temperature sensor,
a light sensor, a smoke sensor, a password keypad and a water-level sensor.
From these it decides what the heater, fan, air conditioner, lamp, alarms,
door lock, indicator lights, water pump and buzzer should do. It is meant as
a compact standard-cell block clocked at 142.86 MHz (7 ns period). There is
no processor and no firmware: each subsystem is a few comparators and
flip-flops. The door lock is a four-state machine.

## Subsystems and their rules

| Subsystem | Module | Inputs | Rule | Outputs |
|---|---|---|---|---|
| HVAC | `hvac_ctrl` | `pir`, signed 8-bit `temperature` (deg C) | T < 16: heater. 16–21: fan speed 1. 22–26: fan speed 2. 27–31: fan speed 3. T >= 32: air conditioner. All off when `pir` = 0 | `heater`, `fan_speed`, `aircon` |
| Lighting | `lighting_ctrl` | `pir`, 16-bit `lux` | lamp on when `lux` <= 200 and `pir` = 1 | `lamp` |
| Fire alarm | `fire_alarm` | `smoke` | alarm on with smoke; stays latched until disarmed | `fire_alarm_on` |
| Door lock | `door_lock` | `pwd_valid`, 12-bit `pwd_in`, `lock_req` | see below | `door_unlocked`, `green_light`, `yellow_light`, `red_light`, `door_alarm`, `trial_count` |
| Water tank | `water_tank_ctrl` | 7-bit `water_level` (percent) | < 50 %: pump and buzzer. 50–89 %: pump only. >= 90 %: both off | `pump`, `buzzer` |

`home_automation_top` instantiates all five. They share the clock, the reset
and the single PIR input, which feeds both HVAC and lighting. There is one
more connection: when a password is accepted, the door lock's one-cycle
`pwd_ok` pulse also disarms a latched fire alarm.

Thresholds, widths and the enum types live in `rtl/ha_pkg.sv`. Each module
takes its thresholds as typed parameters, and their defaults come from the
package.

## The password door lock

This is the only block with real state. An attempt is a whole 12-bit word
(three hexadecimal digits) on `pwd_in`, marked by a one-cycle `pwd_valid`
strobe. It is compared with the parameter `SAVED_PWD` (default `12'hA5C`).

```
            correct                      lock_req
  IDLE ─────────────────────► OPEN ───────────────────► IDLE
   │  ▲                        ▲  (green, unlocked)
   │  │wrong, trials < 3       │ correct
   ▼  │                        │
  WRONG ── wrong, trials = 3 ─► ALARM (red, door_alarm)
  (yellow)                      wrong attempts ignored
```

- **Correct password** (from IDLE, WRONG or ALARM): the door unlocks, the
  green light comes on, the trial count goes back to 0 and `pwd_ok` pulses.
  From ALARM this is how the alarm is disarmed.
- **Wrong password** (from IDLE or WRONG): the trial count goes up by one and
  the yellow light comes on. It stays on until the next attempt.
- **Third wrong attempt** since the last correct one: the door alarm sounds
  and the red light comes on. Only the correct password ends this state.
- **Open door**: attempts are ignored. `lock_req` locks the door and turns
  all lights off.

At most one light is ever on. An assertion checks this, and another checks
that the trial count never passes the limit. The counter width is
`$clog2(TRIALS+1)`, so changing `TRIALS` resizes it.

## The fire alarm

The alarm rises one clock after `smoke` reads 1. It does not fall when the
smoke clears. It stays on until the `silence` input pulses with no smoke
present, and in the top that pulse is the door lock's `pwd_ok`. So an
occupant silences the fire alarm by typing the correct password after the
smoke is gone. If the door is open at that moment, `lock_req` must lock it
first, because attempts are ignored while the door is open. While smoke is
present the alarm cannot be silenced.

## Timing and reset

- All sensor inputs are sampled on the rising edge of `clk`. They must
  already be synchronous to it: the RTL has no synchronisers, so add two
  flip-flops per asynchronous sensor line if you need them.
- Every actuator output is registered and answers its inputs exactly one
  clock later. For the door lock, an attempt's result (lights, unlock,
  `trial_count`, `pwd_ok`) appears in the cycle after `pwd_valid`.
- `rst_n` is an active-low **synchronous** reset. It turns every actuator
  off, locks the door, clears the trial count and clears the fire alarm.

## Where this design makes its own choices

The specification gives each subsystem's rule. The following points are
decisions of this implementation:

- **Temperature** is signed two's complement, so sub-zero readings select
  the heater. At exactly **32 deg C** the air conditioner runs. The
  specification's bands ("< 32" for fan 3 and "> 32" for the air
  conditioner) leave that value uncovered.
- **HVAC with nobody present**: the PIR sensor is an HVAC input, but no rule
  for it is stated. Here everything is off while `pir` = 0.
- **Water level at exactly 90 %**: the stated bands overlap there. The pump
  stops, following the "level >= 90 %" rule. Readings above 100 count as
  full. There is no hysteresis, so the pump can toggle as the level crosses
  90 %.
- **Lux width** is 16 bits, the usual output of digital light sensors.
- **Password handling**: the saved password is a parameter, not a register
  that can be reprogrammed at run time. Entry is one 12-bit word with a
  strobe, not a digit-by-digit keypad protocol. Relocking needs `lock_req`.
  Wrong attempts during the alarm do not count.
- **Fire alarm** latching and disarming by password, described above.

The specification also covers a 32 nm standard-cell implementation
(floorplan, clock tree, routing, power and timing sign-off). That is the
result of synthesising this RTL, not part of it. Nothing here depends on a
cell library, and timing at 7 ns has not been analysed.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares outputs
with expected values computed in the testbench. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_hvac_ctrl`: every signed 8-bit temperature, with and without motion.
  It also checks the one-clock latency.
- `tb_lighting_ctrl`: lux values around 200, both extremes, and random ones.
- `tb_fire_alarm`: raise, latch, silence ignored during smoke, silence
  clears, then a random run against a one-line model.
- `tb_door_lock`: a scripted pass through every transition, then 2000
  random cycles against a reference model. `SAVED_PWD` is overridden here.
- `tb_water_tank_ctrl`: every 7-bit level, up and back down.
- `tb_home_automation_top`: the whole controller at default parameters. A
  directed scenario covers every row of the rule table, the lock/alarm/disarm
  cycle and the silencing of a fire alarm by password. 3000 random cycles
  follow. All outputs are compared every cycle with a reference model. The
  testbench also counts how often each mechanism happened (each HVAC band,
  lamp on and lamp held off by daylight, fire alarm raised and silenced,
  unlock, wrong attempt, door alarm, disarm, relock, each tank band). A
  mechanism that never happened counts as a failure.

Each testbench has been run against a copy of its module with one
deliberate bug, and each caught it. Examples: the fan 1 band extended to
22 deg C, the lamp limit made strict, the trial count not cleared by a
correct password, and the fire alarm not latching.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    --top-module tb_home_automation_top rtl/ha_pkg.sv tb/tb_home_automation_top.sv
./obj_dir/Vtb_home_automation_top
```

Replace `tb_home_automation_top` with any other testbench name to run that
block alone. The package must come first on the command line. Every run
finishes in well under a second.

## Files

- `rtl/ha_pkg.sv`: widths, thresholds, default password, `fan_speed_t` and
  `lock_state_t`
- `rtl/hvac_ctrl.sv`, `rtl/lighting_ctrl.sv`, `rtl/fire_alarm.sv`,
  `rtl/door_lock.sv`, `rtl/water_tank_ctrl.sv`: the five subsystems
- `rtl/home_automation_top.sv`: the top level
- `tb/tb_<module>.sv`: one testbench per module
