# Ultrasonic distance meter for an FPGA board

An HC-SR04 ultrasonic sensor measures distance by timing an echo. You send it
a trigger pulse. It sends a short burst of 40 kHz sound and raises its echo
output until the reflection comes back. The echo pulse width is therefore
proportional to the distance: about 58 µs per centimetre, there and back.

This RTL drives the sensor and times the echo in centimetres. It shows the
result on four 7-segment digits. It also sounds a buzzer whose beeping gets
faster as an obstacle comes closer. The target is a Nexys4-class board:
- 100 MHz clock;
- pushbuttons and a switch;
- a scanned, common-anode 7-segment display.

The structure follows the distance-meter design in the article *Distance
measurement as a practical example of FPGA design* (a set of four
teaching-lab sessions). That description gives the block structure, the ports
and the main requirements, but not the insides of most blocks. Every detail
it leaves open was decided here, and is marked as such below and in the
opening comment of each file.

```
              +-----------+   start   +------------------+  distance  +---------+   +---------------+
 mode ------->| start_mux |---------->| control_maxsonar |----------->| bin2bcd |-->| seg7_display4 |--> an[3:0], seg[6:0]
 mide ------->|           |           |  (cm_tick_gen)   |     |      +---------+   +---------------+
              +-----------+   echo -->|                  |--> trigger, data_valid
                                      +------------------+     |      +-----------+
                                                               +----->| alarm_gen |--> alarm (0 = buzzer on)
                                                                      +-----------+
 hc_sr04_emulator: on-chip sensor model; its echo replaces the echo pin when emulate = 1
```

`maxsonar_system` is the top level. The shared constants and the two state
enums are in `maxsonar_pkg`.

## How one measurement is timed

The measurement is handled by `control_maxsonar`, a four-state machine:

| state         | what happens                                           | leaves when                       |
|---------------|--------------------------------------------------------|-----------------------------------|
| `S_IDLE`      | last result held on `distance`; `data_valid` high if it is a result | `start` is high (then `data_valid` drops) |
| `S_TRIGGER`   | `trigger` = 1                                          | after `TRIG_LEN` = 1200 cycles (12 µs) |
| `S_WAIT_ECHO` | waits for the sensor                                   | synchronised echo is high         |
| `S_MEASURE`   | counts centimetre ticks                                | synchronised echo is low          |

The sensor needs a trigger of more than 10 µs; 12 µs leaves a margin.

Centimetres are counted by `cm_tick_gen`, a divide-by-5800 counter: 5800
cycles is 58 µs at 100 MHz. It gives a one-cycle enable pulse, not a derived
clock, so the whole design runs on the one board clock. The divider is held
cleared outside `S_MEASURE`, so its first tick falls exactly one centimetre
period after the echo was seen high. This makes the result exact to the
clock cycle:

    distance = floor(echo_high_cycles / 5800)

The result saturates at 511 (9 bits) instead of wrapping. The sensor's range
ends at 4 m, which is why 9 bits suffice.

The echo pin passes a two-flop synchroniser. Both of its edges are delayed by
the same amount, so the measured width is not changed.

`distance` is updated only when the echo ends. The display therefore always
shows a complete measurement, never a count in progress.

A measurement at the default timings takes:
- 12 µs of trigger;
- about 200 µs of burst in the sensor;
- 58 µs per centimetre of echo.

This is 1.2 ms at 16 cm and 23.4 ms at 4 m.

Not handled: a missing sensor. If no echo ever comes, the controller waits in
`S_WAIT_ECHO` until reset.

## Continuous and single-shot modes

`start_mux` turns the user inputs into the controller's `start`:

- **`mode = 1`, continuous:** `start` is held high. As soon as a measurement
  ends, the controller starts the next one.
- **`mode = 0`, unitary:** each press of the `mide` button gives exactly one
  measurement.
  - `mide` is synchronised, and only its rising edge makes a start pulse, so
    holding the button down does not repeat the measurement.
  - There is no debouncer. Contact bounce while a measurement runs is ignored,
    because the controller only accepts `start` in `S_IDLE`.

`data_valid` is high from the end of a measurement until the next one is
accepted. In unitary mode it stays on until the next press. In continuous mode
it is a short pulse after each measurement, while the display simply follows
the newest result.

## From binary to the display

`bin2bcd` converts the 9-bit distance to four BCD digits. It uses the
shift-and-add-3 ("double dabble") method, fully unrolled, so it is purely
combinational.

`seg7_display4` drives the board's multiplexed display:
- Each digit is lit for `REFRESH_CYCLES` = 100 000 cycles (1 ms), in turn, so
  the whole display refreshes at 250 Hz.
- `an[k]` selects digit k and `seg` carries segments `{g,f,e,d,c,b,a}`. Both
  are active low, as on the board.
- Leading zeros are shown, so 16 cm reads `0016`.
- The per-digit decoder is `bcd_to_seg7`. It blanks codes 10 to 15.

The board has eight digits. Only four are driven here; tie the anodes of the
other four high in the pin constraints.

## The proximity alarm

`alarm_gen` keeps the last valid distance and selects a beep pattern from it.
The buzzer is on while `alarm` is 0.

| distance d        | pattern                       | source of the numbers |
|-------------------|-------------------------------|-----------------------|
| no result yet, or d > 100 cm | silent             | this design |
| 75 < d ≤ 100 cm   | 100 ms on, 900 ms off         | zone from the original; lengths chosen here |
| 50 < d ≤ 75 cm    | 200 ms on, 500 ms off         | zone from the original; lengths chosen here |
| 10 ≤ d ≤ 50 cm    | 200 ms on, 200 ms off         | zone 25–50 cm from the original, extended down to 10 cm here |
| d < 10 cm         | continuous                    | original |

The original asks only for these qualities, in this order:
- short, widely spaced beeps from 100 to 75 cm;
- longer and closer beeps from 75 to 50 cm;
- closer still from 50 to 25 cm;
- a continuous tone below 10 cm.

It gives no lengths, and says nothing about 10–25 cm.

All thresholds and lengths are parameters. The millisecond comes from a
prescaler of `TICKS_PER_MS` cycles. When the zone changes, the pattern
restarts with a beep, so moving closer is heard at once. A new reading in the
same zone does not disturb the pattern.

## Sensor model and the `emulate` input

`hc_sr04_emulator` models the sensor's logic-level behaviour:
- A trigger of at least 10 µs (`TRIG_MIN`) is accepted when it falls.
  Shorter triggers, and triggers during a measurement, are ignored.
- It then emits eight 40 kHz pulses on `tx_burst` (200 µs).
- Its echo then stays high for exactly `d × 5800` cycles. `d` is the
  `distance_cm` input, clamped to the sensor range of 2 to 400 cm.

The model is synthesizable. In simulation, drive `distance_cm` with random
values to get randomly timed echoes.

In the original design the model is only used to test the controller, and is
removed once the real sensor is connected. Here it stays in
`maxsonar_system`:
- With `emulate = 1`, the controller's echo comes from the model, and
  `emu_distance` sets the distance. This allows a self-test on the board with
  no sensor attached.
- The trigger pin still pulses in both cases.
- For normal use, tie `emulate` to 0.

## Top-level ports and parameters

| port | dir | width | meaning |
|------|-----|-------|---------|
| `ck` | in | 1 | 100 MHz clock |
| `reset` | in | 1 | asynchronous, active high |
| `mode` | in | 1 | 1 continuous, 0 unitary (switch) |
| `mide` | in | 1 | measure button (unitary mode) |
| `echo` | in | 1 | sensor echo |
| `trigger` | out | 1 | sensor trigger |
| `data_valid` | out | 1 | a completed measurement is shown |
| `alarm` | out | 1 | buzzer, 0 = sounding |
| `an` | out | 4 | digit anodes, active low |
| `seg` | out | 7 | segments `{g..a}`, active low |
| `emulate` | in | 1 | 1 = use the on-chip sensor model |
| `emu_distance` | in | 9 | distance for the model, cm |

| parameter | default | meaning |
|-----------|---------|---------|
| `CM_CYCLES` | 5800 | clock cycles per centimetre (58 µs, from the sensor data sheet) |
| `TRIG_LEN` | 1200 | trigger length in cycles (12 µs) |
| `TRIG_MIN` | 1000 | shortest trigger the model accepts (10 µs) |
| `REFRESH_CYCLES` | 100 000 | cycles per lit digit |
| `TICKS_PER_MS` | 100 000 | cycles per millisecond for the alarm |
| `HALF_CYCLES` | 1250 | half period of the model's 40 kHz burst |

For a different clock frequency, scale all six parameters together.

The echo and `mide` inputs are synchronised inside the design; `mode` is too.
`reset` is used asynchronously. Release it synchronously on the board if your
flow requires that.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself on a watchdog. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/maxsonar_pkg.sv \
          tb/tb_maxsonar_system.sv --top-module tb_maxsonar_system -Mdir obj
./obj/Vtb_maxsonar_system
```

Simulate with `--assert`. It enables the concurrent assertions in
`control_maxsonar` and `hc_sr04_emulator`:
- `data_valid` only in `S_IDLE`;
- full trigger length;
- echo never overlapping the burst.

| testbench | what it checks |
|-----------|----------------|
| `tb_cm_tick_gen` | tick spacing after random clears; first ticks of a default 5800 divider |
| `tb_control_maxsonar` | trigger width, floor rounding at exact multiples, saturation, ignored start while busy, back-to-back measurements |
| `tb_start_mux` | one pulse per press, continuous level, mode changes |
| `tb_bin2bcd` | all 512 inputs |
| `tb_seg7_display4` | one anode at a time, segment patterns, scan order and dwell time |
| `tb_alarm_gen` | beep duty of every zone on both sides of each limit; silence before the first result |
| `tb_hc_sr04_emulator` | short triggers rejected, 8 burst pulses, echo delay, echo width with clamping |
| `tb_meter_sweep` | controller and sensor model together, every setting 0..511 cm in random order, reading = setting clamped to 2..400 |
| `tb_maxsonar_system` | the whole meter at shortened timings, read back from the scanned display (see below) |
| `tb_maxsonar_full` | the whole meter with every parameter at its default (see below) |

`tb_maxsonar_system` exercises, and counts:
- single-shot measurements through the model, and with an echo driven by the
  testbench;
- continuous mode, mode changes, and a held button;
- clamped distances;
- all five alarm zones.

`tb_maxsonar_full` runs at real timings. It takes readings of 16 cm and 27 cm
and checks:
- the 12 µs trigger;
- the delay from trigger to result;
- the digits `0016` and `0027` on the scanned display;
- the 200 ms first beep.

It simulates about 0.25 s of real time in roughly ten seconds.

## Limits

Nothing here has been run on hardware. The behaviour is verified only in
simulation, against the expectations written into the testbenches.

The following were decided here, not taken from the original:
- the 58 µs/cm factor;
- the beep lengths;
- the 10–25 cm alarm band;
- the mode encoding;
- reset polarity;
- the `emulate` input.

Not provided as a separate top level: an intermediate bring-up build of the
original, in which the controller's binary distance drives board LEDs.
`control_maxsonar` can be used on its own for that.

The original divides the clock for the centimetre count with a vendor
clocking block. A plain counter and clock enable do the same here.
