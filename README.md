# Ultrasonic collision avoidance controller

A small vehicle with two DC motors carries an HC-SR04 ultrasonic range
sensor at its front. This controller keeps pinging the sensor. It turns each
echo into the distance to the nearest obstacle in centimetres and shows that
distance on two 7-segment digits. It also slows the motors as the obstacle
gets closer, and stops them before the vehicle reaches it. All of it is
plain synchronous logic, small enough for a 240-macrocell-class CPLD as well
as an FPGA. The same RTL targets both.

```
 HC-SR04                         distance_safety
 ┌──────┐ Trigger_pin  ┌───────────────────┐ dist_cm ┌─────────────────┐   ┌──────────────┐
 │      │◄─────────────┤ ultrasonic_ranger ├───┬────►│ range_to_digits ├──►│ seg7_decoder │──► topsegA..G   (units)
 │      ├─────────────►│                   │   │     └─────────────────┘   │ seg7_decoder │──► topsegA1..G1 (tens)
 └──────┘ pulse_pin    └───────────────────┘   │                           └──────────────┘
                                               │     ┌───────────────┐ duty ┌───────────┐
                                    sw ──sync──┼────►│ speed_control ├─────►│ motor_pwm │──► pwm1,pwm2 (motor 1)
                                               └────►│               │      │           │──► pwm3,pwm4 (motor 2)
                                                     └───────────────┘      └───────────┘  to an L298N H-bridge
```

The top module `distance_safety` has exactly 22 pins: the clock, the
sensor's trigger and echo, a switch, 14 segment lines and 4 motor lines.
There is no reset pin (see *Start-up*).

## Measuring the range (`ultrasonic_ranger`)

A measurement cycle lasts `CYCLE_MS` (60 ms). Each cycle runs these steps:

1. `Trigger_pin` goes high for 10 µs. The sensor then sends its ultrasonic
   burst.
2. The ranger waits for a **rising edge** on `pulse_pin`, the sensor's echo
   output. The echo is asynchronous, so it first passes a two-flop
   synchroniser. The same delay is added to both edges, so the measured
   width is unchanged.
3. While the echo stays high, a prescaler counts clock cycles. Each time it
   reaches `CLKS_PER_CM = 58 × CLK_HZ/1e6` clocks (2900 at 50 MHz), the
   centimetre counter steps by one. Sound covers one centimetre of range,
   there and back, in 58 µs. The result is therefore `floor(echo_µs / 58)`,
   found without a divider. The counter saturates at 400 cm.
4. On the falling edge the range is latched into `dist_cm_o`, and `valid_o`
   pulses for one clock.

If the cycle runs out before the echo ends, the ranger reports 400 cm and
sets `timeout_o`. That happens with no echo at all, or with an echo longer
than the cycle. Downstream logic treats the 400 cm result as "nothing in
range". Only a rising edge can start a measurement. So if an over-long echo
is still high when the next cycle starts, that cycle also times out, instead
of timing a fragment.

## Showing the range (`range_to_digits`, `seg7_decoder`)

The range is split into tens and units by constant division by ten. Anything
above 99 cm shows as `99`.

Both digits are **common anode**: a segment lights when its line is `0`. The
segment bus is ordered bit 0 = A … bit 6 = G. The `topsegA1..G1` lines drive
the left (tens) digit and `topsegA..G` the right (units) digit. A lit `0`
reads `40h` (only G dark) and a lit `9` reads `10h` (only E dark). An
obstacle at 9 cm therefore puts `10h` on the units lines and `40h` on the
tens lines. In this design's digit shapes, 9 has its bottom bar and 6 its
top bar. Codes 10 to 15 blank a digit.

## Choosing the speed (`speed_control`)

The range falls into one of four bands. Each band sets a duty cycle:

| range               | band   | duty  |
|---------------------|--------|-------|
| < `STOP_CM` (10)    | stop   | 0 %   |
| < `SLOW_CM` (20)    | slow   | 40 %  |
| < `MEDIUM_CM` (40)  | medium | 70 %  |
| ≥ 40 cm             | fast   | 100 % |

The band edges and duties are parameters. The only fixed points are that
speed falls as the range falls, and that the stop range covers 9 cm. The
`sw` input is a run switch: with `sw = 0` the duty is 0 whatever the range.
`sw` is synchronised with two flip-flops before use.

## Driving the motors (`motor_pwm`)

A prescaler divides the clock so that a step counter runs through 100 steps
per PWM period. The default is 1 kHz, which gives 500 clocks per step at
50 MHz. The output is high while the step is below the duty in percent. The
duty is sampled at the first clock of each period, so a change never
shortens a pulse. A new range therefore reaches the motors at the next
period boundary, at most 1 ms later.

Each motor has two L298N inputs: pwm1/pwm2 for motor 1 and pwm3/pwm4 for
motor 2. Both motors get the same waveform. The first input carries the PWM
and the second is held low, which drives forward and coasts at duty 0. The
second inputs are therefore constant here. They are kept as pins so that a
reverse or brake mode can be added without rewiring.

## Start-up

The top has no reset pin. A 4-bit power-on counter starts at zero on
configuration, from a register initial value, which both FPGA and CPLD
targets honour. It holds every block in synchronous reset for 15 clocks.
After reset the range reads 0. The display therefore shows `00` and the
motors stay stopped until the first measurement completes, about 60 ms
later. Verilator reports `PROCASSINIT` on this counter. That is expected:
the initial value *is* the power-on state.

## Timing summary (defaults, 50 MHz)

| event                                   | time                         |
|-----------------------------------------|------------------------------|
| trigger pulse                           | 10 µs (500 clocks)           |
| measurement period                      | 60 ms (3,000,000 clocks)     |
| echo end → `dist_cm_o`, display, duty   | 3 clocks                     |
| duty → motor outputs                    | next PWM period start (≤1 ms)|
| PWM period                              | 1 ms (50,000 clocks)         |

## Parameters of `distance_safety`

| parameter     | default      | meaning                                |
|---------------|--------------|----------------------------------------|
| `CLK_HZ`      | 50,000,000   | clock rate; must be a multiple of 1 MHz and of `PWM_HZ × 100` |
| `CYCLE_MS`    | 60           | measurement period                     |
| `PWM_HZ`      | 1000         | motor PWM frequency                    |
| `STOP_CM`, `SLOW_CM`, `MEDIUM_CM` | 10, 20, 40 | band edges in cm   |
| `SLOW_DUTY`, `MEDIUM_DUTY`, `FAST_DUTY` | 40, 70, 100 | duties in %  |

The sensor constants (10 µs trigger, 58 µs/cm, 400 cm limit) are parameters
of `ultrasonic_ranger`. Shared types (`dist_cm_t`, `seg7_t`, `duty_pct_t`,
`speed_zone_t`) are in `distance_safety_pkg`.

## What is the original design and what is filled in

The system is taken from an existing build: the 22-pin interface and its
pin names, the block structure, the common-anode displays showing the range
in cm, and motor speed that falls with distance and stops in a stop range.
The tens/units order and the `10h`/`40h` codes for "09" come from a logic
analyser capture of the running system. In that capture the obstacle was at
9 cm and both pwm lines of motor 1 were low.

This implementation chose the following; none of them is documented for the
original:

- the 50 MHz clock;
- the HC-SR04 timing: 10 µs trigger, 58 µs/cm, 60 ms cycle, 400 cm limit;
- the conversion method, the timeout rule and the edge-only echo start;
- the clamp to 99;
- the number of speed bands, their edges and duties;
- the use of `sw` as a run switch (the original only lists it as an input);
- the 1 kHz PWM with 1 % steps;
- the forward/coast pattern on the H-bridge inputs;
- the power-on reset.

Change the parameters to match a particular vehicle.

Size: a generic 4-input-LUT synthesis gives about 234 LUTs and 86
flip-flops. The original build reported 218 logic elements and 74 registers
on the CPLD. Whether this RTL packs into a 240-LE CPLD depends on the
vendor fitter. The FPGA has ample room.

## Verification

Every block has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`.

- `tb_ultrasonic_ranger` checks exact cm boundaries (57/58 µs,
  1449/1450 µs) and random echo widths. It also covers saturation, a
  missing echo, an echo that outlasts the cycle and the leftover tail in the
  next cycle. It checks the trigger width and the 10 ms period it uses.
- `tb_range_to_digits` and `tb_speed_control` sweep all 512 ranges.
  `tb_speed_control` does so with the switch on and off, and with two band
  settings.
- `tb_seg7_decoder` checks all 16 codes against a segment-letter table.
- `tb_motor_pwm` counts high clocks over whole periods for duties 0, 1, 40,
  50, 70, 99, 100 and 127. It also checks the period length, the idle
  second inputs and that a mid-period change waits.
- `tb_distance_safety` runs the whole controller at a 1 MHz clock and a
  10 ms cycle. It drives an HC-SR04 model (`tb/hcsr04_model.sv`) through an
  approach from 150 cm down to 0 cm, the 9 cm capture case, a missing echo,
  the switch off, and random ranges. It checks the digits on the segment
  pins and the duty on the pwm pins. It also counts every mechanism (each
  band, clamp, timeout, switch off, speed up, slow down) and fails if one
  never happened.
- `tb_distance_safety_full` runs the top at its defaults (50 MHz, 60 ms) for
  a 30 cm and a 9 cm obstacle. It takes about 7 million clock cycles.

Two concurrent assertions run in every simulation built with `--assert`. One
checks that the trigger is only raised in the trigger state. The other
checks that a zero duty never produces a motor pulse.

Not verified: behaviour on real hardware, the fit in a 240-LE CPLD, and
sensors whose timing differs from the HC-SR04 figures above.

## Simulating

Each testbench builds with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/distance_safety_pkg.sv tb/tb_distance_safety.sv --top-module tb_distance_safety
./obj_dir/Vtb_distance_safety
```

Substitute any other `tb_*` name. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/distance_safety_pkg.sv rtl/<module>.sv`.
