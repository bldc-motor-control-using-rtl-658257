# Hall-sensor BLDC motor controller for a small CPLD

This is a speed and direction controller for a three-phase brushless DC motor.
It is small enough to fit a 240-cell CPLD. A single potentiometer is the only
operator input. Its centre position stops the motor. Turning it away from the
centre makes the motor run faster, clockwise on one side and counterclockwise
on the other. The three hall sensors built into the motor give the rotor
position. From that position the logic picks which two of the six inverter
MOSFETs conduct ("six-step" or two-phase commutation). Speed is set by chopping
the high-side MOSFET with a PWM of about 20 kHz.

```
 potentiometer -> MCP3008 ADC --SPI--> spi_adc --adc[9:0]--+--> direction_select --dir, stop--+
                                                           |                                  v
                                                           +--adc[8:1]--> pwm_gen --pwm--> commutation --> gate register --> high_side[2:0]
                                                                                              ^                          low_side[2:0]
 motor hall sensors A,B,C ----------------------------> 2-flop synchroniser --hall[2:0]-------+                              |
                                                                                                                           v
                                                                                        MOSFET drivers -> 3-phase inverter -> motor
```

Everything runs on one 50 MHz clock (`clk`) with a synchronous, active-high
reset (`rst`).

## How the potentiometer becomes direction and duty

The 10-bit ADC reading `adc` carries direction and speed together:

| `adc`        | direction               | PWM output used     | high-side duty (of 256) |
|--------------|-------------------------|---------------------|-------------------------|
| 0 .. 510     | clockwise (`adc[9]=0`)  | `count >= adc[8:1]` | `256 - adc[8:1]`        |
| 511, 512     | stop: all six gates off | —                   | 0                       |
| 513 .. 1023  | counterclockwise        | `count <= adc[8:1]` | `adc[8:1] + 1`          |

`adc[8:1]` is the reading within its half of the range. Clockwise uses the
"counter ≥ reference" comparison, so a small reading gives a high duty.
Counterclockwise uses "counter ≤ reference", so a large reading gives a high
duty. The result is a duty that grows from 1/256 next to the centre to 256/256
(always on) at either end. The two codes at mid-scale form the stop band.
`stop_flag` is registered, so a new reading takes one clock to reach it. The
direction is `adc[9]`, used directly.

## Six-step commutation (`commutation`)

Bit 0 of `hall` is sensor A, bit 1 is B and bit 2 is C. The gate vectors
`high_side` and `low_side` use the same order: bit 0 is phase A (MOSFETs
M1/M2), bit 1 is phase B (M3/M4) and bit 2 is phase C (M5/M6). In each 60°
electrical step one phase goes to + through its high-side MOSFET and one phase
goes to − through its low-side MOSFET. The third phase floats.

| hall A B C | clockwise +/− | counterclockwise +/− |
|------------|---------------|----------------------|
| 0 0 1      | C / B         | B / C                |
| 0 1 1      | C / A         | A / C                |
| 0 1 0      | B / A         | A / B                |
| 1 1 0      | B / C         | C / B                |
| 1 0 0      | A / C         | C / A                |
| 1 0 1      | A / B         | B / A                |

Counterclockwise is clockwise with + and − swapped, and the module builds it
that way. Only the high-side gate is chopped by the PWM. The low-side gate
stays on for the whole step, so it changes only when the hall code changes.
Hall codes 000 and 111 never come from a working sensor set. For those codes,
and while `stop` is set, all gates are off. An assertion checks that no leg
ever has both of its gates on.

## Reading the ADC (`spi_adc`)

The MCP3008 is read continuously on channel 0, single-ended (`CTRL = 4'b1000`).
SCLK runs freely at 100 kHz: it toggles every `SCLK_DIV_N = 250` clocks. Every
SCLK period starts with a falling edge. This master changes CS and MOSI on the
falling edge and samples MISO on the rising edge, in the middle of the bit the
ADC shifted out on the previous falling edge.

| SCLK period | CS   | MOSI                 | MISO              |
|-------------|------|----------------------|-------------------|
| 0           | high | 0                    | —                 |
| 1           | low  | start bit (1)        | —                 |
| 2 .. 5      | low  | SGL/DIFF, D2, D1, D0 | —                 |
| 6           | low  | 0                    | (ADC sampling)    |
| 7           | low  | 0                    | null bit          |
| 8 .. 17     | low  | 0                    | B9 .. B0          |

On the rising edge of period 17, `data_out` takes the new value and `done`
pulses for one clock. A frame takes 18 × 10 µs = 180 µs. The reading therefore
follows the potentiometer with at most about 0.4 ms of delay.

## PWM (`pwm_gen`)

An 8-bit counter steps once every `2 × PWM_DIV_N = 10` clocks and wraps from
255 to 0. One PWM period is 2560 clocks, which is 19.53 kHz at 50 MHz. The
module has two comparator outputs, `pwm.le` (count ≤ reference) and `pwm.ge`
(count ≥ reference). The reference is used as it arrives. A new ADC value in
the middle of a period takes effect at once, so the period in which it arrives
can have one pulse of odd length.

`clk_div` provides the timing for both the SPI clock and the PWM step. It is a
counter that toggles a square wave every N clocks. It also gives a one-cycle
strobe in the clock before each rising edge and before each falling edge of
that wave. All other registers use these strobes as enables. No logic is
clocked by a divided clock.

## Timing

- A hall change reaches the gate outputs on the 3rd clock (60 ns): two
  synchroniser flops, then the output register.
- A new ADC value changes the PWM comparison and the gates 1 clock after
  `done`. It changes the stop decision 2 clocks after `done`.
- The gate outputs are registered, so glitches from the decoding logic never
  reach the MOSFET drivers.

## Parameters

| module        | parameter    | default   | meaning                                     |
|---------------|--------------|-----------|---------------------------------------------|
| `control_top` | `SCLK_DIV_N` | 250       | system clocks per SPI clock half period     |
| `control_top` | `PWM_DIV_N`  | 5         | system clocks per PWM step = 2 × this       |
| `control_top` | `ADC_CTRL`   | `4'b1000` | SGL/DIFF and channel bits sent to the ADC   |
| `direction_select` | `STOP_LO`, `STOP_HI` | 511, 512 | stop band, both ends included |
| `pwm_gen`     | `CNT_W`      | 8         | PWM counter width                           |

Types shared between modules (`hall_t`, `gates_t`, `dir_e`, `pwm_pair_t`) are
defined in `rtl/bldc_pkg.sv`.

## Where this RTL departs from the original controller

The block structure, the widths, the tables, the 100 kHz SPI clock, the
20 kHz PWM and the stop band all follow the original CPLD design. These parts
are different:

- **Reset pin.** `rst` was added, so the top has 15 pins rather than 14. Out of
  reset the stop flag is set, so no gate is driven before the first reading.
- **Hall synchroniser and registered gates.** The original drives the gates
  combinationally from the unsynchronised hall pins. This version adds three
  clocks of latency, which is negligible next to a 60° step of hundreds of
  microseconds.
- **One clock domain.** The original clocks its SPI state machine and PWM
  counter with divided clocks. Here they run on the system clock with enables.
  The timing at the pins is the same.
- **SPI frame.** The original samples MISO on the same falling edge at which
  the ADC shifts out the next bit, which relies on hold time. It keeps CS low
  for 18 SCLK periods. This version samples on the rising edge and keeps CS low
  for 17 periods.
- **Stop band at 513.** One description of the control flow treats readings
  below 511 as clockwise and above 513 as counterclockwise. That would also
  stop the motor at 513. The decoding used here stops only at 511 and 512, and
  513 runs counterclockwise at the minimum duty. Change `STOP_HI` to 513 for
  the wider band.

The resource figure of the original (133 of 240 MAX II logic elements) has not
been reproduced. Generic synthesis gives 64 flip-flop bits and about 115
word-level cells, which cannot be converted to vendor logic elements.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` at the end and has a watchdog.

| testbench             | what it checks |
|-----------------------|----------------|
| `clk_div_tb`          | toggle period and strobe position, for N = 3 and N = 250 |
| `spi_adc_tb`          | 40 frames against the ADC model: result value, command bits, 500-clock SCLK, 9000-clock frame, one SCLK period of CS high, idle while disabled |
| `pwm_gen_tb`          | clocks high per period of both outputs for 10 references, 2560-clock period, step every 10 clocks |
| `direction_select_tb` | all 1024 codes: direction and stop flag |
| `commutation_tb`      | every hall × direction × stop × PWM combination against the tables |
| `control_top_tb`      | whole controller at default parameters: ten readings covering both directions, both ends of the range and the stop band, each with the six hall steps plus the invalid codes; checks gate duty over a full PWM period, steady low side, 3-clock latency, no shoot-through; counts conversions, CW and CCW steps, reversals, stops, invalid codes and full duty, and fails if any did not happen |
| `pot_sweep_tb`        | whole controller at default parameters: readings 210 + 45·k (k = 1..24, wrapping) and then 920, six hall steps each, checked as above |

`tb/mcp3008_model.sv` is a behavioural model of the ADC's SPI side. It takes
the start bit, records the command bits, samples its `value` input and shifts
out the null bit and B9..B0 on falling SCLK edges. It does not model analog
behaviour or the high-impedance state of DOUT. The motor is not modelled: the
testbenches drive the hall code directly.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb rtl/bldc_pkg.sv tb/control_top_tb.sv --top-module control_top_tb
./obj_dir/Vcontrol_top_tb
```

Use the same command for any other testbench, with its name in both places.
Every testbench finishes in a few seconds.

## Outside the RTL

The ADC chip, the potentiometer, the opto-isolated MOSFET gate drivers, the
six-MOSFET inverter (36 V) and the motor with its hall sensors are analog or
bought-in parts and are not described here. The hall sensors connect to the
logic through pull-up resistors. The logic runs at 3.3 V, so the gate signals
need a driver stage before the MOSFETs.
