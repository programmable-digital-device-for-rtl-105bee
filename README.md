# Programmable digital conditioning for an integrated Hall sensor

A Hall plate gives a small voltage proportional to the magnetic field. Its
sensitivity drifts with temperature, and every application wants a different
output characteristic: a different slope, a different output at zero field, and
output limits. This design puts a small fixed-point signal processor on the same
die as the analog sensor. The processor digitises the Hall voltage, removes the
temperature drift, applies a user-programmed slope and offset, clamps the result
and drives a D/A converter. All settings live in registers. You can try them in
RAM and then store them in an on-chip EEPROM. A one-pin serial interface reaches
the registers, so a sensor can be calibrated after it is assembled into a
system. A lock bit then freezes the sensor for good.

The key idea is a dedicated unit for every operation. There is no shared ALU.
Each unit works continuously on its own stage of the stream. One 8-bit
conversion is started every 10 clocks, and every conversion yields one new output
code. The price is area and some latency. The benefit is a very high throughput
at a low clock rate.

```
 hall_mv ─┐                                   ┌──────────── hall_dsp ─────────────────────────────────┐
 temp_mv ─┤ sar_adc_model ── code ──▶ dsp_ctrl ─▶ sub_convert ─▶ average ─▶ mult_lin ─▶ mult_sens ─▶   │
          │   (8-bit SAR)                │                                   ▲  (x F)      (x Sens)   │
          │                              └── temperature ─▶ linearize ── F ──┘                        │
          │                                                        offset_adder (+Voq) ─▶ limiter ─▶ dac_code ─▶ dac_model ─▶ vout_mv
          │                                   └───────────────────────────▲───────────────────────────┘
          │                                                  cfg (all registers, read live)
 sin ─▶ serial_if ◀──▶ mem_ctrl ◀──▶ cfg_ram (working copy)
 sout ◀─┘                 └────────▶ eeprom_model (non-volatile copy, lock cells)
```

`hall_sensor_top` connects everything. The analog parts are outside the RTL:
the clock oscillator, the temperature sensor, the low-voltage reset detector, the
comparator that turns supply-voltage modulation into serial pulses, and the
output pin switch. Their signals are the top's ports: `clk`, `temp_mv`, `rst_n`,
`sin` and `analog_mode`. The A/D converter, D/A converter and EEPROM are library
or process parts, so they are included only as behavioural models. They are
`sar_adc_model`, `dac_model` and `eeprom_model`. Voltages are integers in
millivolts with a 5 V full scale.

## The signal chain and its number formats

| stage | unit | operation | output format | latency |
|---|---|---|---|---|
| 1 | `sar_adc_model` | 8-bit successive approximation, 1 bit per clock | unsigned code, 0..255 | 9 clk after start |
| 2 | `sub_convert` | code − 128 | 9-bit signed magnitude (sign, 8-bit magnitude) | 1 clk |
| 3 | `average` | fills temperature slots (below) | 9-bit signed magnitude | 1 sample |
| 4 | `mult_lin` ("Multiply 1") | × F, round, saturate to 255 | 9-bit signed magnitude = **Adc** register | 2 clk |
| 5 | `mult_sens` ("Multiply 2") | × Sens/16, round | 11-bit two's complement | 3 clk |
| 6 | `offset_adder` | + Voq | 12-bit two's complement | 1 clk |
| 7 | `limiter` | clamp to [Lo, Hi] | 8-bit code = **Dac** register | 1 clk |

Both multipliers round to the nearest value, with halves going away from zero.
They are pipelined (2 and 3 stages), and each splits its multiplier operand into
two partial products that are formed in parallel. The whole chain therefore
accepts a new sample every clock, far more than the one sample per 10 clocks it
receives. From the converter's `done` pulse to a new `dac_code` takes one sample
period (the averaging delay) plus 8 clocks.

In real units the output is

    Dac = clamp( round( round(Hall·F) · Sens/16 ) + Voq , Lo, Hi )
    Vout = Dac · 5 V / 256

Here `Hall` = ADC code − 128. To reach a wanted characteristic, pick the slope
`s` in output LSB per input LSB, and set `Sens = round(16·s)` (sign and 6-bit
magnitude, ±0.0625 … ±3.9375). `Voq` is the output code at zero field. Each
limit is its voltage × 256/5.

## Temperature compensation on a shared converter

The same converter measures the Hall voltage and the temperature sensor.
Temperature changes slowly, so `dsp_ctrl` lends it the converter only for every
`TEMP_EVERY`-th conversion (default 64). That slot carries no Hall value.
Leaving a hole, or repeating a stale value, would show up at the output. So
`average` holds the stream back by one sample and replaces the missing value with
the mean of the Hall samples before and after it. Every conversion still yields
exactly one output, just one sample later.

The temperature sample, code − 128 in two's complement, goes to `linearize`.
That block runs beside the main channel and recomputes the correction factor

    F = 1 − Tq·dT·2^-14 + Sqtq·dT²·2^-20,      dT = temperature − T0

This is the second-order expansion of 1/(1 + TC·dT). `Tq` is the first-order
quotient (8-bit signed magnitude). `Sqtq` is the second-order quotient (7-bit,
0..127). `T0` is the sensor reading at 25 °C. The `Test` command captures it at
calibration: it makes `dsp_ctrl` switch the next conversion to the
temperature sensor and stores the result. F is rounded to unsigned Q2.7
(0 … 3.99) and saturates at both ends. It updates 4 clocks after each temperature sample and is 1.0 after reset.
The two halves meet only at this factor register, so either one can be changed
without touching the other.

## Registers

| addr | name | bits | coding | meaning |
|---|---|---|---|---|
| 000 | Special | 9 | binary | lock cells, read select, ADC input range |
| 001 | Tq | 8 | signed magnitude | first-order temperature quotient |
| 010 | Sqtq | 7 | unsigned | second-order temperature quotient |
| 011 | Sens | 7 | signed magnitude | slope, steps of 1/16 |
| 100 | Voq | 9 | two's complement | output at zero field, −256..255 |
| 101 | Hi | 8 | unsigned | upper clamp, 0..255 |
| 110 | Lo | 7 | unsigned | lower clamp, 0..127 |
| 111 | T0 / Adc / Dac | 8 / 9 / 8 | see above | read-only; Special[6:5] selects 00 T0, 01 Adc, 10 Dac |

The Special register layout is this design's own:

| bit | use |
|---|---|
| 8 | Lock cell |
| 7 | Lock1 cell |
| 6:5 | selects what address 111 returns |
| 4:0 | ADC input-range bits, brought out as `adc_range` |

The lock cells are EEPROM cells and are active low, because an erased cell reads
'1'. Write, Program and Erase never change them.

## The serial line

This is the least obvious part. One pin carries telegrams at a bit time of a few
milliseconds, and the device has no crystal. So the line code carries its own
timing.

* The idle level is low. Every bit begins with a level change.
* A `0` has no further change within the bit.
* A `1` has one more change between 60 % and 90 % of the bit time.
* A telegram starts with the **sync bit**, a `0`. Its rising edge opens it and the
  first falling edge closes it. Its length is the bit time `bt`, which
  `serial_if` measures in clocks.

A telegram is made of these fields, most significant bit first, with odd parity
(a field plus its parity bit holds an odd number of ones):

```
sync | c2 c1 c0 | Pc | a2 a1 a0 | Pa | [ data (register width) | Pd ]   -> line low
```

Only Write telegrams carry the data field. Its width is the addressed register's
size, so the receiver knows from the header where the telegram ends. The last bit
closes by time, not by an edge.

| code | command | action |
|---|---|---|
| 001 | Read | reply: ack + register bits + parity |
| 010 | Write | RAM register := data; reply: ack |
| 011 | Program | EEPROM := RAM; reply: ack |
| 100 | Erase | EEPROM := all '1'; reply: ack |
| 101 | Test | one extra temperature conversion is made and its result written to T0; reply: ack |
| 110 | Lock | program the Lock cell; reply: ack; after that the interface stays silent and `analog_mode` = 1 |
| 111 | Lock1 | program the Lock1 cell; T0 and Special[4:0] are then frozen and Test is refused |
| 000 | reserved | refused |

**Decoding.** These windows are this design's own:

* A change between bt/2 and 15·bt/16 after the start of a bit is the mid-bit
  change of a `1`.
* A later change starts the next bit.
* A change earlier than bt/2, a second mid-bit change, or no change by 5·bt/4
  drops the telegram.
* The telegram is also dropped if the sync bit is shorter than `MIN_BIT_CYCLES`
  (16), or if the line is still high bt/2 after the last bit.
* A dropped telegram, a parity error or a refused command gets **no reply**. The
  host sees silence.
* The receiver takes the telegram as complete once it has the bits that the
  command and address call for. Surplus bits after that are not part of it.
  They are either ignored, while the reply is being sent, or taken as the start
  of a new telegram, which is then usually dropped.

**Reply.** On `sout`, the acknowledge bit is the line high for one bit time. This
also tells the host the reply's bit time, which here equals the input bit time.
For a Read, the data bits and their parity follow in the same code. The mid-bit
change of a `1` is sent at 3/4 of the bit time. After a reply the line returns
low.

The sync bit measures bit times of up to 65535 clocks (`CW` = 16). For a 3–4 ms
bit, that allows clocks up to about 16 MHz.

## Memory and locking

`cfg_ram` is the working copy that the DSP reads continuously. `eeprom_model`
holds the same eight 9-bit words.

* After reset, `mem_ctrl` copies the EEPROM into the RAM, in 8 clocks.
* Program clears the EEPROM cells whose RAM bits are 0. Erase sets cells back to
  '1'. So a new configuration is stored by an Erase followed by a Program.
* Each word operation keeps the model busy for `EE_BUSY_CYCLES` (default 200),
  and Program and Erase each cover all 8 words.
* The other commands answer 4 clocks after the telegram has been checked.
* Once the Lock cell is programmed, every command is refused, the interface
  ignores its input and `analog_mode` stays high. The lock survives reset,
  because it is read back from the EEPROM at boot.

## Timing summary (defaults)

| quantity | value |
|---|---|
| conversion period / output rate | 10 clocks per output |
| temperature measurement | every 64th conversion |
| factor update after a temperature sample | 4 clocks |
| Write/Read: end of telegram → ack | about 7 clocks |
| Test: end of telegram → ack | up to about 40 clocks |
| Program or Erase | about 8 × 203 clocks |

## Choices made where the source description is silent

* Hall and temperature codes are taken relative to mid-scale (128).
* The scaling of Tq (2^-14) and Sqtq (2^-20) and the Q2.7 format of F are this
  design's own.
* Tq is 8-bit signed magnitude, so its range is −127..127, not −128..127.
* Sens uses 1/16 steps. The largest gain is therefore 3.9375, not quite 3.97.
* Multiply 1 has two stages and Multiply 2 has three. The source only says
  "two and three".
* The temperature ratio (1 in 64) and the EEPROM busy time are this design's
  own.
* The following are all this design's own choices: the Special bit layout, the
  parity polarity, the bit order, the decode windows, the output bit time, and
  the RAM being loaded from the EEPROM at reset.
* If Lo > Hi, Hi wins.
* The converter must finish within the 10-clock period. The model takes 9
  clocks.

## Files

* `rtl/hall_pkg.sv`: register addresses, command codes, the `cfg_t` struct,
  register widths, parity.
* `rtl/hall_sensor_top.sv`: the whole device.
* `rtl/hall_dsp.sv`: the processor. It contains `dsp_ctrl`, `sub_convert`,
  `average`, `linearize`, `mult_lin`, `mult_sens`, `offset_adder` and
  `limiter`.
* `rtl/serial_if.sv`: the serial interface, with `biphase_tx` as its output
  encoder.
* `rtl/mem_ctrl.sv`, `rtl/cfg_ram.sv` and `rtl/eeprom_model.sv`: the memory.
* `rtl/sar_adc_model.sv` and `rtl/dac_model.sv`: the converter models.
* `tb/tb_<module>.sv`: a self-checking bench for each module.
* `tb/serial_host.sv`: a line model of the external programmer, used by the
  serial and full-device benches.
* `tb/tb_fig_characteristics.sv`: runs two complete output characteristics (see
  below).

## Simulating

Every bench prints `TB_RESULT checks=N failures=M` and stops. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/hall_pkg.sv tb/tb_hall_sensor_top.sv --top-module tb_hall_sensor_top
./obj_dir/Vtb_hall_sensor_top
```

`tb_hall_sensor_top` runs the whole device at its default parameters, using only
its pins. It takes these steps:

1. Boots from an erased EEPROM.
2. Writes and reads back every register over the serial line.
3. Runs Test.
4. Checks the output code and voltage at eight field values against an
   independent calculation, including both clamps.
5. Reads Adc and Dac over the line.
6. Runs Erase and Program, then a power cycle that must restore everything.
7. Checks the compensation at two other temperatures.
8. Runs Lock1, then Lock.

It counts each of these mechanisms and fails if any never occurred. The other
benches check single units against reference arithmetic, including the
latencies and the one-output-per-10-clocks rate. Each bench has been checked to
fail when its unit is deliberately broken.

## Trust and limits

* The RTL is lint-clean apart from unused-signal warnings. It has been simulated
  but not synthesised to gates or tried in hardware.
* The three models stand in for analog or process parts. They define the
  interfaces those parts need, not their electrical behaviour.
* The ADC input-range bits are only brought out as a port. What they do in the
  analog front end is outside this design.
* The output pin switch is outside this design. The same goes for its "analog
  mode" versus interface-output multiplexing.
