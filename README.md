# Time-proportioning 1-bit DAC for FPGAs

An FPGA has plenty of fast digital outputs but no analog ones. This design
turns an 8-bit word into an analog voltage using a single output pin and an
external resistor and capacitor. The pin emits a pulse stream whose fraction
of high time is `word / 256`. The RC low-pass filter averages that stream, so
the filter output settles at

    Vout = V_OH * word / 256        (V_OH = pin high level, 3.3 V here)

One step (1 LSB) is 3.3 V / 256 = 12.89 mV, and full scale (word 255) is
3287 mV. The clock runs at tens of MHz and audio or control signals sit in the
kHz range, so the one-bit output has plenty of time to average.

Two ways of making the pulse stream are included and sit side by side in the
top level:

* **Accumulator modulator** (`pwm_accumulator`, the main path): 9 flip-flops
  and one adder. The pulses are spread as evenly as possible.
* **Counter PWM** (`pwm_counter`): a classic fixed-period PWM with one pulse
  of `word * 8` clocks in every 2048-clock period.

## The accumulator modulator

The core is an 8-bit accumulator with a carry flip-flop, 9 bits in all:

    acc <= {0, acc[7:0]} + {0, pwm_in}      every clock
    pwm_out = acc[8]                        the carry of that addition

On each clock the word is added to the low 8 bits, and the carry out is the
output bit. After 256 clocks with the same word, 256·word has been added, so
the low 8 bits are back where they started. That means exactly `word` carries
have been produced. This holds for **every** window of 256 consecutive clocks,
not just on average. So the duty is exact, whatever phase the accumulator
starts from.

The carries are also spread out evenly. Some examples:

| word | pulse pattern |
|------|---------------|
| 0x80 | high every 2nd clock |
| 0x40 | high every 4th clock |
| 0x20 | high every 8th clock |
| 0x27 | 39 single-clock pulses per 256 clocks, 6 or 7 clocks apart |
| 0x00 | never high |
| 0xFF | low for one clock in 256 |

This is a first-order sigma-delta modulator. Its energy sits at high
frequencies, unlike a plain PWM, which puts all of a period's high time in
one block. For the same RC filter, the ripple is therefore far smaller. With
R = 1 kΩ, C = 100 nF and a 50 MHz clock, the worst ripple over the whole code
range stays under 1 mV. The counter PWM with the same filter ripples by
hundreds of mV at mid-scale.

Timing: `pwm_out` is registered. A new word first affects the carry computed
on the next rising edge, so it appears one clock later. The synchronous reset
clears all 9 bits.

`pwm_accumulator` has a `WIDTH` parameter (default 8). A wider word gives
finer steps: `V_OH / 2**WIDTH` per step.

## The counter PWM

There are two counters:

* `slow_cnt` counts clocks. When it reaches `CNT_SLOW_RANGE` (default 2048),
  it restarts at 1 and raises `reload` for that cycle.
* `duty_cnt` is loaded with `dac_in * 8` on `reload`. Otherwise it counts
  down to zero and stays there.

`out_pwm` is a register. In every cycle it takes the value "`duty_cnt` after
this cycle's update is non-zero". As a result, each period of 2048 clocks
starts with exactly `dac_in * 8` high clocks:

    clock edge:   R    +1   +2  ...  +8w-1  +8w  ...  +2047   R (next period)
    out_pwm:      1    1    1   ...   1     0    ...   0      ...

`R` is the loading edge. `out_pwm` rises right after it (for w > 0) and falls
`8w` clocks later.

`dac_in` is only sampled on the loading edge. A change in mid-period waits
for the next period. Duty is `8w / 2048 = w / 256`, the same scale as the
accumulator path. Word 255 gives a 2040-clock pulse, and word 0 gives none.
After reset both counters are zero, so the first reload comes 2048 clocks
after reset is released, and the output stays low until then.

Parameters:

* `DATA_W` (8): word width.
* `SCALE_SHIFT` (3): the load value is `word << SCALE_SHIFT`.
* `CNT_SLOW_RANGE` (2048): the period.

Keep `CNT_SLOW_RANGE >= 2**DATA_W << SCALE_SHIFT` if you want the duty to be
exactly `word / 2**DATA_W`. With a shorter period, large words hold the
output high for the whole period.

## Resolution

The number of bits a PWM DAC resolves is

    R_bits = log2(L / C)

where L is the number of clocks in one counter cycle and C is the smallest
change in high time, in clocks. The accumulator has L = 256, C = 1, so it
resolves 8 bits. The counter PWM has L = 2048, C = 8, so it also resolves
8 bits. The LSB is `V_OH / 2**R_bits`, which is 12.89 mV at 3.3 V.

## Top level (`dac`)

| port | dir | width | function |
|------|-----|-------|----------|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous reset, active high, for both paths |
| `pwm_in` | in | 8 | word for the accumulator DAC |
| `pwm_out`, `pwm` | out | 1 | accumulator pulse stream; both pins carry the same signal |
| `hexouthi` | out | 7 | seven-segment digit showing `pwm_in[7:4]` |
| `hexoutlo` | out | 7 | seven-segment digit showing `pwm_in[3:0]` |
| `dac_in` | in | 8 | word for the counter PWM |
| `out_pwm` | out | 1 | counter PWM pulse stream |

The only top-level parameter is `CNT_SLOW_RANGE` (2048). Shared constants and
the `seg7_t` type are in `dac_pkg`.

The seven-segment decoders (`seg7`) show hexadecimal digits 0–9, A, b, C, d,
E, F. `hex[0]` drives segment a and `hex[6]` segment g. The outputs are
**active low**, which suits common-anode displays. If your board's displays
are active high, invert `hex` in `seg7`.

The accumulator path with its displays is the minimal configuration: 9
flip-flops and 25 pins (clock, 8 inputs, 2 + 14 outputs). The counter PWM
adds 24 flip-flops and 10 pins. Either path can be removed from `dac`
without touching the other.

## Off-chip filter

Each output pin drives its own filter:

* **Plain RC filter.** R goes in series from the pin to the output node, and
  C goes from the node to ground. Vout swings from 0 to V_OH, and the time
  constant is `tau = R*C`.
* **RC filter with pull-up.** An extra resistor R' ties the node to a
  reference voltage Vref. The pin is then driven as open collector or
  tri-state, and the node can rise above the FPGA's I/O supply. The output
  becomes

      Vout = (V_pin * R' + Vref * R) / (R + R'),    tau = C * (R || R')

  The divider keeps Vout from reaching 0 V.

To choose tau, trade ripple against settling time:

* Ripple is roughly `V_OH * T_pulse_spacing / tau`, so make tau long compared
  with the pulse spacing: 256 clocks worst case for the accumulator, 2048 for
  the counter PWM.
* Settling to 8-bit accuracy takes about `6 * tau`.

The testbenches use R = 1 kΩ, C = 100 nF (tau = 100 µs) at 50 MHz.

`tb/rc_lowpass.sv` is a behavioural model of both filters. It is not
synthesizable and uses real numbers. It solves the RC equation exactly
between pin edges. Its parameters are `R_OHM`, `C_F`, `R_PULL_OHM` (0 means
no pull-up), `V_REF`, `V_OH`, and `TIME_UNIT_S`, the number of seconds one
simulation time unit stands for.

## Verification

Each testbench checks itself and ends with
`TB_RESULT checks=N failures=M`. Each also has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_pwm_accumulator` | The output and register, cycle by cycle, against an integer phase model. Exact high count in 256-clock windows for 0x00, 0x01, 0x27, 0x80, 0x40, 0x20, 0xAA, 0xFF, 0x7F. Pulse spacing of 2, 4 and 8 clocks. One-clock latency. Random words. Reset. |
| `tb_pwm_counter` | Reload spacing of 2048 clocks, starting from reset. The output in every cycle against a model of the pulse. High count `word*8` per period, including words 0 and 255. Mid-period changes of `dac_in` have no effect. |
| `tb_seg7` | All 16 glyphs, compared with lists of segment letters. |
| `tb_dac` | Full top level at default parameters, with filter models. For words 0, 1, 3, 7, 15, 31, 63, 127, 255, the filtered voltage of both paths after 10 tau is averaged over 16384 clocks and matches `3.3 V * word / 256` within 1 mV. The pull-up filter (10 kΩ to 5 V) matches its divider formula. Displays are checked for each word. It also counts carries, reloads, pulse ends, empty periods and full-scale periods, and fails if any of these never occurs. |
| `tb_dac_triangle` | One triangle 0→255→0. The accumulator path takes one step per 256 clocks: its high count per step is checked, and its filtered output must stay within 3 mV of an ideal RC filter driven by the exact voltage. The counter path takes one step per period, and its pulse length is checked on all 510 steps. |

Simulate with Verilator 5 from the project root, for example:

    verilator --binary --timing --assert -Irtl -Itb rtl/dac_pkg.sv tb/tb_dac.sv \
        --top-module tb_dac -Mdir obj_tb_dac -o sim
    ./obj_tb_dac/sim

Replace `tb_dac` with any testbench name. `tb_dac` and `tb_dac_triangle`
each simulate about a million clocks, which takes about a second.

## Design choices and limits

These points are this design's own choices, not givens of the original
circuit:

* **Reset.** Both cores have a synchronous, active-high reset. The minimal
  25-pin configuration has no reset pin, so tie `rst` low there if a
  power-up value of zero is acceptable.
* **Counter period.** `CNT_SLOW_RANGE` = 2048 is chosen so that the counter
  PWM has the same `word/256` scale as the accumulator.
* **Counter PWM structure.** The counter PWM is built as a period counter
  plus a down counter that is reloaded at the period's end. It is not built
  as an up/down counter.
* **Seven-segment decoding.** The glyph shapes, segment order and polarity
  are this design's own, and so is the choice of which nibble each digit
  shows.
* **`pwm_out` and `pwm`.** Both pins carry the accumulator carry.
* **Input width.** The input is 8 bits. Wider words (for example 16 bits)
  are supported by the `WIDTH` parameter of `pwm_accumulator`. The top
  level and the displays are written for 8 bits.
* **Off-chip parts.** The output pad buffer and the filter are not part of
  the RTL.
