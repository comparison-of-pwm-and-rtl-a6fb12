# PWM and PCM digital-to-analog converters

A cheap way to get an analog voltage out of an FPGA or microcontroller is a
pulse-width modulator followed by an RC low-pass filter. The filtered voltage
is `code / 2^m * V_DD`. The problem is ripple. An m-bit PWM switches only once
per period of 2^m clocks, so its ripple sits at the low frequency
`f_sys / 2^m`. A simple RC filter cannot remove enough of it, and the noise
left over is larger than one LSB. Nominally the DAC has m bits, but only a
few of them are usable.

This RTL puts the classical PWM DAC next to a **pulse-count modulation (PCM)**
DAC. The PCM DAC uses exactly the same hardware: an m-bit counter, an m-bit
`A < B` comparator and an output flip-flop. The only change is in the wiring.
Counter bit `i` drives comparator input bit `m-1-i`, so the counter reaches
the comparator bit-reversed. The duty cycle, and so the mean output voltage,
stays the same. But the high clocks are spread across the period instead of
forming one block, so the ripple moves to frequencies up to `f_sys / 2`, where
the same filter removes it far better.

The top module reproduces the comparison setup:

- a digital sawtooth drives both modulators;
- both are 9 bits wide;
- the clock is 50 MHz;
- each pin feeds a second-order RC filter.

In simulation, the filtered PCM output has 8.9 effective bits. The 9-bit PWM
output has 3.1 effective bits, and 6.9 when the PWM is cut down to 7 bits.

## Why bit reversal spreads the pulses

Both modulators drive the pin high in slot `s` of a period (s = 0 … 2^m-1)
when `A(s) < code`:

| modulator | `A(s)` | high slots in one period |
|---|---|---|
| PWM | `s` | slots `0 … code-1`, one pulse |
| PCM | `reverse_m(s)` | the slots whose reversed index is below `code` |

Bit reversal is a permutation of `0 … 2^m-1`. So in both cases exactly `code`
slots are high, and the duty cycle is `code / 2^m`. The two differ in *which*
slots are high.

Take a code whose binary form is a single bit, `code = 2^k`. Its high slots
are those whose top `m-k` bits of the reversed index are zero. Those are the
slots whose low `m-k` bits are zero: every `2^(m-k)`-th slot. A general code
is a sum of such terms, so its pulses fall on nested, evenly spaced grids.

Here is the 16-slot (m = 4) case. `#` is a high clock and slot 0 is on the
left.

| code | PWM | PCM |
|---|---|---|
| 1  | `#...............` | `#...............` |
| 2  | `##..............` | `#.......#.......` |
| 3  | `###.............` | `#...#...#.......` |
| 4  | `####............` | `#...#...#...#...` |
| 5  | `#####...........` | `#.#.#...#...#...` |
| 8  | `########........` | `#.#.#.#.#.#.#.#.` |
| 12 | `############....` | `###.###.###.###.` |
| 15 | `###############.` | `###############.` |

At mid-scale the PCM pin toggles on every clock (25 MHz at f_sys = 50 MHz).
The PWM pin switches once per period (97.7 kHz for m = 9).

The worst codes for PCM are those with very few high clocks or very few low
clocks per period, such as 1, 2, 2^m-2 and 2^m-1. Their pattern repeats only
once or twice per period, so PCM is no better than PWM there. The sawtooth passes through every code, so
the measured noise includes these worst cases.

## Block structure

```
dac_compare_top
├── sawtooth_gen      M-bit ramp code, +1 every STEP_CYCLES clocks
├── pwm_modulator     (gets the top M_PWM bits of the code)
│   ├── mbit_counter
│   ├── lt_comparator   a = count
│   └── output_dff
└── pcm_modulator
    ├── mbit_counter
    ├── lt_comparator   a = bit_reverse(count)
    └── output_dff
```

`dac_pkg` holds the default width (`M_DEFAULT = 9`) and the `bit_reverse`
function. After synthesis the two modulators are the same size, 11
flip-flops and 7 word-level cells each. Those flip-flops are 9 for the
counter, 1 for the output and 1 for the period flag. The reversal is wiring
only and costs no logic.

The RC filters are outside the chip and are not in `rtl/`. The testbenches
model them in `tb/rc_filter2_model.sv`. The first stage is R1 = 5 kΩ and
C1 = 1 nF. The second stage is R2 = 10 kΩ and C2 = 0.5 nF; doubling R and
halving C keeps the second stage from loading the first. The model
integrates the two node equations at the clock rate. The corner is about
`0.1575 / (R1·C1)`, which is 31.5 kHz.

## Interfaces and timing

All sequential logic runs on the rising edge of `clk`. It has an asynchronous
active-low reset `rst_n`, which clears every counter and drives the pins low.

| module | ports | timing |
|---|---|---|
| `mbit_counter #(M)` | `clk, rst_n → count[M-1:0]` | `count` is 0 in the first clock after reset and then `+1` per clock, wrapping at 2^M. |
| `lt_comparator #(M)` | `a, b → a_lt_b` | Combinational, unsigned. |
| `output_dff` | `clk, rst_n, d → q` | `q` follows `d` one clock later. |
| `pwm_modulator #(M)`, `pcm_modulator #(M)` | `clk, rst_n, code[M-1:0] → pwm_out / pcm_out, period_start` | The pin shows counter value `k` during clock `k+1`, one flip-flop later. `period_start` is high while the pin shows slot 0, including the first period after reset. `code` goes straight to the comparator: a change takes effect at the next clock, even in the middle of a period. |
| `sawtooth_gen #(M, STEP_CYCLES)` | `clk, rst_n → code, ramp_wrap` | `code = floor(k / STEP_CYCLES) mod 2^M` after `k` clocks. `ramp_wrap` is high for the one clock in which `code` has just returned to 0. |
| `dac_compare_top #(M, M_PWM, STEP_CYCLES)` | `clk, rst_n → pwm_out, pcm_out, pwm_period_start, pcm_period_start, code, ramp_wrap` | The two pins go to the external filters. The other outputs are there to trigger a scope. |

Parameters of the top:

| parameter | default | meaning |
|---|---|---|
| `M` | 9 | sawtooth and PCM width (m = 9 in the original comparison) |
| `M_PWM` | 9 | PWM width. 7 gives the reduced-resolution, higher-frequency PWM run; it must be ≤ `M`. |
| `STEP_CYCLES` | 96 | clocks per sawtooth step. 512 × 96 clocks at 50 MHz gives a 1.017 kHz ramp. |

## Effective resolution and measured results

A DAC has `n` effective bits when its peak-to-peak switching noise after the
filter is below `V_DD / 2^n`. In other words, the noise must be smaller than
one LSB.

The testbenches check this with three filter models. Two are driven by the
PWM and PCM pins. The third is driven by the ideal staircase
`code / 2^M × 3.3 V`. The noise is the peak-to-peak difference between a pin's
filtered output and the ideal filtered output, over one full ramp after
settling. The effective bits are then `log2(3.3 V / noise)`.

| configuration | noise p-p | effective bits | original comparison |
|---|---|---|---|
| PCM, m = 9 | 6.9 mV (1 LSB = 6.45 mV) | 8.90 | about 9 bits |
| PWM, m = 9 | 384 mV | 3.10 | "much less" |
| PWM, m = 7 | — | 6.89 | 6 to 7 bits |

PCM is 2.0 bits ahead of the 7-bit PWM; the original comparison reports 2 to 3
bits. Over one ramp the PWM pin is high for 24528 clocks and the PCM pin for
24544. The ideal sum is 24528, so the mean voltages agree to within 0.1 %.

## Choices made in this RTL

The counter, the comparator, the output flip-flop, the two wirings, the 9-bit
width, the 50 MHz clock, the sawtooth test and the filter values all come from
the original comparison. The following were not specified there and were
chosen here:

- **Reset.** Asynchronous and active-low. Counters and the sawtooth start at
  0, and the pins reset low.
- **Input timing.** The input is not double-buffered. The comparator sees
  the current code, as in a plain counter/comparator modulator. A code that
  changes in the middle of a period gives that period a mixed duty cycle.
  The sawtooth steps every 96 clocks, which is less than one 512-clock
  period, so this happens during the ramp. The effect is included in the
  measured numbers.
- **Sawtooth.** It steps by one LSB every `STEP_CYCLES` clocks. The value 96
  was chosen to match the roughly 1.02 kHz ramp of the original measurements.
- **`period_start`** flags are added. They are not needed by the DAC.
- **Reduced-width PWM.** `M_PWM` feeds the top bits of the code to a narrower
  PWM. The original run changed m, but did not say how the test pattern was
  adapted.

Not included:

- The RC filters, which are analog. They exist only as a simulation model.
- The microcontroller/SPI variant of PCM, in which a serial port shifts out
  the bit-reversed pattern. It was only proposed.
- The first-order-filter staircase study at 1 MHz, 500 kHz and 250 kHz PWM.
  This was a circuit simulation with no stated clock or width, and at
  50 MHz those frequencies are not `f_sys / 2^m` for any integer m.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=F`, and a watchdog ends
a run that hangs. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dac_pkg.sv tb/tb_dac_compare_top.sv --top-module tb_dac_compare_top
./obj_dir/Vtb_dac_compare_top
```

| testbench | what it covers |
|---|---|
| `tb_mbit_counter` | Count sequence, 512-clock period, asynchronous reset. |
| `tb_lt_comparator` | All 2^18 input pairs, and exactly `b` values of `a` below `b`. |
| `tb_output_dff` | One-clock delay, holding between edges, asynchronous reset. |
| `tb_pwm_modulator` | 9-bit and 4-bit instances, checked every clock: duty per period, one pulse per period, the 16-slot patterns. |
| `tb_pcm_modulator` | Same as PWM, plus hand-written 4-bit patterns, toggling on every clock at mid-scale, and a bound on high-run length. |
| `tb_sawtooth_gen` | Code sequence, hold time, ramp period, wrap pulse. |
| `tb_dac_compare_top` | The default-size top through two ramps (about 2 ms of 50 MHz time, well under a second to simulate). Checks both pins every clock, the effective resolution of each, equal means, and that every mechanism occurs (both period starts, ramp wrap, code 0, full scale, a single PWM pulse, PCM toggling every clock). |
| `tb_dac_pwm7_workload` | A default top next to one with `M_PWM = 7`. Checks the 7-bit pin every clock and compares the effective resolution of all three outputs. |

To try another width, override `M` (and `M_PWM`) on the top. The testbench
models use `M`, `N = 2^M` and `STEP` as localparams.
