# One-channel programmable pulse synthesizer

A square-wave generator built on direct digital synthesis (DDS). A phase
accumulator sets the output frequency. A comparator on the accumulator's top
bits sets the pulse width. A pulse counter can stop the output after a
programmed number of pulses. The synthesizer has two modes:

- **continuous**: an endless pulse train;
- **counter**: a burst of exactly `k2 + 1` pulses.

Each mode has two sub-modes: a fixed 50 % duty cycle, or a programmable duty
cycle set by a 12-bit constant `k0`. All three constants (`k0`, the frequency
word `k1` and the pulse count `k2`) are loaded over a three-wire serial link
from a host such as a microcontroller.

The reference set-up is a 50 MHz clock, a 100 kHz output (T_out = 10 µs) and a
12-bit comparator, which gives a nominal PWM step of 10 µs / 4096 = 2.44 ns.

## Block structure

```
 data_clk3 ─┐
 reg_cnt  ──┤ input_data ──k1──► nco ──phase[31:20]──► pwm ──► pulse_counter ──► pwm_pulse_cnt
 data_in  ──┘     │  └────k0─────────────────────────────┘          ▲
                  └───────k2────────────────────────────────────────┘
                              nco ── phase[31] ──► qout (test output)
 mng[2]: run (nco, pwm)   mng[0]: 50 % / PWM (pwm)   pls_cnt_en5, pls_cnt_clr (pulse_counter)
```

| module | role |
|---|---|
| `pulse_synth_pkg` | widths (`PHASE_W`=32, `CMP_W`=12, `K2_W`=16) and the serial address code |
| `input_data` | serial address register and three constant shift registers, clocked by `data_clk3` |
| `nco` | 32-bit phase accumulator: `phase += k1` every `clk` |
| `pwm` | 12-bit comparator `phase[31:20] <= k0`, a 50 %/PWM multiplexer and an output register |
| `pulse_counter` | counts finished pulses and blocks the output after `k2 + 1` of them |
| `pulse_synth` | top level; wires the four blocks together |

## Frequency and pulse width

The accumulator wraps `k1 · f_clk / 2^N` times per second:

    f_out = k1 · f_clk / 2^N        T_out = 2^N / (k1 · f_clk)        (N = 32)

For 100 kHz at 50 MHz, `k1 = 2^32 / 500 ≈ 8589934.6`. The testbenches use the
truncated word 8589934 (99 999.995 Hz).

In PWM sub-mode the output is high while the top `P = 12` phase bits are
`<= k0`. That is about the first `k0 / 4096` of each period, so the pulse
length is

    τ ≈ k0 · T_out / 2^P

This is the hardest part of the design to reason about. The phase advances by
`k1` each clock: about 8.19 steps of the 12-bit comparator per clock in the
reference set-up. So the output can only change on a clock edge, and the real
pulse is a whole number of clocks. It equals the number of phase samples in the
period whose top bits are `<= k0`. The 2.44 ns figure is therefore the step of
`k0` in output time, not the granularity of the edges: an edge moves by one
20 ns clock for every ~8 steps of `k0`. The sample points drift slowly with the
rounding of `k1`, so over many periods the mean pulse length follows the
formula more closely than any single pulse does.

Results of the end-to-end test at 50 MHz and 100 kHz, measured as the mean over
10 periods, next to a reference measurement of the same circuit:

| k0 | pulse here | reference | duty here |
|---|---|---|---|
| 5 | constant 0 | constant 0 | 0 % |
| 10 | 20 ns | 20 ns | 0.2 % |
| 20 | 40 ns | 40 ns | 0.4 % |
| 30 | 60 ns | 60 ns | 0.6 % |
| 40 | 100 ns | 100 ns | 1.0 % |
| 50 | 120 ns | 120 ns | 1.2 % |
| 100 | 240 ns | 240 ns | 2.4 % |
| 500 | 1.22 µs | 1.22 µs | 12.2 % |
| 700 | 1.70 µs | 1.70 µs | 17.0 % |
| 1000 | 2.44 µs | 2.44 µs | 24.4 % |
| 2000 | 4.88 µs | 4.88 µs | 48.8 % |
| 3000 | 7.32 µs | 7.31 µs | 73.2 % |
| 4000 | 9.76 µs | 9.75 µs | 97.6 % |
| 4090 | 9.98 µs | 9.98 µs | 99.8 % |
| 4095 | constant 1 | constant 1 | 100 % |

The comparator uses `<=` rather than `<` because `<=` reproduces this table.
With `<`, most pulses come out one clock longer, and `k0 = 4095` never gives a
constant 1. Small `k0` give a constant 0 when `k0` is smaller than the phase
step per clock. Near the top, `k0 = 4095` gives a constant 1. Usable duty
cycles therefore run from about 1 % to 99 %.

In 50 % sub-mode the output is `phase[31] == 0`: the first half of every
period. Both sub-modes start their pulse at phase zero.

## Operating modes

| control | continuous, 50 % | continuous, PWM | counter, 50 % | counter, PWM |
|---|---|---|---|---|
| `mng[0]` | 1 | 0 | 1 | 0 |
| `mng[2]` | 1 | 1 | 1 | 1 |
| `pls_cnt_en5` | 1 | 1 | 0 | 0 |
| `pls_cnt_clr` | – | – | 0 | 0 |

- `mng[2] = 0` stops the synthesizer: the phase is held at 0, and both
  `pwm_pulse_cnt` and `qout` are low. When `mng[2]` returns to 1, the first
  period starts at phase 0.
- `mng[1]` has no function. The 3-bit bus keeps the control-word layout.
- `pls_cnt_en5 = 1` bypasses the counter. `pls_cnt_en5 = 0` enables it.

**Bursts in counter mode.** The counter counts falling edges of the PWM output.
The falling edge that finds the count equal to `k2` sets an internal `done`
flag. From then on the output is held low, while the NCO keeps running. So a
burst is `k2 + 1` whole pulses, and `k2` is loaded as "pulses wanted minus
one". Drive `pls_cnt_clr` high for at least one `clk` to clear the count and
`done`. To get a clean burst, first set `mng[2] = 0`, pulse `pls_cnt_clr`, then
set `mng[2] = 1`. The burst then starts with a whole first pulse.

## Serial loading

Each rising edge of `data_clk3` takes one bit of `data_in`:

- `reg_cnt = 1`: the bit is shifted into the 2-bit address register.
- `reg_cnt = 0`: the bit is shifted into the register the address selects.

| address | register | width |
|---|---|---|
| 0 | `k0`, duty constant | 12 |
| 1 | `k1`, frequency word | 32 |
| 2 | `k2`, pulses − 1 | 16 |
| 3 | none (data bits dropped) | – |

Send the address MSB first, then the data word MSB first. A register holds the
last `width` bits shifted into it. The address stays set, so several words can
go to the same register without resending it.

The constant registers are in the `data_clk3` domain. Their outputs go straight
into the `clk` domain, with no synchronisers, and change bit by bit during a
load. **Load only while `mng[2] = 0`.** Writing while running gives, for a few
periods, output derived from a partly shifted word. The top level has an
assertion that flags a data bit shifted in while `mng[2] = 1`.

## Timing and reset

- Everything except `input_data` runs on `clk`.
- `pwm_pulse_cnt` is registered in `pwm` and gated by two registers in
  `pulse_counter`, so it comes one `clk` after the phase it was computed from.
- `qout` is the phase MSB with no added delay.
- `rst_n` is an asynchronous active-low reset for every register. It sets the
  address to "none" and clears the constants and the phase.

Resource use is 62 serial-register bits, a 32-bit adder and register, a 12-bit
comparator, a 16-bit counter with an equality comparator, and a few flags
(113 flip-flops in all). Pins: 10 signals plus reset. A narrower accumulator,
or a narrower `k2`, shrinks this; both are parameters.

## Where the design is an interpretation

These were fixed by this implementation rather than taken from a
specification:

- Accumulator width `N = 32` and counter width `K2W = 16`.
- The address code, bit order and the fourth "none" address of the serial
  link.
- `k1` is loaded through a shift register like the other two constants.
- Polarities and functions of the controls:
  - `pls_cnt_clr` is an active-high synchronous clear.
  - `pls_cnt_en5 = 1` means continuous.
  - `mng[2] = 0` stops the synthesizer and clears the phase.
- The comparator relation (`<=`), the 50 % source (`phase[31] == 0`) and the
  output register in `pwm`.
- Counting falling edges and the `done` flag in `pulse_counter`.
- The missing clock-domain crossing for the constants.

The widths `P = 12`, the two-mode/two-sub-mode structure, the
`k2 = pulses − 1` rule, the control values of each mode and the reference
operating point are from the original specification.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=<n> failures=<m>`:

| testbench | what it checks |
|---|---|
| `input_data_tb` | random writes to each register against a model; writes to "none" change nothing |
| `nco_tb` | phase equals `m·k1 mod 2^32` every clock; period 500 clk at the reference word; stop clears |
| `pwm_tb` | random comparator/multiplexer cases; full phase sweeps give exactly `k0 + 1` high steps |
| `pulse_counter_tb` | random pulse trains and `k2`: exactly `k2 + 1` whole pulses, then low; bypass passes all |
| `pulse_synth_tb` | the whole design at default sizes, described below |

`pulse_synth_tb` runs the whole design at its default sizes:

- 50 % mode;
- the 15-point duty table above, against the reference values;
- bursts of 7 pulses in both sub-modes, and one of 100 pulses;
- stop and restart;
- a clock-by-clock comparison with an independent model of the accumulator
  and comparator in continuous mode.

It runs in well under a second.

With plain Verilator, for example:

    verilator --binary --timing --assert \
      rtl/pulse_synth_pkg.sv rtl/input_data.sv rtl/nco.sv rtl/pwm.sv \
      rtl/pulse_counter.sv rtl/pulse_synth.sv tb/pulse_synth_tb.sv \
      --top-module pulse_synth_tb
    ./obj_dir/Vpulse_synth_tb

For a block testbench, list `rtl/pulse_synth_pkg.sv`, the block's file and its
testbench. The package must come first.
