# Fractional ramp synthesiser: division-factor logic and digital PFD

This RTL is the digital heart of a fractional-N PLL that sweeps a microwave
VCO (4.5 to 9 GHz) along a frequency ramp that is as linear and as
repeatable as possible. Two such synthesisers run side by side in a
heterodyne measurement system. Their difference frequency, a few kHz, is
mixed down and analysed, so any non-linearity of either ramp shows up
directly in the measurement.

The VCO is locked to a 50 MHz crystal reference through a divider chain
(÷8 prescaler, then a programmable ÷N). N changes every reference cycle. Its
running mean is the wanted, fractional division factor F, and moving F
along a ramp moves the VCO along the ramp. Three things decide how good the
ramp is:

* **F itself.** A counter-based ramp unit makes F exactly linear and
  bit-for-bit repeatable. A flash-table ramp unit allows arbitrary shapes,
  for example a ramp carrying the inverse of a measured frequency error.
* **The sequence of integers N that averages to F.** N must swing as little
  as possible around F, because a large swing is turned into close-in phase
  noise by any non-linearity of the phase detector. The four-stage
  fractional core here keeps the swing to 4 (for example 18..22 around
  20.05), at a clock rate helped by an extra pipeline delay.
* **The phase-frequency detector.** Its phase-detecting part is kept to two
  flip-flops with a linear characteristic. A separate frequency detector
  only steps in while the loop is pulling in.

Analog parts (VCO, loop filter, balanced detector stage, mixer, pulse
shapers) are not RTL. They appear as ports.

## Signal chain of one channel

```
 cfg.mode ──┐
 f_start ───┤ static
 lin_ramp ──┤ linear      F       ┌─────────┐ X  ┌──────────┐ Nf   N = Nf + P
 flash_ramp ┘ flash  ───────────► │fir_comp │──► │frac_core │──► (+P) ──► prog_divider ◄── prescaler ◄── VCO
                                  └─────────┘    └──────────┘                 │
                                                                              ▼ f_v (also the clock of all of the above)
                                                   ref (XCO) ──► pfd: phase_det + freq_det ──► analog stage, loop filter ──► VCO
```

The whole fractional logic (`frac_logic`) is clocked by the divider
output, so it runs once per division cycle, at about the reference rate.
From F to N the latency is three clocks:

1. the FIR output register;
2. the delay inside the core;
3. the N output register.

## The fractional core (`frac_core`)

This is the part worth understanding in detail.

### Structure

Four integrators `I(z) = 1/(1 - z^-1)` sit in a chain with an adder in
front of each. The last integrator is followed by a quantiser that rounds to
the nearest integer and gives Nf. Nf, delayed by one clock, is fed back and
subtracted at each adder, with these weights:

| adder | feedback weight |
|-------|-----------------|
| 1     | K1 = 3/16       |
| 2     | K2 = 1/2        |
| 3     | 1               |
| 4     | 1               |

A second delay `z^-1` sits between integrators 2 and 3. With `D = 1 - z^-1`
and the quantisation error `nq`, the output is

```
Nf(z) = ( X(z)·z^-1 + nq(z)·D(z)^4 ) / V(z)
V(z)  = K2·D^3 + (1 - 2K2 + K1)·D^2 + (K2 - 2K1)·D + K1
```

* **Noise shaping.** The numerator `D^4` pushes the quantisation noise to
  high offsets, where the fifth-order loop filter removes it.
* **Stability and small swing.** K1 and K2 are chosen so that the loop is
  stable and the output of a constant input covers at most five
  neighbouring integers (peak-to-peak deviation ΔN = 4). A plain cascade of
  integrators (MASH-style) would swing much further, and with N as low as
  8..28 that would raise the close-in noise.
* **Why the second delay.** The loop needs at least one delay (the
  feedback). The second one splits the long chain of adders and integrators
  into two halves of equal depth, which roughly doubles the clock rate.

In the RTL, each integrator is a register that holds its last output, so
each adder is combinational. The register of integrator 2 also serves as
the main-path delay (`b_q` is `z^-1·b`). The two critical paths are:

* `fb_q, x_in → a → b → b_q`
* `b_q, fb_q → d → e → round → fb_q`

### Input compensation (`fir_comp`)

Without help, F reaches Nf through `z^-1/V(z)`. At DC that is a gain of
1/K1 = 16/3, with a dynamic error on a ramp. The input FIR therefore
implements V(z) itself, so FIR plus core pass F through unchanged apart
from a delay. Expanding V(z) in powers of `z^-1` with K1 = 3/16 and
K2 = 1/2 gives the taps

```
h = [ 1, -2, 27/16, -1/2 ]      (sum = 3/16 = K1)
```

The filter computes `16·x[n] - 32·x[n-1] + 27·x[n-2] - 8·x[n-3]` exactly,
in a word with four more fraction bits than F.

### Word widths

| word | integer bits (with sign) | fraction bits | note |
|------|--------------------------|---------------|------|
| F (`fword_t`) | 8 | 32 | 1 LSB of F = 400 MHz / 2^32 ≈ 0.09 Hz at the VCO |
| core (`cword_t`) | 11 | 36 | K1·Nf and the FIR stay exact; 11 integer bits cover the FIR's worst-case gain of 83/16 on any F |
| N (`nint_t`) | 8 | 0 | |

The quantiser takes the rounded value's low 8 bits. In normal use
|Nf − F| < 3.

### Measured behaviour of this RTL

* **Static.** Constant F = 0.05 with P = 20 gives a mean N within 0.001 of
  20.05 over 40,000 clocks, and N stays within 18..22.
* **Full ramp.** On the full 2.5-million-clock ramp, N stays within
  about ±2.5 of F. The mean of N over every 4096-clock block matches the
  mean of F within 4/4096.

## Ramp sources

Settings come in one packed struct `chan_cfg_t` per channel:

| field | meaning |
|-------|---------|
| `mode` | static, linear or flash |
| `f_start` | the static value, or the start of the linear ramp |
| `slope` | increment per clock, with 16 fraction bits beyond F's |
| `len` | steps of the linear ramp, or samples of the flash ramp |
| `p_off` | integer offset P |

**Static.** F = `f_start`.

**Linear (`lin_ramp`).**

* After a one-clock `start`, `f_out = f_start + k·slope` for
  k = 0..`len`, one step per clock. It then holds the end value.
* `busy` is high for `len` clocks, and `done` pulses on the last step.
* It is a plain accumulator. The slope word has 48 fraction bits, so the
  slope of the 50 ms ramp (4.5·10⁻⁶ per clock) is set to about 10⁻⁹
  relative.

**Flash (`flash_ramp`).** The table in external flash is read at a quarter
of the core clock, one sample per four clocks. The three values in between
are interpolated linearly:
`f = s[k] + j·(s[k+1] − s[k])/4`, j = 0..3, rounded down.

Timing:

* A free-running phase `ph` counts 0..3.
* `flash_rd` and `flash_addr` are driven during `ph = 0`. Data is sampled
  at `ph = 3`, so the memory has three clocks to answer.
* The first ramp value appears 9 clocks after `start`. The ramp lasts
  4·(`len`−1) clocks, then holds the last sample and pulses `done`.
* One table entry is a full 40-bit F word.

**Glitch-free switching.** In a ramp mode, F stays at `f_start` until that
unit has produced a value of its ramp:

* linear mode: from its first start after reset;
* flash mode: after each start, from its first interpolated value.

A change of `mode` therefore never feeds a stale value into the core. Give
`f_start` the ramp's first value and the start is seamless.

## Divider chain and clocking

**`prescaler`.** A 3-bit counter that divides by 8.

**`prog_divider`.** A down-counter reloaded with `n_in` when it reaches 1.

* At the reload it emits a pulse one input clock wide, so pulses are
  exactly N input clocks apart.
* N is sampled at the previous pulse. Values below 2 are treated as 2.
* The pulse clocks the fractional logic, which updates N at that edge. The
  counter needs the new N at least 7 input clocks later (N ≥ 8), so there
  is ample margin.

## Linear PFD, digital part (`pfd`)

**Phase detector (`phase_det`).** Two D flip-flops with D = 1.

| flip-flop | clocked by | cleared by | output high |
|-----------|------------|------------|-------------|
| R | reference pulse R | V pulse | from R to V |
| V | divider pulse V | R pulse | from V to R |

For a phase lag φ of V behind R, the mean of `q_r` is φ/2π and that of
`q_v` is 1 − φ/2π. The balanced analog stage forms
`(q_r − qn_r) + (qn_v − q_v)`. With a 1 V step per pair that is 4 V over
2π, linear across the whole period. The working point is φ = π, as far as
possible from the dead zone near φ = 0 where one flip-flop's clear pulse
overlaps its own clock. Both inputs must be short pulses; the pulse shapers
that make them are analog and outside this RTL.

**Frequency detector (`freq_det`).** A stand-in with the right interface
and behaviour; see "Departures" below. Its inputs are synchronised to a
sampling clock `clk_fd`, which must be fast enough to see every pulse.

* A counter adds R pulses and subtracts V pulses.
* In lock the pulses alternate and the counter stays at 0 or 1.
* At 2 or more, V is too slow: `LD2` goes high, and the control lines hold
  `q_r` high and `q_v` low, driving the VCO up.
* At −1 or less, V is too fast: `LD1` goes high and the control lines drive
  the VCO down.
* The counter saturates `SLIP_MAX` (4) steps beyond the normal range. After
  a large frequency error, the loop therefore has to make up the slipped
  cycles before the phase detector is released.
* In lock all four control lines are low, so nothing couples into the phase
  detector.

## Dual system (`dual_ramp_top`)

Two complete channels share the reference. Channel 0 is the master. A
`start` pulse, in the master's clock domain, starts its ramp and toggles the
Sync line. Channel 1, the slave, passes Sync through a two-flip-flop
synchroniser into its own clock and starts its ramp on every change, 3 to 4
slave clocks later.

Each channel has its own settings, so the two can run different ramps and
different division sequences. The measurement needs that, so the two loops
do not lock onto each other. With identical settings and a common reset,
the two cores would produce identical N sequences.

Ports:

| port | meaning |
|------|---------|
| `vco_clk[1:0]` | VCO signals |
| `ref_pulse` | pulse-shaped reference |
| `clk_fd` | sampling clock of the frequency detectors |
| `cfg[2]` | channel settings |
| `start` | ramp start |
| flash ports | per channel |
| `div_out` | f_v of each channel |
| `n_out` | N of each channel |
| `f_sel` | selected F of each channel |
| `ramp_busy`, `ramp_done` | ramp status |
| `q_r`, `qn_r`, `q_v`, `qn_v` | PD outputs |
| `ld1`, `ld2` | lock detects |

Reset is asynchronous and active low everywhere. The divided clocks stand
still while reset is held, so reset must be asserted with an edge.

## Sizes against the measured set-up

| item | needed | provided |
|------|--------|----------|
| division factors | 8..28 | N is 8 bits |
| ramp 4.5 → 9 GHz (÷8, 50 MHz) | F from 11.25 to 22.5 | F holds ±128 |
| 50 ms ramp at 50 MHz | 2.5·10⁶ clocks | `len` is 24 bits (16.7·10⁶) |
| flash table for that ramp | 625,001 samples | 2^20 addresses |

The workload testbench runs both full-length ramps.

## Files

`rtl/`:

| file | content |
|------|---------|
| `frac_pkg.sv` | widths, K1/K2, mode enum, settings struct, control-line struct |
| `fir_comp.sv` | input compensation FIR |
| `frac_core.sv` | four-stage fractional core |
| `lin_ramp.sv` | linear ramp unit |
| `flash_ramp.sv` | flash ramp unit |
| `frac_logic.sv` | one channel's fractional logic |
| `prescaler.sv` | ÷8 prescaler |
| `prog_divider.sv` | programmable ÷N |
| `phase_det.sv` | phase detector |
| `freq_det.sv` | frequency detector |
| `pfd.sv` | digital PFD |
| `dual_ramp_top.sv` | dual system |

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus:

| file | content |
|------|---------|
| `frac_ref_pkg.sv` | reference model |
| `flash_model.sv` | behavioural flash |
| `tb_ramp_workload.sv` | full-length ramps |

## Verification

The reference model (`frac_ref_pkg`) rebuilds FIR and core from the block
structure in 64-bit integers. It takes the FIR taps from the binomial
expansion of V(z) rather than from a table.

| testbench | what it checks |
|-----------|----------------|
| `tb_fir_comp` | taps from V(z); 2000 outputs against the expansion; DC gain K1 |
| `tb_frac_core` | cycle-exact against the model; mean 20.05 and range 18..22; other fractions, one negative; two-clock latency |
| `tb_lin_ramp` | every value, duration and `done` of 12 random ramps (up, down, sub-LSB slopes) |
| `tb_flash_ramp` | read rate and addresses; every interpolated value; 9-clock start latency; end hold |
| `tb_frac_logic` | static and linear F and every N against the model; start by Sync; flash mode; static mean |
| `tb_prescaler`, `tb_prog_divider` | exact periods, with N changing every cycle |
| `tb_phase_det` | q_r/q_v high times for nine phase lags; forcing by each control line; release |
| `tb_freq_det`, `tb_pfd` | quiet in lock; LD2 when slow, LD1 when fast, with the PD forced the right way; release after catching up |
| `tb_dual_ramp_top` | end to end at default parameters (below) |
| `tb_ramp_workload` | the full 4.5→9 GHz, 50 ms ramp (2.5·10⁶ clocks) through the linear unit and again from a 625,001-sample modulated flash table |

`tb_dual_ramp_top` closes channel 0's loop through a crude behavioural
model: the PD output is averaged per reference period, low-pass filtered,
and tunes the VCO by ±5 %. Channel 1 runs open-loop, 2 % slow. The test:

* checks channel 0's N sequence against the model;
* checks every divider period in VCO cycles against the N loaded;
* checks the static mean N and lock (no LD, `q_r` high about half the
  time);
* checks pull-in (LD1), the slow channel (LD2 with forcing), the slave's
  start by Sync, a linear ramp's mean and a flash ramp on the slave;
* counts each of these mechanisms and fails if one never happened.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops
itself through a watchdog. To run one with Verilator 5:

```
verilator --binary --timing -Wno-fatal --timescale 1ns/1ps --top-module tb_frac_core \
  -y rtl -y tb +libext+.sv rtl/frac_pkg.sv tb/frac_ref_pkg.sv tb/tb_frac_core.sv
./obj_dir/Vtb_frac_core
```

The testbenches initialise or reset everything they read (two-state
simulation). The workload testbench needs about 3 s and the dual-system one
about 2 s.

## Departures and open points

Taken from the published design:

* the structure of the core, K1 = 3/16, K2 = 1/2 and the resulting
  deviation of 4;
* the compensating input FIR;
* the undersampling by four with interpolation;
* the two ramp units;
* the ÷8 / ÷N chain clocking the logic;
* the two-flip-flop phase detector with four control lines from the
  frequency detector;
* the lock-detect meanings;
* the master/slave Sync.

This design's own choices:

| item | choice |
|------|--------|
| quantiser | rounds to nearest. This reproduces the published 18..22 range for 20.05. |
| P | an integer offset added after the core; its role is not spelt out in the source |
| FIR taps | derived here from V(z) |
| word widths | all of them |
| ramp units | the start/busy/done handshake and the F hand-over on mode changes |
| flash interface | one 40-bit word per read, three clocks to answer. The real part is a byte-wide flash, so a real board needs a wider memory or a byte-assembly stage. |
| phase detector | the cross-clearing of the two flip-flops and the meaning of the four control lines (set/clear of each flip-flop). These were chosen to match the published gain of 4 V/2π. |
| Sync | a toggle line |
| reset | asynchronous, active low |

**Frequency detector (partial).** The source describes a four-quadrant
phase follower plus a separate detector for large frequency differences,
built in a CPLD, but gives neither's internals. `freq_det` is a
cycle-slip counter with the same outputs and the same behaviour in lock. It
is clocked by an extra sampling clock the original may not have. Pull-in
speed and hysteresis will differ from the original.

Not built, because they are analog or external:

* VCOs, crystal oscillator and pulse shapers;
* the balanced subtract/low-pass/sum stage and the fifth-order loop filter;
* mixer and ADC;
* the flash chip (modelled in `tb/` only);
* the configuration EPROM and the power supply.

Also not built:

* the front-panel input and display unit, whose functions are not
  described;
* the software that turns the mixed-down signal into a frequency-deviation
  curve.

The frequency-error compensation shown in the measurements is possible
with this RTL by loading the corrected curve into the flash table.
