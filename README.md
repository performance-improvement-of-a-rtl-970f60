# Three-comparator binary DPLL with aided acquisition

A binary quantized digital phase-locked loop has two jobs that pull against
each other. To reject noise it should make small, rare phase corrections. To
acquire quickly it should make large, frequent ones. This loop does both. It
notices on its own whether it is still acquiring or already tracking, and it
picks the size of each correction to match.

The loop locks the rising edge of its output (frequency f0) to the positive
zero crossings of a noisy sine wave whose frequency is known and whose phase
is not. The output phase only moves in steps: there are 2m phase states per
cycle, so one step is Delta = pi/m (5.625 degrees for m = 32). Per set of
samples, the loop looks at the signs of three samples of the input, taken
around the output's rising edge:

* **A** is taken at the nominal instant, the output's rising edge. Its sign
  says whether the output lags or leads. As in a conventional
  first-order binary loop, it drives a random-walk filter. After N more
  votes in one direction than the other, the filter requests one
  correction.
* **B** and **C** are taken l steps after and l steps before A. If the
  input's zero crossing lies between them, then B is positive and C is
  negative, so D = B' - C' = +2. Otherwise D is 0 or -2. So D tells whether the
  phase error is within +/- l*Delta: the loop is tracking.

D is accumulated into E between corrections. When the filter requests a
correction, a comparator checks E against a threshold TH. If E >= TH, the
loop is tracking and corrects by Delta. If E < TH, the loop is acquiring and
corrects by n*Delta. Without noise, the worst steady-state error is Delta.
Acquisition runs about n times faster than a conventional loop with the
same filter.

The design follows the 3PDPLL of J.-P. Sandoz and W. Steenaart, "Performance
improvement of a binary quantized all-digital phase-locked loop with a new
aided-acquisition technique". Where that description leaves something open,
the choices made here are listed under *Departures and choices* below.

## Structure

```
                 +--------------- phase_detector ----------------+
 u_i --> hard_limiter --u_o--> [C at T_C] [A at T_A] [B at T_B]  |
                 |                          |      D = B' - C'   |
                 +--------------------------|-----------|--------+
                                            | A'        | D
                                            v           v
                                random_walk_filter   d_accumulator (E)
                                  |  advance/retard      |   ^ clear
                                  +----------+-----------|---+
                                             v           v
                                          decision_block (E >= TH ?)
                                             |  cmd {valid, advance, big}
                 +---------------------------v------ digital_clock -----+
 clk (2m*f0) --> | digital_phase_shifter --inc--> phase_divider --phase--+--> out_sig (f0)
                 |                                      |               |
                 |                               sample_timing ---------+--> T_C, T_A, T_B
                 +------------------------------------------------------+
```

| Module | Role |
|---|---|
| `dpll_pkg` | step command struct `step_cmd_t {valid, advance, big}` and the D type |
| `hard_limiter` | behavioural model of the analogue input comparator (real input) |
| `phase_detector` | three sample flip-flops at T_C, T_A, T_B; outputs A', B', C', D |
| `random_walk_filter` | (2N+1)-state up/down counter; Advance at 2N, Retard at 0, then back to N |
| `d_accumulator` | E: running sum of D/2 since the last correction, saturating at +/-EMAX |
| `decision_block` | digital comparator: E >= TH gives a small step, otherwise a large one |
| `digital_phase_shifter` | adds (advance) or deletes (retard) 1 or n oscillator pulses |
| `phase_divider` | divide-by-2m counter: output phase in steps, output signal |
| `sample_timing` | decodes the phase into strobes T_C, T_A, T_B, one set every K cycles |
| `digital_clock` | shifter + divider + strobe decoder: the controlled oscillator |
| `dpll3pd_core` | the complete synthesizable loop, input = comparator output `u_o` |
| `dpll3pd_top` | hard limiter + core: the loop with its analogue input `u_i` |

The only clock is the stable oscillator at 2m*f0, input `clk`. Reset `rst_n`
is asynchronous and active low. Everything is synthesizable except
`hard_limiter`, which stands for the analogue comparator. For an ASIC or
FPGA, use `dpll3pd_core` and drive `u_o` from the comparator through a
synchronizer. At the default sizes the core synthesizes to about 95
word-level cells and 34 flip-flops: the loop really is small hardware.

## Phase conventions

Everything hangs on these conventions, so they are spelled out:

* `phase` (0..2m-1) is the output phase theta_o in units of Delta. The output
  signal is high for phase 0..m-1, so its rising edge is at phase 0.
* The phase error is err = theta_i - theta_o. Sample A is the input at phase
  0, i.e. sin(err). So A' = +1 means the input's zero crossing has already
  passed: the output lags.
* The filter counts **up** on A' = +1. Reaching 2N means *advance*: the phase
  shifter inserts pulses, the divider runs ahead, and err shrinks.
* B is at phase l and equals sin(err + l*Delta). C is at phase 2m - l of the
  previous cycle and equals sin(err - l*Delta). D = +2 exactly when
  -l*Delta < err < l*Delta (modulo 2*pi).

## The acquisition/tracking decision

This is the part of the loop that is new compared with a conventional
binary DPLL.

* E is cleared by every correction. It therefore describes only the N or
  more sets that led to the current correction.
* Each set adds +1 (D = +2), 0 or -1 (D = -2). A set's D and A' arrive
  together: the filter and the accumulator update in the same clock, and the
  decision reads the E that already includes the set that triggered the
  filter.
* The default threshold is TH = 2. For the noise-free loop, this means the
  error must have been inside the +/- l window for at least two more sets
  than it was within l steps of the opposite, negative-going crossing
  (D = -2). Only then does the loop use a small
  step. The same rule holds under noise: a small step needs the sets with
  D = +2 to outnumber those with D = -2 by at least TH since the last
  correction.
* When the input frequency is off, the loop uses large steps to keep up. The
  locking range is +/- n/(2mNk) * f0: one n*Delta step every N sets, which is
  n/(mNk) * f0 in total width.

## Timing

| Event | Clock (2m*f0) |
|---|---|
| T_C | phase 2m - l of the cycle before a sampled cycle |
| T_A | phase 0 |
| T_B | phase l |
| `set_valid` | 1 clock after T_B |
| filter state, E updated; `advance`/`retard` pulse | 2 clocks after T_B |
| step command `cmd` | 3 clocks after T_B |
| correction carried out | over the next 1 or n clocks, one pulse each |

A correction ends about l + 3 + n clocks into the cycle, long before the next
T_C at 2m - l, so no sample ever sees a half-done correction. This needs
2l + n + 4 < 2m, which holds for every configuration below. The strobe
decoder still handles a skipped phase value (the strobe fires one clock late)
and a held one (the strobe fires once).

One set is taken every K output cycles. One correction needs at least N sets.
Without noise, the mean acquisition time is therefore about K*T*N*m/(2n).

## Parameters

Top-level parameters of `dpll3pd_top` and their defaults:

| Parameter | Default | Meaning |
|---|---|---|
| `M` | 32 | m; 2m phase states per output cycle, Delta = pi/m |
| `L` | 2 | l; spacing of B and C from A, in steps |
| `N` | 6 | filter of 2N+1 states |
| `TH` | 2 | threshold on E (units of D/2) |
| `NRATIO` | 3 | n; large step = n*Delta |
| `K` | 1 | one set of samples every K output cycles |
| `EMAX` | N | saturation of E |

The defaults are configuration "c" of the published evaluation. The other
configurations it evaluates are parameter settings of the same RTL:
"a", the conventional single-comparator loop, is N=5, NRATIO=1; "b" and
"d" are N=6, TH=2, L=2 with NRATIO=2 and 4. The published parameter ranges
are N <= 8, n < 5, l < 4 and 1 <= Th <= N-2.

## Measured behaviour

The behaviour is noise-free, k = 1 unless stated, and measured by `tb/dpll3pd_cases_tb.sv`
over 64 equally spaced initial errors. The mean acquisition time runs until
|err| <= Delta, in output cycles T. The published closed-form estimates are
N*m/(2n) and Delta/sqrt(3).

| Case | N | n | Mean acquisition (sim) | Estimate | RMS error (sim) | Published |
|---|---|---|---|---|---|---|
| a | 5 | 1 | 78.6 T | 80 T | 3.25 deg | 3.25 deg |
| b | 6 | 2 | 49.1 T | 48 T | 3.25 deg | 3.25 deg |
| c | 6 | 3 | 34.1 T | 32 T | 3.25 deg | 3.25 deg |
| d | 6 | 4 | 28.1 T | 24 T | 3.24 deg | 3.25 deg |
| c with k = 2 | 6 | 3 | 67.1 T | 64 T | 3.25 deg | - |

For each case the same testbench also checks the locking range. The loop
must hold lock at 0.8 of the one-sided limit n/(2mNk)*f0 and must lose it at
1.3 of it.

`tb/dpll3pd_snr_tb.sv` adds narrowband Gaussian noise. The noise is held
constant within a set and is independent from set to set, which is the
noise model the analysis assumes. The measured mean acquisition time is in
sets; the RMS error is in degrees:

| SNR | a | b | c | d | RMS a | RMS b | RMS c | RMS d |
|---|---|---|---|---|---|---|---|---|
| -10 dB | 436 | 261 | 233 | 218 | 9.2 | 9.2 | 12.2 | 15.3 |
| -5 dB | 238 | 185 | 154 | 122 | 6.3 | 7.7 | 8.8 | 10.8 |
| 0 dB | 155 | 117 | 95 | 85 | 5.2 | 5.3 | 6.5 | 6.8 |
| +5 dB | 111 | 77 | 63 | 51 | 4.4 | 4.2 | 4.3 | 4.3 |
| +10 dB | 87 | 63 | 44 | 36 | 3.5 | 3.2 | 3.3 | 3.5 |
| +15 dB | 81 | 54 | 39 | 31 | 3.0 | 2.9 | 2.9 | 2.9 |

The numbers vary slightly from run to run, because the noise comes from
`$urandom`. The trends match the published ones:

* Case b acquires 20 to 30 % faster than the conventional loop and has
  nearly its RMS error. The gap is largest at -5 dB, about 20 % here.
* From +5 dB up, cases c and d acquire about 40 to 60 % faster, with
  practically the same noise rejection.
* At low SNR, the larger n costs RMS error.
* The combined figure of merit Q = phi_RMS * sqrt(T_m/kT) weighs noise
  rejection against speed, and smaller is better. From +5 dB up, every
  3-comparator configuration has a lower Q than the conventional loop. At
  +15 dB, for example, 10 log Q is -3.3 for a and -5.6 for d, with phi in
  radians and T_m in sets.

## Departures and choices

* **Unit of E.** The hardware sketch in the original description counts D
  with a reversible counter that steps at both T_B and T_C. That counter
  moves by +/-2 per set. Here E moves by D/2 per set, in the units of the
  published state model. In that model the threshold "Th 1" lies between
  E = 0 and E = 1, and E has as many rows as the filter has states. TH is
  therefore in D/2 units, with E >= TH meaning tracking. EMAX = N is taken
  from the same model.
  Read the other way, with E in units of D, the threshold would be half as
  high. Simulated like that, configuration d acquires more slowly than c
  below 0 dB SNR. That is the opposite of the published ordering, so this
  reading was rejected.
* **How D is formed.** Here D comes from three sample flip-flops and a
  decoder. The original's gate-level sketch uses a latch, an XOR and two extra
  timing signals (T_D, T_R); that sketch is not reproduced.
* **Counter resets.** The filter and E reset on the filter's own
  Advance/Retard pulse, as in the block diagram, not at a separate reset time
  T_R.
* **Phase shifter.** It is built as a pulse adder/deleter, one pulse per
  clock. The description names the block but not its circuit.
* **Hard limiter.** Its switching point is 0, and an input of exactly 0 reads
  as negative.
* **Incomplete sets.** The first set after reset lacks T_C or T_A, so it is
  dropped.
* **Not modelled.** The stable oscillator is the `clk` input. The
  performance criterion Q is a figure of merit, not hardware. The SNR
  testbench computes it from the measured RMS error and acquisition time.

## Simulating

All files are plain SystemVerilog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dpll_pkg.sv tb/dpll3pd_top_tb.sv --top-module dpll3pd_top_tb
./obj_dir/Vdpll3pd_top_tb
```

Replace the testbench name to run another. Every testbench prints
`TB_RESULT checks=<n> failures=<n>` and stops on its own, and each has a
watchdog.

| Testbench | What it shows |
|---|---|
| `dpll3pd_top_tb` | default configuration end to end: noise-free acquisition from 5 initial errors (large steps T' = N*k*T apart, then small steps, error within +/- Delta; every set is one of the six sign patterns a clean sine can give, with the right D, and all six occur), lock at 10 dB SNR, tracking a 0.5 % frequency offset; checks each step command against a reference model of filter, E and decision; checks that advance, retard, large and small steps, the acquisition-to-tracking switch, E saturation and filter reset all occur |
| `dpll3pd_cases_tb` | configurations a-d, and c with k = 2, side by side: acquisition time, RMS error, locking range |
| `dpll3pd_snr_tb` | configurations a-d from -10 to +15 dB SNR: acquisition time, RMS error, Q (about 20 s) |
| `<block>_tb` | one per block, against an independent model of that block |

`tb/dpll_case_runner.sv` and `tb/dpll_noise_runner.sv` are helpers that run
one configuration with and without noise. Use them to try other parameter
sets. For example, to see the effect of TH or L, instantiate a runner with
other values and compare mean acquisition time and RMS error.
