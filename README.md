# Block-based milli-degree phase estimator

This design measures the amplitude, frequency and phase of a sampled
sinusoid, `x[n] = A cos(2*pi*F/Fs*n + phi)`, from one block of 2400 8-bit
samples. It aims at milli-degree phase resolution. The amplitude and
frequency come cheaply from zero crossings and signal energy. Those
numbers also give a rough phase. The rough phase is then refined by
repeated least-squares corrections, computed with a CORDIC and an
IEEE 754 double-precision floating-point unit.

The architecture follows the block-based phase detection system of
*Advanced Phase Estimation and Design for Next-Generation Radar Systems: A
Digital Approach*. That source names the blocks and gives the estimation
formulas, but few implementation details. Every internal structure, number
format and handshake below is this implementation's own choice. The section
"Departures and open points" lists them.

## Processing chain

```
 adc_data ──► capture ──► sample_fifo ──► fsm_ctrl ──► sample_ram ──► block_scan
 adc_ref ──► adpll ─┘ (strobe)  (1024 x 8)  (convert to   (2400 x 8)    N_np, np[1],
                                             two's compl.)               np[N_np], CS
                                                                            │
                           cordic ──► iterative_model ◄── afp_gen ◄─────────┘
                                       ▲      │            A, F/Fs, initial phase
                           fpu_core ◄──┘      ▼
                                       phase (turns, radians), A, F
```

A `start` pulse runs one complete estimate, sequenced by `fsm_ctrl`:

| step  | what happens | cycles (M = 2400, defaults) |
|-------|--------------|-----------------------------|
| FLUSH | the FIFO is emptied, so the block holds fresh, contiguous samples | 1 |
| FILL  | the next M captured samples are moved to RAM as two's complement | about 4·M (capture is one sample per 4 clocks) |
| SCAN  | the block is read back and streamed through `block_scan` | M + 2 |
| AFP   | `afp_gen` forms A, F/Fs and the initial phase | about 170 |
| ITER  | `iterative_model` runs 4 correction passes over the block | about 4 · M · 66 |
| DONE  | `done` pulses; the results stay valid until the next `start` | 1 |

A full estimate at the default sizes takes about 646,000 clocks. Almost all
of that time goes to the iterative passes. Per sample, the CORDIC takes 31
clocks and the eleven floating-point operations take 3 clocks each.

## Number formats

- **Angles** are unsigned 32-bit fractions of a turn: 2^32 is 2π. The
  phase ramp `theta_m = phi + m·F/Fs` is then a plain 32-bit accumulation,
  and wrapping modulo 2π is automatic. One LSB is 8.4e-8 degrees.
- **Frequency** `fnorm` is F/Fs in the same 2^-32 units. That is also the
  phase advance per sample.
- **Amplitude** `amp` is unsigned Q16.16.
- **CORDIC outputs** are signed Q2.30.
- **Floating point** values are IEEE 754 binary64 bit patterns. They are
  `amp_dbl`, `freq_hz`, `phase_rad` and all internal sums of the
  refinement.

## Block measures and first estimates

`block_scan` looks at each sample `v[i]` as it streams past. A
*negative-to-positive transition* is counted at sample `i` when
`v[i-1] < 0` and `v[i] >= 0`. The scan returns four numbers:

- the number of transitions, `N_np`;
- the index of the first transition, `np[1]`;
- the index of the last transition, `np[N_np]`;
- `CS`, the sum of `v^2` over samples `0 .. np[N_np]-1`.

From these, `afp_gen` computes the following, with integer dividers and an
integer square root:

```
A      = sqrt(2 · CS / np[N_np])                 mean square of a sine is A²/2
F/Fs   = (N_np − 1) / (np[N_np] − np[1])         whole periods between first and last transition
phi0   = −1/4 turn + (F/Fs)/2 − np[1]·F/Fs       the cosine rises through zero at −90°
```

The initial phase assumes that the true upward zero crossing lies half a
sample before `np[1]`. That makes it accurate to about half a sample period
of phase. A block with fewer than two transitions has no frequency
estimate. The run then ends with `error` high and the refinement is
skipped.

## Iterative phase refinement

This is the heart of the design. For a fixed A and F, the phase is fitted
to the block by repeating

```
                 Σ sin(θm) · (v[m] − A cos(θm))
phi  ←  phi  −  ────────────────────────────────        θm = phi + m·F/Fs
                      A · Σ sin²(θm)
```

over all M samples. This is a Gauss–Newton step on the squared error
`Σ (v[m] − A cos θm)²` with phi as the only unknown. Starting within a
fraction of a sample period, it converges in two or three passes. Four
passes are run (`PASSES`).

`iterative_model` carries this out with a small micro-program that drives
`fpu_core` one operation at a time. The operands come from a 10-entry
register file of doubles, a few constants, and the integer inputs. The
micro-program has four parts:

| program | operations |
|---------|------------|
| INIT    | A and F/Fs from fixed point to double (I2F, then scale by 2^-16 or 2^-32); F in Hz = F/Fs · FS_HZ |
| SAMPLE (per sample) | sin, cos to double and scale; t = A·cos; v to double; r = v − t; S1 += sin·r; S2 += sin² |
| UPDATE (per pass)   | correction = S1 / (A·S2), converted from radians to 2^-32 turns (F2I); phi −= correction |
| FINAL   | phi to radians in (−π, π] |

For each sample, the model first reads the sample from RAM and starts the
CORDIC with the current θ. When the CORDIC is done, SAMPLE runs and θ
advances by `fnorm`. The sums are kept in double precision, while θ stays
a 32-bit integer. This makes the result exact to far better than a
milli-degree: the testbenches compare it against the same fit computed
with exact sin/cos in the simulator's double arithmetic. The two agree
to about 1e-7 degrees; the checks allow 1e-3 degrees.

What the refinement *cannot* fix is an error in the frequency estimate.
The phase is fitted with the estimated F. If F is off by δ (in units of
Fs), the fitted phase of sample 0 moves by roughly `δ·M/2` turns. Only the
phase is refined; A and F stay at their zero-crossing estimates.

A sweep over twelve blocks at the default size shows both effects. It ran
at F/Fs from 0.0009 to 0.2 and amplitudes from 20 to 127 LSB, with the
frequency changed between blocks.

- The initial phase was 0.02° to 21° away from the best fit.
- After four passes, every result was within 1.2e-7° of the best fit.
- Distance from the true phase of the noise-free input:
  - 0.05° to 0.62° for periods of 70 samples or longer;
  - 0.7° to 7° for periods from 32 down to 5 samples.

At short periods, a one-sample uncertainty in the transition span is a
large relative frequency error.

## Floating-point unit

`fpu_core` implements ADD, SUB, MUL, DIV, I2F (signed 64-bit integer to
double) and F2I (double to signed 64-bit integer, truncated) for binary64,
with round-to-nearest-even.

- **Add/subtract** aligns the smaller operand, using guard, round and
  sticky bits. It renormalises the result with a leading-zero count.
- **Multiply** forms the full 106-bit product in one cycle.
- **Divide** is a restoring divider that produces one quotient bit per
  clock.

Latency is 2 cycles from `start` to `done`, and 59 cycles for DIV. Some
cases are simplified:

- subnormal inputs are treated as zero, and subnormal results are flushed
  to zero;
- overflow gives infinity;
- NaN and infinity inputs are not handled specially.

The refinement never produces values in those ranges. Against the
simulator's doubles, add, sub, mul, div and the conversions are
bit-exact.

## Capture: ADPLL, FIFO and controller

All logic runs on one clock `clk`. The converter delivers one sample every
four clocks, with a frame reference `adc_ref` that rises at each new
sample.

- **`adpll`** is an all-digital PLL without a loop controller. Its
  oscillator is a 4-position one-hot ring counter, so it divides the clock
  by four. A phase detector checks, at every reference edge, that the ring
  is at its last position. If not, it moves the ring straight to the right
  phase: there is no loop filter. The adpll pulses `slip` on such a move,
  and drops `locked`. `locked` rises again after four aligned edges. The
  capture strobe `tick` fires at ring position 2, mid-frame, when the data
  is stable. `pll_clk_div` is the divided clock.
- **`sample_fifo`** has 1024 entries of 8 bits. A sample is written when
  `capture_en` is high, the ADPLL is locked and the strobe fires. Capture
  continues between blocks, so the FIFO fills up while the estimator is
  busy. Samples that arrive while it is full are dropped, and
  `fifo_overflow` is raised. This is expected. The flush at the next
  `start` clears it.
- **`fsm_ctrl`** converts each sample from offset binary to two's
  complement (inverting the top bit) as it writes the sample to RAM.
- **`sample_ram`** is a simple dual-port memory with a registered read.
  It maps onto FPGA block RAM. `fsm_ctrl` owns the read port during SCAN
  and `iterative_model` owns it otherwise.

## Top-level interface (`phase_estimator_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `adc_data` | in | 8 | converter sample, offset binary |
| `adc_ref` | in | 1 | converter frame reference, one rising edge per sample |
| `capture_en` | in | 1 | allow capture into the FIFO |
| `start` | in | 1 | pulse: run one estimate |
| `busy`, `done`, `error` | out | 1 | running; end-of-run pulse; fewer than two transitions found |
| `pll_locked`, `pll_slip`, `pll_clk_div` | out | 1 | ADPLL status and divided clock |
| `fifo_overflow`, `fifo_level` | out | 1, 11 | sticky overflow since the last flush; fill level |
| `n_np`, `np_first`, `np_last` | out | 15 | block measures |
| `cs_last` | out | 32 | energy before the last transition |
| `amp`, `fnorm`, `phi0` | out | 32 | first estimates (Q16.16, 2^-32, 2^-32 turns) |
| `phase` | out | 32 | refined phase of sample 0 of the block, 2^-32 turns |
| `phase_rad`, `amp_dbl`, `freq_hz` | out | 64 | doubles: phase in radians, A, F in Hz |
| `last_correction`, `passes` | out | 32, 8 | size of the last correction (2^-32 turns); passes run |

The phase refers to the first sample of the block, which is the first
sample captured after `start`.

Parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `M` | 2400 | samples per block |
| `FIFO_DEPTH` | 1024 | FIFO entries (power of two) |
| `CLK_DIV` | 4 | clocks per captured sample |
| `PASSES` | 4 | refinement passes |
| `CORDIC_STEPS` | 30 | CORDIC micro-rotations (at most 30) |
| `FS_HZ` | 375e6 | captured sample rate, used only to express F in Hz |

## Departures and open points

- **Formulas taken as given.** The amplitude, frequency and phase-update
  formulas, the block size, the sample width, the FIFO depth and the
  divide-by-four clocking follow the source. The amplitude formula is used
  in the form `A = sqrt(2·CS/np[N_np])`, which follows from the energy
  balance the source states.
- **Rules chosen here** (the source gives none):
  - the initial-phase rule;
  - the number of refinement passes;
  - all fixed-point formats;
  - the FPU's internals and its simplified special cases;
  - the CORDIC architecture;
  - the ADPLL's lock and phase-reset rules;
  - the FIFO flush and overflow policy;
  - the sequencing of all stages by one controller.
- **Where the format conversion happens.** The source gives the
  offset-binary to two's-complement conversion to the block scan. Its data
  flow, though, runs FIFO → RAM → block scan. Here the conversion is done
  by the controller as it writes the RAM, so the RAM already holds two's
  complement, and the scan reads it from there.
- **One clock domain.** The source speaks of a GHz sample stream and a
  375 MHz processing clock obtained by dividing the clock down. This
  design reads that division as a divide-by-four. Here one clock drives
  everything, and the ADPLL yields a clock enable for capture, not a
  second clock.
- **Block scan without arrays.** The source's block scan keeps arrays
  (samples, running sums, per-sample angles, sines and cosines). Here the
  measures are accumulated on the fly, and sin/cos are recomputed in each
  pass instead of being stored.
- **No timing closure.** The FPU's single-cycle 53×53 multiply and wide
  adders would need pipelining to reach 375 MHz. No FPGA implementation
  results are reproduced.
- **Frequency is not refined.** As described above, the final phase
  accuracy is limited by the zero-crossing frequency estimate, not by the
  arithmetic.

## Files

`rtl/` holds one module or package per file:

- `pe_pkg.sv`: shared constants, the FPU operation type, double constants
  and the CORDIC arctangent table. The table entries are
  `round(atan(2^-i)/(2π)·2^32)`, and the gain is
  `Π 1/sqrt(1+2^-2i) · 2^30`.
- `phase_estimator_top.sv`, `adpll.sv`, `sample_fifo.sv`, `sample_ram.sv`,
  `fsm_ctrl.sv`, `block_scan.sv`, `afp_gen.sv`, `cordic.sv`, `fpu_core.sv`,
  `iterative_model.sv`.
- `seq_div.sv` and `seq_isqrt.sv`: sequential divider and square root used
  by `afp_gen`.

`tb/` holds one self-checking testbench per block, `tb_<module>.sv`. Each
one prints `TB_RESULT checks=<n> failures=<n>` and stops on a watchdog if
it hangs. `tb_phase_estimator_top` runs the whole design at its default
parameters. It checks:

- four estimates, including the source's waveform (amplitude 100, a
  period of about 1000 samples) and a constant input that must end in
  `error`;
- the block measures and first estimates against recomputation;
- the refined phase against an exact least-squares fit;
- the cycle budget;
- that ADPLL slip and lock, FIFO flush, FIFO overflow and waiting for
  samples each happened at least once.

It takes about 10 s of simulation.

`tb_freq_sweep` also runs the whole design at its defaults. It runs the
twelve-block frequency and amplitude sweep described above and prints, for
each block, the initial error, the refined error and the distance to the
true phase. It takes about 7 s.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pe_pkg.sv tb/tb_phase_estimator_top.sv --top-module tb_phase_estimator_top -o sim
./obj_dir/sim
```

Any other testbench is built the same way: replace the file and top-module
name. Only the two whole-design testbenches, `tb_phase_estimator_top` and
`tb_freq_sweep`, look inside the design. They watch the FIFO flush and
write strobe to learn which converter sample started the block.
