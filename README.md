# Neural synchrony processor with phase-locked stimulation

This is the digital core of a 16-channel implantable neuromodulation chip.
It measures how strongly oscillations in two brain regions move together.
From that it decides, sample by sample, when to fire a 4-channel current
stimulator. Stimulation can be locked to:

- a particular oscillation phase (for example the peak of the theta wave),
- an envelope level,
- a windowed synchrony measure: the phase locking value (PLV), phase-amplitude
  coupling (PAC) or spectral energy (SE),
- a combination of a phase crossing and a synchrony window,
- a random phase, to break up synchrony.

Phase has to be computed for every channel at 1 kS/s on a power budget of a
few microwatts. The core does this without CORDIC iterations. A *lightweight
phase extractor* (LPE) uses one reciprocal lookup, one multiply, a straight-line
approximation of the arctangent and a small correction table.

Everything analog stays outside this RTL. That covers the chopper LNAs, the
16:1 analog multiplexer with its integrator, the 10-bit SAR ADC, the
high-voltage output stages, the charge pump, the level shifters and the
charge-balancing comparators and DACs. Their digital controls are ports of
`nsp_top`.

## Signal flow

```
 ADC (10b, 64 kS/s) ─► channel_sequencer ─► threefold_fir ─► sync_extractor ──► stim_controller ─► pulse_gen ─► POS/NEG/CB/PAS, EN_CP
   ▲ mux_sel, adc_start   16 slots x 4 kS/s   decimate x4,     lpe: phase (F_SMP)      ▲   ▲           rate limit,
   └──────────────────────  user order         bandpass,        linf_norm: envelope     │   │           biphasic timing
                                               Hilbert          PLV/PAC x8, SE x16 (F_WIN)
                                               (one shared MAC)                  threshold_mem  prbs10
```

| Module | Role |
|---|---|
| `nsp_pkg` | widths, enums (`stim_mode_e`, `feat_kind_e`), config structs, table generators |
| `channel_sequencer` | 16 slots of 125 clocks; slot *s* reads the LNA in entry *s* of an order table, starts the ADC and tags the result |
| `fir_coef_mem` | 208 × 16-bit programmable coefficients |
| `threefold_fir` | one multiply-accumulate unit shared by a decimate-by-4 low-pass, a bandpass and a Hilbert filter across all slots |
| `lpe` | phase atan2(Im, Re)/π as a 10-bit number in [-1, 1) |
| `linf_norm` | max(\|x\|, \|y\|), used as the amplitude of a complex value |
| `sincos_lut` | sin and cos of a 10-bit phase |
| `sync_extractor` | per-slot phase and envelope; windowed PLV/PAC for 8 channel pairs; SE for 16 slots |
| `threshold_mem` | TH_SMP, TH_WIN,H, TH_WIN,L |
| `prbs10` | 10-bit LFSR, x^10 + x^7 + 1, used as a random phase threshold |
| `stim_controller` | threshold-crossing detector and the three stimulation modes; produces EN_STIM |
| `pulse_gen` | POS → NEG → CB → PAS event timing for 4 channels, charge-pump enable, maximum-rate limit |
| `nsp_top` | wiring plus a write-only configuration register bus |

## Timing and rates

The design assumes an 8 MHz clock. The source material gives no clock
frequency; 8 MHz makes all of the rates below come out as whole numbers of
clocks.

- **ADC slots**: 16 slots × 125 clocks = 2000 clocks. Every slot is therefore
  sampled at 4 kS/s.
- **FIR jobs**: every 4th sample of a slot starts one FIR job of 16 + 64 + 32 =
  112 clocks, so each slot yields one analytic sample (Re, Im) per millisecond.
  Jobs are not queued, so a job must finish within one slot. A lost job sets
  the sticky `fir_overrun` flag, and an assertion reports it in simulation.
- **Phase**: the LPE output is registered, with one clock of latency. Phase and
  envelope of the slot are updated at once.
- **Frame**: after slot 15 the `frame` strobe marks the 1 kHz frame. Over the
  next 8 clocks the feature engine adds one PLV/PAC term per feature.
- **Window**: every 2^`win_log2` frames (256, 512 or 1024 → 3.9, 2.0 or 1.0 Hz)
  the windowed features are normalised and latched, and `win_valid` pulses.
- **Stimulator**: works in 10 µs ticks (80 clocks). A pulse width of 10 gives a
  100 µs phase.

## The lightweight phase extractor

The part that takes the most care is `lpe`. Its steps are:

1. **Range reduction.** The sign bits and magnitudes of Re and Im are taken, and
   a comparator decides whether |Im| > |Re|. The smaller magnitude becomes the
   numerator and the larger the denominator, so the angle of the ratio lies in
   [0, π/4]. The diagonals split the plane into four sectors: I around +Re, II
   around +Im, III around −Re and IV around −Im.
2. **Normalisation.** A leading-zero count shifts the denominator left until
   its top bit is set. The numerator is shifted by the same amount, so the ratio
   keeps full precision for small signals.
3. **Ratio.** A reciprocal table is indexed by the 8 bits below the leading
   one, with entries taken at the bin centre. One multiply then gives
   r = num/den in [0, 1], with 14 fraction bits.
4. **Interpolation and error table.** Over [0, 1], atan(r)/π is close to the
   straight line r/4, and exact at both ends. A 128-entry table indexed by r adds
   the difference atan(r)/π − r/4. That difference is never negative and peaks
   at about 0.023, which is 12 output LSBs.
5. **Range reconstruction.** The sector sets an offset and the sign of the
   fraction:

   | sector | phase/π |
   |---|---|
   | I | 0 + Im/(4Re) |
   | II | 1/2 − Re/(4Im) |
   | III | sign(Im) + Im/(4Re) |
   | IV | −1/2 − Re/(4Im) |

   The sum is rounded to 10 bits. A result of +1 wraps to −1, the same angle.

An exhaustive test applies all 2^20 pairs of 10-bit inputs. The worst error
against a floating-point atan2 is 0.80 LSB (π/512 rad per LSB). The two tables
are computed at elaboration from the formulas above. The parameters `RB`,
`EB`, `RW` and `FR` set their size and precision.

## Synchrony features

Each frame, a feature *f* with channels (a, b) adds one unit vector to a
running sum:

- **PLV**: e^{j(θa − θb)}.
- **PAC**: A_b · e^{jθa}, where A_b is the envelope of slot b, normalised so
  that 512 means full scale.

All features share one sin/cos table and two multipliers. At the end of the
window, the magnitude of the summed vector is taken as the l∞ norm
max(|Σcos|, |Σsin|) rather than the Euclidean length. This reads up to 1/√2 low
on the diagonals, which is the price of dropping the square root. The result
is then divided by the window length.

Output scaling:

- Features and SE are 10-bit unsigned numbers in which 1024 stands for 1.0.
  Values saturate at 1023.
- SE is mean(Re²) divided by full-scale², where full-scale² is 512².
- The per-sample envelope is max(|Re|, |Im|). It is also an l∞ norm.

PAC needs the phase of a low band and the envelope of a high band from one
electrode. To get both:

1. Enter that electrode in two slots of the order table.
2. Give each of those slots its own coefficient set. There are two sets, each
   with its own bandpass and Hilbert taps.

## Phase-locking detector and modes

`stim_controller` is evaluated on every frame.

- **Per-sample feature (F_SMP)**: the phase or the envelope of any slot,
  selected by `fsmp` = 0..15 or 16..31.
- **Per-sample comparison**: F_SMP is compared with TH_SMP, or with the PRBS
  value when `th_prbs` is set. Phases compare as signed numbers and envelopes
  as unsigned.
- **Crossing detection**: the comparison is delayed by one sample, and a hit is
  its rising edge. The stimulator fires once per upward crossing. When the
  phase wraps from +π to −π the comparison falls instead, so a wrap can never
  fire.
- **Windowed feature (F_WIN)**: one of the 8 PLV/PAC values or one of the 16
  SE values, selected by `fwin` = 0..7 or 8..23. It passes when
  TH_WIN,L < F_WIN < TH_WIN,H.

| `mode` | fires on |
|---|---|
| 0 off | never |
| 1 F_SMP-locked | each crossing |
| 2 F_WIN-locked | each frame while F_WIN is inside the window |
| 3 F_SMP&F_WIN-locked | each crossing while F_WIN is inside the window |

To lock to 180°, set TH_SMP just below +1, for example 507. Code +512 cannot be
represented, because it is the same angle as −512. In randomized mode the PRBS
advances after every stimulus, so each event aims at a new random phase.

EN_STIM is a one-clock request. `pulse_gen` accepts it only when it is idle and
at least ceil(100 000 / FREQ) ticks have passed since the last accepted event.
FREQ is therefore the maximum stimulation rate in Hz: with FREQ = 6, events
are at least 166.7 ms apart. An accepted event lasts:

- POS for PW ticks,
- NEG for PW ticks,
- CB for 20 ticks (active charge balancing),
- PAS for 100 ticks (passive discharge).

The channels in `stim_on` take part. EN_CP is high during POS and NEG.

## Configuration registers (`nsp_top`)

Writes are single-clock (`cfg_we`, 12-bit address, 16-bit data).

| address | contents |
|---|---|
| 0x800-0x80F | decimation taps (Q1.15) |
| 0x810-0x84F / 0x850-0x86F | set 0 bandpass / Hilbert taps |
| 0x870-0x8AF / 0x8B0-0x8CF | set 1 bandpass / Hilbert taps |

(With other filter lengths the coefficient words stay packed in the same
order from 0x800: N_DEC, then N_BPF + N_HT per set, up to 2048 words.)
| 0x100-0x10F | slot order: LNA read in slot *s* |
| 0x110-0x11F | coefficient set of slot *s* |
| 0x120-0x127 | feature *f*: {kind (1 = PAC), ch_a, ch_b} in bits [8:0] |
| 0x130 | window length 2^n frames (reset 8) |
| 0x140-0x142 | TH_SMP, TH_WIN,H, TH_WIN,L |
| 0x150 | {mode[1:0], th_prbs, fsmp[4:0], fwin[4:0]} |
| 0x151 | {stim_on[3:0], pw[5:0]} |
| 0x152 | maximum stimulation rate in Hz |
| 0x160 | run |

After reset the FIR spends 1024 clocks clearing its delay lines. The
coefficients reset to zero, so the software must load them before setting
`run`. The Hilbert filter is expected to be odd-length (31 taps), centred on
tap 15, with tap 31 zero. Re is the bandpass output delayed by `HT_DELAY` = 15
samples, so Re and Im line up.

## How far to trust it, and where it departs from the source design

These parts follow the source design:

- the block structure,
- the LPE algorithm with its sector table and 10-bit widths,
- the decimate-by-4 / bandpass / Hilbert chain on one shared MAC,
- the l∞ approximations,
- the F_SMP/F_WIN selectors and the one-sample-delay crossing detector,
- the three modes and the 10-bit PRBS threshold,
- the pulse generator's interface: STIM_on 4 bits, PW 6 bits, FREQ 8 bits,
  outputs POS, NEG, CB, PAS and EN_CP.

These are this design's own choices, because the source gives no detail on them:

- the clock frequency and the register map,
- tap counts (16/64/32), internal widths and table sizes,
- power-of-two window lengths,
- SE defined as the mean of Re²,
- two coefficient sets for PAC,
- the PRBS polynomial and when it advances,
- the in-band reading of the two windowed thresholds,
- the tick unit, the CB/PAS durations, and FREQ used as a rate limit,
- the ADC's offset-binary output code.

Known limitation: the default filters are too short for the theta band (4-8 Hz).

- A bandpass and Hilbert pair that isolates 4-8 Hz at 1 kS/s needs a few hundred
  taps.
- The defaults work for bands of roughly 50 Hz and up. The end-to-end test uses
  100 Hz tones.
- `N_BPF` and `N_HT` can be raised. A longer job then needs a larger
  `SLOT_CYCLES`, that is, a faster clock for the same 4 kS/s.
- `tb_theta_workload` shows such a build: a 256-tap bandpass and a 511-tap
  Hilbert filter, with `SLOT_CYCLES = 800` (51.2 MHz) and `TICK_DIV = 512`.
  Its stimuli land within 0.03 rad of 180° of a 7 Hz theta wave, taking
  the phase the wave had one filter group delay before each stimulus.
  The price is a group delay of about 384 ms, so the phase the detector acts
  on is one the electrode showed about 2.7 theta cycles earlier. That is fine
  for a steady rhythm and useless for a drifting one.

## Simulation

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and contains a watchdog. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/nsp_pkg.sv tb/tb_nsp_top.sv --top tb_nsp_top -o sim
./obj_dir/sim
```

The testbenches check these things:

- `tb_lpe`: all 2^20 input pairs against atan2, within 1 LSB, plus the latency.
- `tb_threefold_fir`: random coefficients and samples on 4 slots, compared
  bit-exactly with an integer model of the three filters. It also checks the
  112-clock job latency and the overrun flag.
- `tb_sync_extractor`: analytic tones on 16 slots. Phase must be within 1 LSB.
  PLV/PAC are compared with a floating-point mean vector, within 8/1024. SE is
  compared bit-exactly.
- `tb_nsp_top`: runs at the default parameters with a behavioural ADC for
  about 600 ms of chip time, in a few seconds of simulation. It programs real
  filters and walks through every mode. It checks relative phase, PLV, pulse
  widths, that no stimulus happens outside the window, and that no FIR overrun
  occurs. It counts each of these mechanisms:
  - F_SMP-locked, F_WIN-locked, combined and randomized stimuli,
  - amplitude-locked stimuli (envelope crossing after an amplitude step),
  - SE-locked stimuli, with an SE window that first blocks and then passes,
  - triggers dropped by the rate limit,
  - phase wraps that did not fire,
  - window updates,
  - CB/PAS windows,
  - use of the second coefficient set.
- `tb_theta_workload`: the theta build above, for 2.7 s of chip time, in
  about 90 s of simulation. LNA 0 carries a 7 Hz wave plus a 60 Hz interferer.
  With TH_SMP = 500/512 and a 6 Hz limit, every stimulus is checked against
  the true phase of the input, moved back by the filters' group delay. Then
  the PLV(0,1) gate (a locked pair) lets stimuli through and the PLV(0,2)
  gate (a 4 Hz channel) blocks them. It also checks that a 40 Hz-only
  channel is rejected, that intervals are at least 1/6 s, and that wraps
  never fire.
- The remaining testbenches check their block directly: pulse timing and the
  rate limit, sequencer order and slot rate, every sin/cos code, the PRBS period
  of 1023, and the register files.
