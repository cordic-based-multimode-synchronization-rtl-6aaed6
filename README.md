# Multimode OFDM synchronizer for IEEE 802.11a/g and IEEE 802.16d

An OFDM receiver has to find where a frame begins, remove the carrier frequency
offset (CFO) between transmitter and receiver oscillators, and place the FFT
window on each symbol. This RTL does these jobs for two standards with one
datapath: IEEE 802.11a/g WLAN (64-point FFT) and IEEE 802.16d fixed WiMAX
(256-point FFT). A single `mode` input selects the standard.

The main idea is hardware sharing around one **modified CORDIC**. The same ten
CORDIC stages first measure the angle of a correlation result (vectoring mode),
which gives the fractional CFO. They then rotate every received sample back by an
accumulated phase (rotation mode), which removes the CFO. When the 802.16d integral
CFO is known, its phase step goes into the same accumulator and the same CORDIC
removes it too. No sine/cosine table and no complex multiplier are needed for the
compensation.

The design follows the architecture in the master's thesis *CORDIC Based Multimode
Synchronization Circuit Design for IEEE 802.16d and 802.11a/g systems* (S.-H. Yang,
National Chiao Tung University, 2008). The algorithms, delays, window lengths, CORDIC
rotation sequences, the a + b/4 magnitude rule, the sign-only matched filters and
the ten-sample earlier-path search come from that work. Word widths, control
sequencing, search-window lengths and the interfaces are choices made for this RTL.
Each is listed in [Departures and own choices](#departures-and-own-choices).

## Signal flow

```
            +--------------+  Max_c   +-----------------------------+
 in ------->| frame_detect |--------->| frac_cfo                    |
   |        +--------------+          |  estimate: Max_c -> CORDIC  |
   |                                  |  theta -> step = -theta/D   |
   |        +---------------+ replay  |  compensate: sample, phase |----> out (corrected,
   +------->| sample_buffer |-------->|  -> CORDIC (rotate by -phase)|      out_idx)
            | 256 x 24 bit  |         |  phase_acc, cordic_unit     |
            +---------------+         +-----------------------------+
                                          ^ integral step   |
                                          |                 v
                                 +----------------+   +-----------+
                                 | int_cfo        |<--| corrected |
                                 | (802.16d only) |   | stream    |
                                 +----------------+   +-----------+
                                                            |
                                                      +-----------+
                                                      | sbd       |--> boundary_idx
                                                      +-----------+
                                                            |
                                                      +--------------+
                                                      | fft_position |--> fft_out (to FFT,
                                                      | 300 x 24 bit |    from the boundary)
                                                      +--------------+
```

The sequence for one frame (top module `multimode_sync`):

1. Every input sample is written into a 256-entry circular buffer. `frame_detect`
   looks for the repeated short-preamble pattern.
2. After detection `frame_detect` follows the correlation for 64 more samples. It
   hands over the correlation value with the largest magnitude, called Max_c.
3. `frac_cfo` sends Max_c once through the CORDIC in estimation mode to get its
   angle θ. It then sets the per-sample phase step to −θ/D. After that it replays
   the buffer through the CORDIC in compensation mode. The replay starts 128
   samples before the detection point (`REWIND`), so that the later stages see the
   whole preamble corrected.
4. 802.16d only: `int_cfo` looks in the corrected stream for the leftover offset,
   which is a whole multiple of 4 subcarriers. Its estimate is added to the phase
   step. In 802.11a/g mode this stage is skipped.
5. `sbd` correlates the corrected stream with the long preamble and reports the
   symbol boundary.
6. `fft_position` keeps the last 300 corrected samples. When the boundary
   search ends, it passes the stream on to the FFT, starting at the boundary.

The corrected samples also leave directly at the input rate, each with an index.
The index counts input samples from 0 at `restart`. `frame_idx`, `boundary_idx`
and `fft_idx` use the same numbering.

## Why two CFO stages

The fractional estimator compares samples that are D apart: D = 16 for 802.11a/g,
D = 64 for 802.16d. The angle of that product is unambiguous only within ±π, so it
resolves at most ±N/(2D) subcarriers, where N is the FFT size. That is ±2
subcarriers in both modes.

- 802.11a/g: the worst offset is 20 + 20 ppm at 5 GHz = 200 kHz = 0.64 subcarrier
  (subcarrier spacing 312.5 kHz). This is inside the range, so no second stage is
  needed.
- 802.16d: the worst offset is 16 ppm at 10.68 GHz = 170.88 kHz. At 3.5 MHz
  bandwidth the subcarrier spacing is 15.625 kHz, so this is about 11 subcarriers.
  The fractional stage leaves a remainder that is a multiple of 4 subcarriers. Its
  D = 64 correlation cannot see that remainder, because a shift of 4 subcarriers
  out of 256 is a whole turn over 64 samples.

The integral stage tests seven hypotheses, −12 … +12 subcarriers in steps of 4.

## The shared CORDIC (`cordic_cell`, `cordic_unit`, `frac_cfo`)

Each cell performs one micro-rotation:

```
x' = x − σi·2^−i·y
y' = y + σi·2^−i·x
z' = z − σi·σ·atan(2^−i)

σ  = +1 for estimation, −1 for compensation
σi = +1 if the steering value is negative, else −1
     (steering value: y for estimation, z for compensation)
```

- **Estimation (vectoring):** y is driven to 0, and z collects the angle of the
  input vector.
- **Compensation (rotation):** z is driven to 0, and the vector turns by −z.

The two modes need different angle ranges, so each cell has two shift indices and
the mode selects one:

| stage            | 0  | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | range     |
|------------------|----|---|---|---|---|---|---|---|---|---|-----------|
| estimation i     | 0  | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | ±1.7413 rad |
| compensation i   | −3 | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | ±3.1858 rad |

**Estimation range.** The estimation range, ±1.74 rad, is more than π/2 but less
than π. A mirror step therefore comes before the cells: a vector with x < 0 is
replaced by (−x, −y), and π is added to the final angle. With this step any angle
can be measured.

**Compensation range.** Compensation must handle any angle in (−π, π]. The first
stage uses i = −3, which is a left shift by 3. Its step is atan(8) = 1.4464 rad.
The rest of the sequence keeps the fine resolution of i = 8 (0.0039 rad). Reaching
the same range by repeating i = 0 three times would give up that resolution.

**Gain.** The CORDIC gain is 1.6468 in estimation, which does not matter because
only the angle is used. In compensation the gain is 13.2766, because the i = −3
stage alone multiplies by √65. `frac_cfo` scales the rotated sample by
round(2^16/13.2766) = 4936 / 2^16, then rounds and saturates it to 12 bits.

**Number formats.**
- Angles are 16-bit binary angles: 2^16 is one full turn, so wrap-around is free.
- Samples enter the CORDIC with 4 extra fraction bits, in a 22-bit datapath.
- Max_c, which is 32 bits wide, is first scaled down to 14 bits with a
  block-floating shift. This shift does not change its angle.

**Pipeline.** Registers sit after cells 3, 6 and 9. One operation can enter per
cycle, and each result appears 3 cycles later, with its tag.

**From angle to phase step.** Let the CFO be ω rad/sample. Then
s(t−D)·conj(s(t)) has angle θ = −ωD. To remove the CFO, sample n must be rotated
by −ωn = +θn/D. The compensation mode rotates by −z, so the accumulator adds
−θ/D per sample. The division is an arithmetic shift: by 6 for 802.16d and by 4
for 802.11a/g. This is the only place where the CFO path depends on the mode. The
accumulator (`phase_acc`) is 24 bits wide; its top 16 bits go to the CORDIC. The
integral estimate ε adds 2π·ε/256 to the same phase step.

## Frame detection (`frame_detect`, `avac`)

The detector keeps two running sums over a window of L = 64 samples:

```
C(t) = Σ s(t−k−D)·conj(s(t−k))   (correlation between samples D apart)
P(t) = Σ |s(t−k)|²               (power)
```

The sums are updated recursively: each sample adds its new term and subtracts the
term that leaves the window. The leaving terms come from two circular delay lines
of 64 entries.

A frame is declared at the first sample where

```
|C(t)| > 0.8 · max P
```

where max P is the largest P seen since `restart`. Comparing against the largest
power seen so far, rather than a fixed threshold or a division C/P, keeps the
detection point stable under multipath fading. The factor 0.8 is implemented as
1/2 + 1/4 + 1/32 + 1/64.

The magnitude |C| uses the approximation a + b/4, where a = max(|I|,|Q|) and
b = min(|I|,|Q|). For the b/a statistics of both preambles this is 2–3 times more
accurate than the common a + b/2.

## Integral CFO (`int_cfo`, `match_filter`, `reduced_mult`)

There are seven matched filters of 64 taps. Filter j correlates the *signs* of the
corrected samples with the signs of the first 64 preamble samples, as those samples
would look after an offset of 4(j−3) subcarriers. When both inputs are signs, each
product d·conj(p) is one of 2, 2j, −2 or −2j. The "multiplier" therefore only
decides which one:

| sel | product | condition (sign bits, 1 = negative) |
|-----|---------|-------------------------------------|
| 0   | 2       | Re d = Re p,  Im d = Im p           |
| 1   | 2j      | Re d = ¬Im p, Im d = Re p           |
| 2   | −2      | Re d = ¬Re p, Im d = ¬Im p          |
| 3   | −2j     | Re d = Im p,  Im d = ¬Re p          |

A filter output is then two differences of population counts.

During a 192-sample window, each filter keeps the peak of its a + b/4 magnitude.
The filter with the largest peak wins; ties go to the lower offset. The result is
`eps` = 4(j−3).

## Symbol boundary detection (`sbd`)

1. The block correlates the last 64 corrected samples with the signs of the first
   64 samples of the long preamble: M(t) = Σ r(t−63+k)·conj(p(k)).
2. The long preamble repeats after D = 128 samples (802.16d) or D = 64 samples
   (802.11a/g). The block therefore forms MM(n) = |M(n)| + |M(n+D)|. The peak of
   MM is the reference boundary n_ref.
3. If the strongest path is not the first one, n_ref lies inside the intersymbol
   interference (ISI) zone. The block therefore looks at the ten positions before
   n_ref. It takes the earliest one whose |M| is above half of the largest |M| in
   the window.

A delay line of D + 11 magnitudes supplies |M(n)| and the ten values before it.
Whenever MM reaches a new maximum, these eleven values are copied. The search runs
for 400 correlation outputs. At the end, `done` pulses and the block reports:
- `boundary_idx`: the first sample of the first long-preamble half;
- `ref_idx`: n_ref;
- `moved`: whether the earlier-path search changed the result.

## FFT data forwarding (`fft_position`)

The boundary is known only after the search window closes. By then the samples
it points to have already left the CORDIC. `fft_position` therefore writes every
corrected sample into a 300-entry circular buffer, together with the index of the
newest one.

When `sync_done` arrives, the block computes how far back the boundary lies. If
the boundary is still held, reading starts there. The block reads one sample per
cycle for as long as stored samples remain. A backlog left by gaps in the input
drains, and after that the output follows the input. The first forwarded sample
is marked with `fft_first`. If the boundary has already been overwritten,
`fft_late` is raised instead.

With the default windows the boundary lies about 215 samples back (802.11a/g) or
265 (802.16d). Both are below 300.

## Interface of `multimode_sync`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `restart` | in | 1 | clear all state, index counter back to 0, search for a new frame |
| `mode` | in | 1 | `MODE_WLAN` (802.11a/g) or `MODE_WMAN` (802.16d); hold it steady during a frame |
| `in_valid`, `in` | in | 1, 24 | received sample (`cplx_t`: 12-bit signed I and Q) |
| `ref_we`, `ref_target`, `ref_sel`, `ref_addr`, `ref_data` | in | 1,1,3,6,2 | write one reference sign pair; target 0 = integral-CFO hypothesis `ref_sel` (0..6 = −12..+12), target 1 = boundary reference for mode `ref_sel[0]` |
| `frame_det`, `frame_idx` | out | 1, 32 | detection pulse and the sample index at that time |
| `theta_valid`, `theta`, `theta_mirror` | out | 1, 16, 1 | fractional-CFO angle of Max_c (2^16 = 2π) and whether the mirror step was used |
| `phase_inc` | out | 24 | phase step in use (2^24 = 2π) |
| `icfo_done`, `icfo_eps` | out | 1, 6 | integral CFO in subcarriers (802.16d) |
| `sync_done`, `boundary_idx`, `sbd_ref_idx`, `boundary_moved` | out | 1, 32, 32, 1 | symbol boundary result |
| `out_valid`, `out`, `out_idx` | out | 1, 24, 32 | corrected samples with their indices |
| `fft_valid`, `fft_first`, `fft_out`, `fft_idx` | out | 1, 1, 24, 32 | corrected stream from the boundary on, for the FFT; `fft_first` marks the boundary sample |
| `fft_late` | out | 1 | the boundary had already left the 300-sample buffer; nothing forwarded |

**Reference tables.** The preamble sequences are loaded into the tables after
reset; the RTL does not contain them. The integral-CFO table for hypothesis j holds
sign(p(k)·e^{j2π·4(j−3)k/256}) for k = 0..63, where p is the first 64-sample period
of the 802.16d preamble. The boundary tables hold the signs of the first 64 samples
of the long preamble of each standard. For 802.16d that is the 128-periodic second
preamble symbol.

**Timing with continuous input.**

| event | when |
|-------|------|
| `frame_det` | 2 cycles after the sample that crosses the threshold |
| Max_c | 64 samples later |
| `theta_valid` | 4 cycles after Max_c |
| replay | starts the cycle after `theta_valid` |
| corrected sample | 3 cycles after it is read from the buffer |
| `icfo_done` | 3 cycles after the 192nd corrected sample |
| `sync_done` | 2 cycles after the 400th correlation output |
| first forwarded sample | 2 cycles after `sync_done` |

The buffer backlog stays near REWIND + 64 samples, below the 256-entry depth. An
assertion in the top flags an overrun.

## Parameters

| module | parameter | default | origin |
|--------|-----------|---------|--------|
| `frame_detect` | `L`, `D_WMAN`, `D_WLAN` | 64, 64, 16 | source design |
| `frame_detect` | `MAXC_WIN`, `CW` | 64, 32 | own choice |
| `cordic_unit` / `cordic_cell` | stages, pipeline, shift sequences | 10, 3, see table | source design |
| `cordic_unit` | `XW` (datapath) | 22 | own choice |
| `frac_cfo` | `PW`, `NW`, `FRAC` | 24, 14, 4 | own choice |
| `sample_buffer` | `DEPTH` | 256 | source design (256-entry register files) |
| `int_cfo` | `N`, `NF`, `STEP` | 64, 7, 4 | source design |
| `int_cfo` | `WIN` | 192 | own choice |
| `sbd` | `N`, `D_WMAN`, `D_WLAN`, `SRCH` | 64, 128, 64, 10 | source design |
| `sbd` | `WIN` | 400 | own choice |
| `fft_position` | `DEPTH` | 300 | source design (300-entry register files) |
| `multimode_sync` | `REWIND`, `ICFO_WIN`, `SBD_WIN` | 128, 192, 400 | own choice |

Shared types and the arctangent constants are in `rtl/sync_pkg.sv`. Each constant
is round(atan(2^−i)/(2π)·2^16).

## Departures and own choices

- **Reference sequences are loadable.** The preamble tables are written through a
  port rather than stored in ROM, so any preamble can be used. A product would
  fill them from the standards' preamble definitions.
- **FFT data forwarding.** The source design passes the FFT data on once the
  boundary counter expires, and it tracks the FFT position with every new MM
  maximum. Here `sbd` tracks the maximum and hands its final boundary to
  `fft_position`. That block then reads its buffer from the boundary onward. It
  forwards the whole stream rather than cutting it into windows. The cyclic
  prefix of 802.16d data symbols is configurable, so window placement for later
  symbols is left to the FFT control, which receives exact indices.
- **Search windows and sequencing are own choices.** These are:
  - the Max_c window (64 samples);
  - the replay offset (128 samples);
  - the integral-CFO window (192 samples);
  - the boundary-search length (400 outputs). This length covers the long
    preamble of both standards after the points where the search starts. It also
    keeps the boundary within the 300-sample forwarding buffer: the boundary is
    about 215 samples back in 802.11a/g and 265 in 802.16d.
  - starting each stage when the previous estimate is ready.
- **Integral CFO decision rule.** The integral CFO takes the peak over time of
  each hypothesis and picks the largest. The estimate is applied from the moment it
  is known. The samples already sent out keep only the fractional correction, and
  the constant phase left by the switch is for the channel estimator to absorb.
- **Boundary reference uses signs.** The boundary correlator uses the sign of the
  reference, so each tap is an add or a subtract. MM is formed from magnitudes.
- **Reduced-multiplier table.** The table above uses the conjugated reference,
  which is consistent with the boundary correlator.
- **Word widths and gain correction.** All word widths and the output gain
  correction are own choices.
- **Input assumptions.** AGC and sampling-clock synchronization are assumed to have
  been done before the input.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

- `tb_avac`, `tb_reduced_mult`, `tb_cordic_cell`, `tb_phase_acc`,
  `tb_sample_buffer`: exhaustive or random comparison with integer models.
- `tb_cordic_unit`: a mixed stream of estimations and rotations, compared with
  floating-point atan2 and rotation. Latency is checked at exactly 3 cycles, and
  the mirror step is exercised.
- `tb_frame_detect`: an exact integer model of C, P, max P and |C| is compared
  every sample. The test also checks the detection instant, Max_c and its angle,
  in both modes.
- `tb_frac_cfo`: a tone with a known CFO must come out still and at full
  amplitude. The test checks θ, the phase step, the latency, the mirror cases and
  a mid-stream integral step.
- `tb_match_filter`, `tb_int_cfo`: correlation sums; all seven integral
  hypotheses with noise and a random start phase.
- `tb_fft_position`: streams with random gaps, and boundaries at random
  distances, including the edge cases. The forwarded data must start exactly at
  a boundary that is still held, and match the stream sample for sample. An older
  boundary must raise `fft_late`.
- `tb_sbd`: 40 random trials in both modes. The channels are one path, a weak
  first path with a stronger echo 1–8 samples later, or a strong first path with
  a weak echo. The boundary must be the first path, and the earlier-path move
  must happen exactly in the weak-first cases. The latency of `done` is
  checked.
- `tb_multimode_sync`: end to end at default parameters, five frames that
  alternate modes. The CFOs are 1.3 and 0.64 subcarriers for 802.11a/g, and 4.3,
  5.75 and −10.9 subcarriers for 802.16d. The channels are one- and two-path with
  noise. For each frame the test checks detection, θ, the integral estimate, the
  boundary, the earlier-path move, the phase agreement of the two corrected
  long-preamble halves, and the forwarded first FFT window. It counts each
  mechanism: detection, mode switch, mirror step, integral CFO applied and
  bypassed, buffer replay, earlier-path move and FFT data forwarding.

- `tb_workloads`: the evaluation conditions of the source design at default
  parameters, 60 frames each, 20 dB average SNR, with channels drawn anew for
  every frame:
  - 802.11a/g, 200 kHz CFO (0.64 subcarrier), exponentially decaying channel
    with 50 ns rms delay spread;
  - 802.16d at 7 MHz, 5.75 subcarriers, SUI-3 (taps 0 / 0.4 / 0.9 µs at
    0 / −5 / −10 dB, first tap Ricean with K = 1);
  - 802.16d at 3.5 MHz, −170.88 kHz (−10.94 subcarriers), SUI-3.

  For each condition it reports how many frames succeed in detection, fractional
  angle, integral estimate, ISI-free boundary, residual phase and forwarding, and
  requires at least 85 % of the frames for each. Typical results are 57 to 60 of
  60 frames.

**Limits of the stimulus.**
- The preambles in the tests have the standards' period structure, but their
  values are random rather than the standards' exact sequences.
- The fading is static within a frame.
- The detection-rate, BER and PER curves of the source design have not been
  reproduced.

**Detection at low SNR.** The detection rule needs |C|/max P > 0.8, and |C|/P is
SNR/(SNR+1) for a periodic preamble in noise. A frame is therefore detected only
when its own SNR is above about 6 dB. At 10 dB average SNR, Rayleigh fades make
10–30 % of the frames in these channels fall below that. The source design
reports 90 % detection at about 2.5 dB (802.11a/g) and 9 dB (802.16d). With the
rule as stated, this implementation does not reach those figures at the low end;
how the source defines SNR for those curves is not known here.

Run a testbench with Verilator 5 from the project root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/sync_pkg.sv \
    tb/tb_multimode_sync.sv --top-module tb_multimode_sync -Mdir obj_tb
./obj_tb/Vtb_multimode_sync
```

Replace the testbench name to run another one. `-y rtl` lets Verilator find the
submodules. Lint the synthesizable code with:

```
verilator --lint-only -Wall -y rtl rtl/sync_pkg.sv rtl/multimode_sync.sv --top-module multimode_sync
```

The remaining lint warnings are about unused bits: the low phase bits below the
CORDIC's 16 bits, the upper bits of the scaled Max_c, and the oldest sign in the
matched-filter window register.
