# Trained PHY link controller: PI² clock recovery, adaptive equalizers and hybrid impedance calibration

A chip-to-chip memory link at several Gb/s per pin needs three things before it
can carry data reliably. It must know where to sample each bit. It must cancel
the inter-symbol interference (ISI) of the board channel. Its drivers must match
the line impedance. This design puts all of the adaptive hardware for these
three jobs on the **controller** side of the link. The memory (slave) side only
has to store and return training patterns through a FIFO. One set of
clock-recovery and equalizer-training logic can therefore serve a link in both
directions, and the memory die stays simple.

The RTL covers the digital part of that controller:

* a **training sequencer** that runs read training, receive-equalizer
  training, a read check, write training, transmit-equalizer training, a write
  check and normal operation, and retrains when a bit-error monitor complains;
* a **PI² CDR** (phase-interpolator clock and data recovery with a
  proportional-integral loop filter). It uses three samples per bit (3TS) so
  that it can tell when the clock is centred and then stop moving it;
* a **receive equalizer** (4-tap FFE + 4-tap DFE) adapted by LMS in 10-bit
  sign-magnitude arithmetic;
* **three interchangeable transmit-equalizer trainings**: LMS on an 8-tap
  linear equalizer, pilot patterns with peak detection on 5 taps, and a direct
  5-tap calculation from one impulse response;
* a **hybrid impedance calibration** controller. It searches a 6-bit driver
  code by plain binary search, or by a linear or reduced-binary search near the
  nominal point, which is shorter and lower in power.

Everything analog stays outside as ports: the PLL, samplers, ADC/DAC, the
analog equalizer summers, the driver legs and the comparators. One clock cycle
of the logic stands for one unit interval (UI), i.e. 200 ps at the 5 Gb/s target
rate.

## Training sequence (`training_seq`, `phy_link_top`)

```
 start / BER alarm
        |
   READ_TRAIN --> RXEQ_TRAIN --> READ_CHECK --fail--> READ_TRAIN
                                    | ok
   WRITE_TRAIN --> TXEQ_TRAIN --> WRITE_CHECK --fail--> WRITE_TRAIN
                                    | ok
                                  NORMAL --ber_high--> READ_TRAIN
 more than MAX_LOOPS (4) failed checks in a row --> FAIL
```

Each step starts with a one-cycle `go` pulse and ends when the top raises its
`*_done`:

* **Phase training** (read or write) ends once the CDR reports `aligned` and at
  least 32 cycles have passed in the step.
* **Rx EQ training** lasts `RXEQ_LEN` = 8000 UI, which is 1.6 µs at 5 Gb/s.
* **LMS Tx EQ training** lasts `TXEQ_LEN` = 12000 UI, which is 2.4 µs.
* **Pilot and direct training** end when their controllers say so.
* **Checks** compare `CHK_LEN` = 256 decided bits with the PRBS7 pattern that
  both ends generate.

A failed read check goes back to read training, because the equalizer may
have moved the eye centre.

`txeq_algo` picks the Tx EQ training (0 LMS, 1 pilot, 2 direct). `pre_filt` and
`gain_sel` set the CDR loop. `mu` is the LMS step size; 8 means 8/256 ≈ 0.031.

## Clock recovery: PI² CDR with three-times sampling

This is the subtlest part of the design. Read this section before changing
`pi2_cdr` or its sub-blocks.

**Phase codes.** A 64-step phase interpolator (6.25 ps per step) covers one
400 ps period of the 2.5 GHz half-rate clock, so one UI is 32 steps. Three
sampling clocks come from one code `p`:

| clock | code | role |
|---|---|---|
| Q1 | p | reference, left edge of the "zone" |
| Q2 | p + `ZONE_LSB` (2) | right edge of the zone |
| I | p + `ZONE_LSB`/2 + `Q_OFFSET` (16) | data sample, half a UI later |

The loop aims to put every data transition inside the small Q1–Q2 zone. The
I sampler then sits in the middle of the eye.

**Path.** The loop runs in this order:

```
i/q1/q2 bits -> deserializer 1:8 -> 3TS Alexander PD -> EN/DS -> pre-filter
            -> PI controller -> A/B switch control -> interpolator codes
```

* `deserializer` packs eight samples of each phase into words and strobes
  `word_valid` once per word. This stands for the low-rate system clock; all
  CDR logic after it updates once per word.
* `alexander_pd_3ts` forms, for every bit k,
  `e(k) = (I(k+1) ^ Q2(k)) - (I(k+1) ^ Q2(k+1))`,
  and sums it over the word. A positive sum means early (+1), a negative sum
  means late (−1). If every transition of the word falls between Q1 and Q2, so
  that Q1 and Q2 differ exactly at the transitions, the PD reports
  **aligned**.
* **EN/DS** freezes the pre-filter and the PI controller while the PD reports
  aligned. This removes the dither that a bang-bang loop otherwise has at
  lock. The `aligned` flag also tells the sequencer that phase training is
  done. Any later early/late decision re-enables the loop.
* `pre_filter` accumulates decisions and emits a ±1 carry when the count
  reaches the threshold `Pre_filt` (2 by default, run-time selectable, 8 for
  jittery data). The accumulator then clears.
* `pi_controller` computes
  `phase = (β·ε + α·Σε)·k_PD` with k_PD = 32, β = 2^-(8-g) and α = 2^-(10-g)
  for `gain_sel` = g. Its fixed-point core has 10 fraction bits. The result
  is taken modulo 64 as the interpolator code.
* `pi_switch_ctrl` never changes the code of the interpolator that currently
  drives the clock, because that would glitch it. It writes the new code into
  the idle one of two interpolators (A/B), waits `SETTLE` cycles, and swaps
  `sel` only when both interpolator outputs are at the same level (the "safe
  area").
* `mux_4_2` chooses an adjacent pair of the four reference phases from the
  code's two MSBs (one-hot switch controls). `mux_3_2` passes (In1,In2) or
  (In2,In3) to the next interpolator stage. `phase_interpolator` is a
  **behavioural** model: a delay of `code × 6.25 ps`, using the inverted
  reference for the upper half of the codes. Synthesis ignores it.

Latency: a word's decision reaches the code three word periods after the word
is complete, plus the A/B switch time. `tb_pi2_cdr` locks from random start
phases within about 200–2800 UI.

**Zone size and jitter.** The loop stops anywhere inside the Q1–Q2 zone, so a
zone of Z steps leaves up to Z/2 steps of static error in the I position. With
jittery data a 2-step zone rarely holds every edge of a word, so the loop keeps
running. `tb_cdr_jitter` runs both zone sizes side by side with 0 to 62.5 ps of
peak-to-peak jitter and `Pre_filt` 2 and 8:

* With the 2-step zone, the mean I error stays at 0–1.3 steps (0–7.5°).
* With 50 ps of jitter, the 6-step zone stays aligned more often than the
  2-step zone, but its I error is about 3 steps (17°).

Widen `ZONE_LSB` only when the data are jittery.

## Number format and the LMS engine

The equalizer datapath uses a 10-bit **sign-magnitude** word
`{sign, integer bit, 8 fraction bits}`. Its range is ±511/256.

* `sm_mult`: a 3-stage multiplier. An operand ≥ 1.0 is shifted right before
  the 8×8 core multiply and shifted back afterwards. Results saturate at
  511/256, and zero is always positive.
* `sm_acc`: the coefficient accumulator. It **clamps at ±1.5** (384/256).
* `sm_divider`: an 18-stage restoring divider with one quotient bit per stage
  and saturating overflow. Division by zero returns the largest magnitude.
* `lms_engine`: one coefficient. The input table maps the 8-bit ADC code `c`
  to `(c−128)/128`. Two multipliers form `μ·e·x`, and `sm_acc` integrates it.
  The output table gives the DAC code `min(255, |C|·255/384)` and a sign that
  would swap the inputs of an analog summer. An update reaches the
  coefficient about 7 cycles after its error.
* `lms_fir`: TAPS engines over a delay line, plus a **digital** summer
  `y = Σ Cᵢ·xᵢ` in Q8. In the real link the summer is analog, but a digital
  one lets the adaptation loop close in simulation. `ERR_LAT` delays each
  tap's input so that it meets the error it caused.

## Receive equalizer (`rx_eq`)

`Y(k) = Σ Cᵢ·v(k−i+1) + Σ Dⱼ·I(k−j)` and `e(k) = I(k) − Y(k)`, where:

* `v` is the received ADC code;
* `I` is the known training bit during `train`, and the equalizer's own
  decision otherwise;
* data are ±1 for bits 1/0.

The FFE main tap is its oldest tap, so one pre-cursor is cancelled, and it
starts at 1.0 on `load`. The DFE sum is added combinationally, so the newest
decision is fed back in time. DFE coefficients therefore settle **negative**
for positive post-cursor ISI. `y`/`dec` for a sample are valid on the 4th clock
edge after it enters. On the 1-pre/3-post-cursor test channel, 8000 UI of
training take the raw decision error count from 1241 to 0 (MSE 0.045).

## Transmit equalizer trainings

All three trainings keep the slave passive. The controller sends data and reads
back what the slave's FIFO received.

* **LMS** (`tx_eq_lms`): an 8-tap pre-emphasis filter whose coefficients use
  the transmitted bits as regressors. The error is measured in the controller,
  after the channel, the slave and the already-trained Rx EQ. It therefore
  arrives `ERR_LAT` cycles late, and that round-trip latency must be known
  (default 8). The main tap is tap 2, leaving two pre-cursor taps. On the unit
  test channel the residual ISI falls from 0.98 to 0.25.
* **Pilot / peak detection** (`pilot_txeq_ctrl`): trains taps one at a time
  with the patterns 10000, 11000, 10100, 10010 and 10001 (tap 1..5). The
  pattern is sent and returned, and a held error flag is checked. An error
  raises the current coefficient by one LSB of its 6-bit DAC and the pattern is
  repeated (`comp1`). An error-free pattern ends the tap (`comp2`). Tap 1
  starts at 0 and the others at the most negative code, so each rises to its
  peak. This method cannot cancel pre-cursors.
* **Direct** (`direct_coef_calc`): from one impulse, `y(k)` is sampled before
  the Rx EQ and `Y(k)` after it. Then
  `C1 = Y(1)/y(1)` and `Ck = [Y(k) − Σ_{j<k} Cj·y(k+1−j)]·C1/Y(1)`.
  One shared multiplier and one shared divider compute this sequentially
  (about 160 cycles for 5 taps). `txeq_summer` is the matching digital 5-tap
  FIR. The method assumes that the write and read channels are the same.

In the top, the pilot coefficients drive the summer at 1/16 per DAC LSB.

## Impedance calibration (`zq_cal_ctrl`)

The driver has one reference leg, six binary-weighted calibration legs
(`cal_code`) and three equal linear legs (`lin_code`, a thermometer code).
Comparators report whether the pad voltage is:

* within ±1% of VDD/2 (`match`);
* above it (`above`);
* within a ±5% mode window (`mode`).

Three sections are calibrated in turn: the pull-up PFET against the external
resistor, the pull-down NFET against the calibrated PFET, then the
terminator. Each section starts from the reference leg alone, which is the
no-PVT-variation setting. If that already matches, nothing is searched.
Otherwise:

* **binary** (`algo` 0, or outside the mode window): the reference leg is on
  when the driver is too weak. Starting from 100000b, the code moves by
  ±16, 8, 4, 2 and 1, one step per clock, and stops early on match.
* **hybrid linear** (inside the mode window): if the driver is too weak, the
  reference leg is on and the calibration legs are off. If it is too strong,
  the reference is off and the three MSB legs are on. The linear legs then
  step one at a time.
* **hybrid reduced binary**: as above, but the three LSB calibration legs are
  searched in binary instead.

The code, reference state and linear legs are stored per section
(`pcode/ncode/tcode`, `ref_save`, `lin_save`). The controller then waits two
clocks for the comparators before moving to the next section. `cycles`,
`n_bin` and `n_hyb` let a testbench compare the algorithms. Over random
corners near nominal, both hybrid searches need fewer clocks than binary.

## Where this RTL departs from the reference design or guesses

* **The coefficient clamp is ±1.5.** The reference gate-level results include
  main-tap coefficients of 1.64–1.69 (Rx EQ FFE and LMS Tx EQ). These are held
  at 1.5 here. The test channels converge regardless, and on the Rx EQ test
  the main tap does sit at the clamp.
* **Summers are digital.** The analog differential-pair summers are replaced
  by multiply-adds. The DAC codes and signs are still produced for an analog
  back end.
* **Time is modelled abstractly.** Half-rate sampling is modelled as one
  sample per clock. The low-rate clock is a `word_valid` strobe. The pilot
  control unit also runs on the bit clock. The reference design runs its
  control logic at one tenth of the bit rate, so it needs more time per
  pattern.
* **The round-trip latencies are inputs** (`rx_align`, `wr_align`). In the
  top, the write data return on `wr_code` as an abstract path, so the LMS Tx EQ
  there uses `ERR_LAT = 1`.
* **The direct training** takes its impulse on an otherwise idle line. If the
  write check with direct coefficients keeps failing, the link loops until the
  retry limit.
* **Design choices that were not given** include the PRBS7 polynomial, the
  FIFO size (32 × 8), the retry limit, the check length, the aligned test of
  the PD, the pre-filter clear and the pilot start values and DAC scaling.
  The ADC/DAC tables, the terminator calibration direction and the mux control
  mapping are chosen too.
* **Not built:** the PLL, the samplers and serializer, the analog equalizer
  and LMS circuits, the converters, and the driver legs and comparators. These
  have no logic function and appear only as ports.

## Files

| module | role |
|---|---|
| `phy_pkg` | shared types (sign-magnitude word, PD state, training state, calibration algorithm) and conversion helpers |
| `phy_link_top` | top: sequencer, CDR and clock-path muxes, PRBS, Rx EQ, three Tx EQ trainings, FIFO, calibration |
| `training_seq` | training state machine |
| `pi2_cdr` | CDR controller: `deserializer`, `alexander_pd_3ts`, `pre_filter`, `pi_controller`, `pi_switch_ctrl` |
| `mux_4_2`, `mux_3_2`, `phase_interpolator` | interpolator clock path (the last one is behavioural) |
| `rx_eq`, `lms_fir`, `lms_engine`, `sm_mult`, `sm_acc`, `sm_divider` | receive equalizer and LMS arithmetic |
| `tx_eq_lms`, `pilot_txeq_ctrl`, `direct_coef_calc`, `txeq_summer` | transmit equalizer trainings |
| `prbs_gen`, `train_fifo` | training pattern and the slave's FIFO |
| `zq_cal_ctrl` | impedance calibration |

Every module has a testbench `tb/tb_<module>.sv`. Each one checks against an
independent model and prints `TB_RESULT checks=N failures=M`. One more,
`tb/tb_cdr_jitter.sv`, runs the CDR under jitter with both zone sizes.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --x-initial unique \
  rtl/phy_pkg.sv tb/tb_rx_eq.sv -y rtl --top-module tb_rx_eq
./obj_dir/Vtb_rx_eq +verilator+rand+reset+2
```

Replace `tb_rx_eq` with any other testbench. `tb_phy_link_top` runs the whole
controller at its default parameters, which takes under a second. It covers:

* the three calibration algorithms;
* FIFO full and empty;
* a link training with the LMS Tx EQ and a forced read-check failure;
* a BER-triggered retraining with the pilot Tx EQ and `Pre_filt` = 8;
* a retraining with the direct Tx EQ;
* a broken read channel that ends in FAIL.

It counts 24 mechanisms and fails if any of them never happens. The
interpolator test uses picosecond time literals, so it runs with any time
unit.

Some lint warnings are expected, and the opening comments of the affected
modules explain them:

* unused outputs in the top, which are meant for the analog back end;
* `rst_n` used both as the asynchronous reset and in an assertion's
  `disable iff`;
* a zero delay at code 0 in the behavioural interpolator.
