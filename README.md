# Two-fold, hardware-sharing carrier recovery for a low-IF 64-QAM receiver

A cable-modem receiver that equalizes blindly faces a conflict. A carrier
recovery (CR) loop placed after a long adaptive equalizer sees clean,
decided symbols. But the loop is long and must stay narrow, so it tolerates
only a few kHz of offset and acquires slowly. This design solves that with
two loops in sequence that share one set of hardware:

* a **prior**, wide-band loop. It is a modified Costas loop that runs before
  the equalizer on the low-pass filtered mixer output, at the full sample
  rate. It finds the coarse carrier frequency.
* a **posterior**, narrow-band loop. It runs on the equalizer output and
  uses the slicer decisions. First it uses a decision-directed
  maximum-likelihood detector (DDML) to finish pulling in. Then it switches
  to a decision-directed minimum-mean-square-error detector (DD-MMSE), which
  is not biased by residual ISI, for low-jitter tracking.

The frequency found by the prior loop is frozen into a register, `w_dc`.
The posterior loop then starts from centre frequency `w0 + w_dc`. All three
stages use the same phase detector, IIR pre-filter, PI loop filter and NCO.
Only the detector's inputs, the pre-filter coefficients, the loop gains and
the update rate change with the stage.

Target system: a 4.035 MHz low IF, sampled at 21.52 MHz (4 samples per
symbol), with a 5.38 MHz symbol rate and 64-QAM. The design goals are:

* ±100 kHz offset tolerance (±2.5 % of the IF);
* about 7 ms to reach steady state;
* carrier jitter near −82 dBc.

Read **How far it can be trusted** before relying on the acquisition range.

## Receiver path and clocking

Everything runs on one clock at the sample rate. `cr_controller` divides it
with a 2-bit counter into two strobes:

* `half_stb`: every 2nd clock, at the T/2 instants;
* `sym_stb`: every 4th clock, at the symbol instants.

```
adc_in (10 b, real, IF = 3/16 fs)
  └─ mixer × cos / −sin from the NCO ──► y_c, y_s
        ├─ iir_lpf (2 × one-pole, pole 0.5) ──► lpf_i/q ─► phase detector (prior)
        └─ rcf_decim ×2 (25-tap root raised cosine, β = 0.18, keeps every 2nd output)
              └─ ffe ×2 (16 taps, T/2-spaced, one output per symbol) ──► eq_i/q
                    └─ slicer (64-QAM) ──► dec_i/q, err = eq − dec ─► phase detector (posterior)
cr_core: phase detector ─► pre-filter ─► PI loop filter (gear-shifted) ─► NCO ─► mixer
```

* The mixer output feeds two branches:
  * The prior loop taps it through the IIR LPF. That filter removes the
    image at twice the IF.
  * The data path goes through the matched filter and the equalizer.
* The equalizer for I and the one for Q are separate real FFEs.

## The three stages and the hand-over

| stage (`state`) | runs | detector input | update rate | Z⁻¹ registers |
|---|---|---|---|---|
| `ST_PRIOR` (0), modified Costas | reset (A) to B | IIR LPF output, its own signs | every clock (21.52 MHz) | used |
| `ST_DDML` (1) | B to C | equalizer output, signs of the decisions | once per symbol (5.38 MHz) | bypassed |
| `ST_MMSE` (2) | C onward | equalizer error `eq − dec`, signs of the equalizer output | once per symbol | bypassed |

All three detectors have the same form: `e = a_q·sgn(s_i) − a_i·sgn(s_q)`.
Only the choice of `a` and `s` differs. Using signs instead of full
products avoids multipliers.

**Why the Z⁻¹ registers.** In the prior stage the loop closes at the full
sample rate. A register after the phase detector and another after the loop
filter break the combinational path. In the posterior stages, updates come
only once per symbol, so a MUX routes around the registers. The MUX is
steered by `state`.

**Hand-over at B** (`handover`, a one-clock pulse on the last prior clock):

1. The NCO adds the current loop-filter control word into `w_dc`.
2. The pre-filter and the loop-filter integrator are cleared. This stops the
   prior control word from being counted twice.
3. The FFE taps are reloaded to their initial value: centre tap 2.0, all
   others 0.
4. The gear counter restarts.

From then on the NCO runs at `w0 + w_dc + dw`, with `dw` from the posterior
loop. The switch at C (`to_mmse`) only changes the detector and the gear
table. From C on, the equalizer also starts adapting.

**Stage lengths** are fixed counts:

* `PRIOR_LEN` = 65,536 clocks, which is 3.05 ms;
* `DDML_LEN` = 16,384 symbols, another 3.05 ms.

MMSE tracking therefore starts 6.1 ms after reset, inside the 7 ms target.
A real receiver would move on when the equalizer reports convergence. This
design has no such test.

## The shared loop hardware (`cr_core`)

* **`phase_detector`**: combinational. Selects (a, s) from the three
  sources by `state` and forms `e` (16 bits).
* **`prefilter`**: a first-order IIR filter in transposed form,
  `y = b0·x + s; s' = b1·x − a1·y`. The coefficients are Q1.14 and are
  switched by `state`.
  * The defaults are b0 = 0, b1 = 2⁻⁵, a1 = −(1 − 2⁻⁵) in the prior stage,
    and b1 = 2⁻³, a1 = −(1 − 2⁻³) in the posterior stages.
  * Both give about 110 kHz bandwidth at their own update rate, wider than
    the loop bandwidth.
  * The output keeps 4 fraction bits.
* **`loop_filter`**: a PI filter with no multipliers.
  * The input is pre-scaled by 2²⁴. A bank of fixed right shifts feeds two
    MUXes: one for the proportional path, one for the integrator.
  * Gains are `Kp = 2^(10−kp_sh)` and `Ki = 2^(10−ki_sh)`, in
    frequency-word LSBs per unit of phase-detector output.
  * The integrator keeps 18 bits below the LSB.
* **`gear_shift`**: sets the loop bandwidth.
  * Each stage starts in gear 0, which is the widest.
  * The gear steps to 1 and then 2 after `G1_AT_*` and `G2_AT_*` loop
    updates.
  * Default tables, as (kp_sh, ki_sh):
    * prior (0,7) (1,9) (3,13): Kp 2¹⁰→2⁷, Ki 2³→2⁻³;
    * DDML (5,12) (6,14) (6,14);
    * MMSE (7,16) in all three gears.
  * The posterior tables were designed for a damping factor near 0.9,
    assuming a detector gain of about 512 LSB/rad on the decided grid.
  * The prior table was set by simulation on a shaped 64-QAM signal. It
    starts with a wide gear for pull-in and steps down quickly. A wide
    Costas loop on such a signal wanders, because of data-pattern noise
    (see the limits below).
* **`nco`**: a 24-bit phase accumulator driven by `fcw = w0 + w_dc + dw`.
  * `w0 = 3/16 · 2²⁴` puts the centre frequency at 4.035 MHz.
  * One LSB is 1.28 Hz.
  * The top 10 phase bits address `nco_rom`.
* **`nco_rom`**: a quarter-wave sine table computed at elaboration, with
  quadrant folding. It returns registered `cos` and `−sin` with amplitude
  2047.

**Fixed-point scale of the data path.**

* The source delivers levels ±1, ±3, ±5, ±7 × 32 at the ADC.
* The FFE's initial gain of 2 brings them to the slicer grid: ±64, ±192,
  ±320, ±448 on 12-bit signals.

## Parameters

`two_fold_cr_top` defaults:

| parameter | default | meaning |
|---|---|---|
| `PRIOR_LEN` | 65536 | clocks in the Costas stage |
| `DDML_LEN` | 16384 | symbols in the DDML stage |
| `G1_AT_PRIOR`, `G2_AT_PRIOR` | 8192, 16384 | prior loop updates before gear 1 and gear 2 |
| `G1_AT_POST`, `G2_AT_POST` | 4096, 8192 | the same for the DDML and MMSE stages |
| `GEAR_PRIOR/DDML/MMSE` | see above | (kp_sh, ki_sh) per gear |
| `PF_B0/B1/A1_PRIOR`, `_POST` | 0, 512, −15872 / 0, 2048, −14336 | pre-filter coefficients, Q1.14 |
| `LPF_K`, `LPF_STAGES` | 1, 2 | IIR LPF pole shift and number of sections |

Word widths are set in `cr_pkg`:

| signal | width |
|---|---|
| ADC input | 10 |
| I/Q signals | 12 |
| phase error | 16 |
| pre-filter output | 20 |
| phase and frequency words | 24 |

**What comes from the target system and what this design chose:**

* From the target system: the rates, the IF, the constellation, the
  three-stage sequence, the shared blocks and their inner structure (the
  Z⁻¹/MUX pairs, the switched pre-filter coefficients, shifters with MUXes
  for the PI gains, the `w_dc` hold register).
* This design's own choices: every width, filter order, coefficient, gain,
  gear count, stage length and tap count.

## How far it can be trusted

What the testbenches show:

* **Every block matches a model.** Each one is checked against an
  independent integer or real model, often bit for bit. Each testbench has
  also been shown to fail on a deliberately broken version of its block.
* **The shared core acquires ±100 kHz on an ideal channel** (`tb_cr_core`).
  * Setup: un-shaped 64-QAM symbols held for 4 clocks, no noise, with wider
    prior gears. The gears and pre-filter coefficients are passed as
    parameters.
  * The prior loop brings a 100 kHz offset to within 0.1 kHz.
  * The posterior stages then hold the frequency within 300 Hz, with a
    slicer mean squared error (MSE) of about 0.01 LSB².
* **The full receiver locks at the default parameters**
  (`tb_two_fold_cr_top`).
  * Setup: a shaped 64-QAM signal with a ±20 kHz offset, 250,000 symbols.
  * The prior loop hands over a `w_dc` within 0.6 kHz of the offset.
  * The final frequency word is within 1 Hz of the true offset.
  * The slicer MSE is about 150 LSB² on the ±64…±448 grid.
  * Every stage, gear and switch is exercised and counted.

**Known limits and departures:**

* **Acquisition is reliable to about ±20 kHz, not ±100 kHz.** A sweep of
  the end-to-end setup at the defaults tried three start phases and both
  signs at each offset, six cases per offset. The receiver locked in:

  | offset | cases locked |
  |---|---|
  | 5 kHz | 5 of 6 |
  | 20 kHz | 5 of 6 |
  | 50 kHz | 3 of 6 |
  | 100 kHz | 0 of 6 |

  * On a pulse-shaped signal, data-pattern noise dominates the Costas
    detector output: about 118 LSB per sample, against a gain of about
    70 LSB/rad.
  * A wide first gear is needed to pull in far. But that same gear can
    wander to a wrong frequency, tens of kHz away. The DDML stage then locks
    falsely: it settles on a wrong point and the MSE is in the thousands.
  * Narrower prior gears (Kp 2⁸→2⁶) wander less but pull in only about
    ±10 kHz.
  * Reaching ±100 kHz robustly on a real signal would need better
    prior-stage detection or filtering than this design has.
* **Pre-filter vs. loop bandwidth.** The target system asks for a
  pre-filter 5 to 10 times wider than the loop.
  * Both pre-filter settings are about 110 kHz wide.
  * That is about the same as the prior loop's first gear, which is about
    90 kHz.
  * It is about 10× the prior loop's last gear and about 20× the posterior
    loop.
* **No blind equalizer.** The FFE is a plain decision-directed LMS
  equalizer. It is frozen until C and adapts only in the MMSE stage.
  Letting it adapt during DDML, while the carrier is still slipping, made
  the taps follow the rotating constellation into a false lock. No DFE is
  built.
* **Fixed stage lengths** replace an equalizer-convergence criterion.
* **Jitter (the −82 dBc target) is not measured.** The testbenches check
  the mean frequency error and the slicer MSE only.
* The analog front end and ADC are outside the design. The testbench source
  `tb/qam_source.sv` stands in for them.

## Files

`rtl/` (synthesizable, one unit per file):

* `cr_pkg.sv`: widths, the `cr_state_t` stage type, the `gear_t` type and
  `W0_DEFAULT`.
* `two_fold_cr_top.sv`: the top level.
  * Contains the mixer, IIR LPF, matched filters, FFEs, slicer, controller
    and `cr_core`.
  * Its outputs are the decisions and the loop observables: state, gear,
    `fcw`, `w_dc`, `dw`, phase error and the B/C pulses.
* `cr_core.sv`: instantiates `phase_detector.sv`, `prefilter.sv`,
  `gear_shift.sv`, `loop_filter.sv` and `nco.sv`. `nco.sv` in turn uses
  `nco_rom.sv`.
* The rest of the receiver path: `cr_controller.sv`, `mixer.sv`,
  `iir_lpf.sv`, `rcf_decim.sv`, `ffe.sv` and `slicer.sv`.

`tb/`:

* One self-checking testbench per module, `tb_<module>.sv`.
* `qam_source.sv`: a behavioural 64-QAM low-IF signal generator with
  root-raised-cosine shaping, carrier offset, start phase and noise.

## Simulating

Each testbench prints one line, `TB_RESULT checks=N failures=M`, and ends
with `$finish`. Build and run with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  -Irtl -Itb --top-module tb_two_fold_cr_top rtl/cr_pkg.sv tb/tb_two_fold_cr_top.sv
./obj_dir/Vtb_two_fold_cr_top
```

Swap the module name to run another testbench.

* The end-to-end run covers 250,000 symbols, i.e. 1,000,000 clocks, for two
  receivers. It takes a few seconds.
* To try other offsets, change the `FOFF_HZ` and `PHASE0` parameters of
  the two `qam_source` instances in `tb_two_fold_cr_top.sv`.
* To try other loop settings, pass `GEAR_*`, `PF_*` and the stage lengths
  to `two_fold_cr_top`.
