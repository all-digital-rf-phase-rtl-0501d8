# Phase-prediction all-digital PLL

This is an all-digital RF frequency synthesizer. It locks a digitally controlled LC oscillator (DCO) to a
fractional multiple of a reference clock, and it works entirely in the phase domain. Once per
reference cycle the expected phase of the oscillator is compared with its measured phase. The
difference is digitally filtered and steers the oscillator's capacitor banks.

The classical counter-based ADPLL measures the fractional part of the phase with a
time-to-digital converter (TDC) that spans a whole oscillator period, which costs area and power.
This design avoids that by *predicting* where the next oscillator edge will fall relative to the reference edge. A
digital-to-time converter (DTC) delays the reference edge by that predicted amount. In lock the
delayed reference then lands right next to an oscillator edge, and a TDC with only six levels
(±0.5, ±1.5, ±2.5 steps of 15 ps) is enough. It only has to resolve jitter, DTC quantization and
prediction errors. The DTC gain must be known for the prediction to work. A background estimator
learns it from the data.

The default operating point is a 26 MHz reference with FCW = 69.2308, which gives an output of
1.8 GHz. The DCO model starts near 2 GHz, and the DTC and TDC step is 15 ps.

## Signal flow

```
 fcw, fcw_mod                                                    fcw_mod (FM point)
     |                                                                  |
 ref_phase_acc --R_RF--> phase_predictor --dtc_ctrl--> dtc --FREF_D--+  |
     |  R_RI                 | residue          ^ 1/K_DTC            |  |
     |                       |            kdtc_recip <-- kdtc_estimator <-- sign(phi_EF), R_RF
     |                       |                                       v  |
     |           tdc_decode <-- tdc_core <-- CKV_G -- ckv_gate_ckr_gen <-- CKV
     |               | phi_EF (+ residue)                  | CKR, CKV/8 |
     v               v                                                  |
 phase_error_combiner <-- R_VI -- var_phase_acc <-- CKV, CKV_G          |
     | phi_E                                                            |
 iir_chain -> pi_ctrl (gear shift, type II)   = dlf                     |
     | NTW (units of f_R)                                               |
 dco_gain_norm (x f_R/K_DCO per bank, + FM) -> mash2_sd -> dco --CKV-----+
```

All logic runs on CKR, the reference clock retimed to the oscillator. The exceptions are the
CKV edge counter, the CKV/8 divider and the sigma-delta, which runs on CKV/8. `pp_adpll` is
the top level. `phase_error_detector` groups everything above the combiner.

## Reference phase and prediction

`ref_phase_acc` adds FCW (Q8.24) and the signed modulation word to the reference phase on every CKR.
The integer part R_RI (12 bits, modulo) goes to the integer phase comparison. The top 16
fractional bits R_RF go to the predictor and to the DTC-gain estimator. The register holds the
phase of the *next* reference edge, so the DTC code is ready before that edge arrives.

`phase_predictor` forms the DTC code (1 − R_RF)/K_DTC. It gets 1 − R_RF by inverting the bits of
R_RF. It multiplies by the reciprocal 1/K_DTC, which `kdtc_recip` makes with a combinational divider.
K_DTC is the DTC step expressed in oscillator periods: 15 ps × 1.8 GHz = 0.027, or about 37 steps
per period. The product has 12 fractional bits, and the `pp_mode` input selects how they are used:

* `PP_TRUNC` drops them.
* `PP_SD` dithers them into the code with a first-order sigma-delta. The quantization error then
  becomes high-pass noise instead of a fractional spur.
* `PP_RESIDUE` keeps the code truncated and sends the known residue, 0.5 − fraction, converted to
  oscillator periods with K_DTC, straight into the fractional phase error. The loop then never sees
  the truncation.

## Delay line, CKV gating and the narrow TDC

`dtc` is a behavioural model. It delays the rising reference edge by a 20 ps intrinsic delay plus
code × 15 ps. The code is the one present at that rising edge.

`ckv_gate_ckr_gen` is the small gate-level circuit that makes the narrow TDC workable. After the
delayed reference FREF_D rises, flip-flop I6 opens OR-gate I1. The first CKV rising edge then passes
as CKV_G, which clocks the TDC and the CKV-count sampler. That same edge sets I5 (CKR2). CKR2 clears
I6, so the gate closes again and all later CKV edges are blocked until the next reference cycle.
CKR2 is then retimed twice by CKV/8 to give CKR. CKR is therefore aligned to the oscillator and
comes 8 to 16 CKV periods after the measurement. This leaves time for the TDC and the sampler
to settle before the digital logic reads them.

`tdc_core` is a behavioural delay chain: a fixed offset delay followed by five 15 ps taps. It is
sampled on CKV_G into a thermometer code. `tdc_decode` takes the first zero as the edge and ignores
later bubbles. It converts the edge into a signed count of half steps, centred on the window
(−5…+5). It then scales that count by K_TDC, which is taken equal to K_DTC because the two are built from the same delay cells.
A positive φEF means the CKV edge came late relative to FREF_D. Because the TDC offset is constant,
it only shifts the lock point.

## Integer phase and the combiner

`var_phase_acc` counts every CKV edge and samples the count on CKV_G as R_VI. Its `en` input
stops it, as the integer path may be switched off once the loop is locked.

`phase_error_combiner` forms the integer phase error φEI = R_RI − R_VI + offset. The offset is
captured two CKR cycles after `int_en` rises or after `restart`, so φEI starts at zero and stays
zero while locked. Until the offset is captured φEI is held at zero. The combiner then builds φE
in one of two ways:

* `COMB_ADD` gives φE = φEI + φEF.
* `COMB_MUX` gives φE = φEI while the integer path is on and φEF once it is off.

The combiner registers φE on CKR.

## Loop filter and gear shifting

`dlf` is the combiner followed by `iir_chain` and `pi_ctrl`:

* **IIR cascade.** Four single-pole stages compute y += λ(x − y), with λ = 2^−`lam_sh`. Each stage
  can be bypassed through `iir_en`; in Bluetooth-like use the cascade is off.
* **Proportional path.** NTW = α·x + integral, with α = 2^−`alpha_sh`. The loop bandwidth is
  α·f_R/2π.
* **Gear shift.** When `alpha_sh` changes, an offset register takes up the step in α·x. This keeps
  the tuning word continuous, so narrowing the bandwidth during acquisition does not kick the
  oscillator. The `gear_event` output pulses when this happens.
* **Type II.** With `rho_en` the integral ρ·Σx is added (ρ = 2^−`rho_sh`). With `rho_res` set it
  uses the residue method: the integrator accumulates x − x₀, where x₀ is the error sampled at the
  switch-over. The switch from type I to type II then causes no transient. The catch is that the
  loop keeps x₀ as its standing phase error. With `rho_res` clear the plain integrator drives the
  mean phase error to zero. The DTC-gain estimator needs that, see below.

The 56-bit word has 40 fractional bits and is in units of f_R. A unit step in NTW is one reference
frequency.

## DCO control

`dco_gain_norm` multiplies the NTW by f_R/K_DCO for the active bank. There are three banks:

| Bank | Purpose | Width | Step (Q12.8 gain input) |
|------|---------|-------|-------------------------|
| P | PVT | 8 bits | 4 MHz |
| A | acquisition | 8 bits | 200 kHz |
| T | tracking | 7 integer + 8 fractional bits | 12 kHz |

The active bank's register is loaded every CKR with its centre code plus the scaled NTW. A
`restart` clears the loop filter, so a newly selected bank starts from its centre. The other banks
hold the codes they reached. Codes saturate at the bank limits. The frequency half of two-point
modulation enters on the tracking bank only. The modulation word is in FCW units, which are f_R, so it
is added to the NTW and scaled by the tracking gain f_R/K_DCO^T. This has the same effect as adding
an already-normalized modulation code to the tracking word.

`mash2_sd` is a MASH 1-1 modulator clocked by CKV/8. It dithers the 8 fractional tracking bits into
the 7-bit integer code. The average resolution is 12 kHz / 256 ≈ 47 Hz.

`dco` is a behavioural oscillator with a linear frequency model:
f = F_CENTER + (d_P − 128)·4 MHz + (d_A − 128)·200 kHz + (d_T − 64)·12 kHz. It has no noise. Edges
are scheduled from an accumulated ideal time, so the period is exact on average. A bias code of
zero stops it; otherwise bias has no effect in the model.

## DTC-gain (K_DTC) estimation

If K_DTC is wrong, the DTC mis-scales the predicted delay, and the error grows with R_RF. The
fractional phase error is then a sawtooth correlated with R_RF − 0.5. `kdtc_estimator` correlates
the two once per CKR, using only the sign of φEF:

1. It forms the product (R_RF − 0.5)·sign(φEF), with a mux selecting ±2^−b.
2. It low-pass filters the product with a first-order IIR, y = y(1 − 2^−a) + input.
3. It scales the result by μ and integrates it into K̂_DTC.

The defaults are a = 4, b = 0 and μ = 2^−16. `kdtc_load` loads a starting value and `kdtc_en` runs
the estimator. The correlation only converges to the right value when the mean of φEF is zero.
For that reason, the closed-loop test turns off the residue form of the type-II switch before
enabling estimation. With the sign convention above (φEF > 0 means the oscillator is late), an
overestimated K makes φEF positive while R_RF < 0.5, which gives a negative correlation. The
accumulator adds the correlation with a plus sign, so it pulls the estimate down toward the true
value. An underestimated K pushes it up.

## Bring-up sequence

The top exposes every loop setting as an input and contains no controller. The sequence below is
the one `tb/tb_pp_adpll.sv` applies, and a system controller would follow the same pattern:

1. **PVT bank.** Use `COMB_MUX` (integer error only) with α = 2^−3.
2. **Acquisition bank.** Apply `restart` and switch to `COMB_ADD`. Use α = 2^−4, then 2^−6.
3. **Tracking bank.** Apply `restart` and keep α = 2^−6.
   * Switch to type II with the residue method, ρ = 2^−14.
   * Then clear `rho_res`.
   * Then enable K_DTC estimation.
4. **Gear shift.** Move to α = 2^−7 and ρ = 2^−16, and switch the IIR cascade on.
5. **Integer path off.** Clear `int_en`.
6. **Prediction modes.** Try `PP_SD`, then `PP_RESIDUE`.
7. **Two-point modulation.** Apply a +100 kHz `fcw_mod` step. It is fed to both the reference
   phase and the tracking bank, so the phase error barely moves.

Each `restart` realigns the integer phase and clears the filter state.

## Departures and choices

These points are this design's own choices, where the source description gives no detail:

* All word lengths: FCW Q8.24, 12-bit integer phases, phase error Q12.16, a 16-bit K_DTC, a 7-bit
  DTC code and the 56-bit filter word. The bank widths are also chosen here, except the 8
  fractional tracking bits and the 7-bit bias, which come from the description.
* The reset style (asynchronous, active low).
* The alignment-offset timing in the combiner.
* The gear-shift implementation.
* Power-of-two coefficients throughout.
* The estimator constants a, b and μ.
* The divider inside `kdtc_recip`.

`rho_res` is an addition that lets the residue-method type-II switch and the K_DTC estimator
coexist.

Not built:

* A loop controller or lock detector.
* The pulse-swallower alternative for CKV gating.
* Freezing the loop to coast over expected disturbances. That would need the reference accumulator
  moved behind the phase detector, which is a different arrangement of the detector.
* A separate K_TDC estimate. K_TDC is taken equal to K_DTC.
* The oscillator's frequency dividers and its noise.
* Analog detail of the DTC and TDC, such as nonlinearity, mismatch and jitter.

The DTC-gain estimate is less precise here than in the source evaluation. On channels close to
an integer multiple of the reference it lands within about 3 % after some 2700 reference cycles,
against 1 % reported there.

The behavioural models (`dtc`, `tdc_core`, `dco`) use delays and `real` arithmetic and are for
simulation only. Verilator reports a zero-delay warning in `dco`; its header explains why it
stays. Every other file is synthesizable.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each testbench ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. For example, with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb --top-module tb_pp_adpll \
    rtl/adpll_pkg.sv rtl/*.sv tb/tb_pp_adpll.sv
./obj_dir/Vtb_pp_adpll            # +kerr=20 starts K_DTC 20 % high, +noest skips estimation
```

`tb_pp_adpll` runs the full bring-up sequence at the default parameters in well under a minute.
It measures the oscillator frequency independently, by counting CKV edges, and it checks lock at
each stage, the K_DTC convergence, the integer-path shutdown and the modulation step. It counts
each of these mechanisms and fails any that never happened:

* bank switches and restarts;
* use of the multiplexing combiner and of the integer phase error;
* TDC saturation during acquisition;
* gear shifts;
* the type-II switch;
* the IIR cascade;
* integer-path shutdown;
* K_DTC updates;
* sigma-delta changes of the DTC code;
* residue correction;
* tracking-bank dither;
* the modulation step.

The K_DTC estimate converges from 40 % high to within 3 %.

`tb_kdtc_channels` repeats a shortened bring-up on four channels, 0.1, 0.5, 1 and 10 MHz above
69 × 26 MHz. Each starts with the K_DTC estimate 40 % high, and the test checks lock and the
converged DTC step on every channel. Close to the integer channel, the phase-error sawtooth that
drives the estimator is slow (one period every 260 reference cycles at 0.1 MHz), and convergence is
slowest there.

`tb_two_point_gmsk` locks the loop, switches the integer path off and applies GSM-style GMSK. The
settings are 270.833 kbit/s (96 reference cycles per bit), BT = 0.3 and 67.7 kHz peak deviation,
driven from a pseudo-random bit stream through `fcw_mod`. The test measures the DCO frequency from
exact CKV edge times over 16-cycle windows. It checks three things:

* the frequency follows the Gaussian-filtered waveform to within 6 kHz (typically 2–3 kHz);
* the phase error stays inside the TDC range, because the two modulation points cancel;
* the eye is open at the bit centres.
