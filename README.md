# Parallel LS / max-SNR subband beamformer

A microphone array can trade speech distortion against noise suppression.
A least-squares (LS) beamformer, calibrated on a recording of the talker
alone, keeps distortion low but suppresses little noise. A maximum-SNR
beamformer suppresses much more noise but distorts the speech. This engine
runs both adaptive beamformers side by side in every frequency subband and
filters with a blend of the two weight vectors:

    w = theta * w_LS + (1 - theta) * w_SNR

`theta` is an input, so one setting moves the output continuously between
the two extremes. Speech recognisers are sensitive to this trade-off, and
the design targets voice-control front ends.

The RTL follows the structure published in *A parallel beamforming system
with real-time implementation*. That paper gives the algorithms, the
hybrid fixed/floating-point split, the 32-point 24-bit transform and the
4x4 subband matrices. It gives no micro-architecture. The schedules,
memories, interfaces and number-format details here are this design's own
and are listed under "Departures and limits".

## Signal flow of one block

The engine works on blocks of K = 32 samples from M = 4 microphones.

1. **Capture.** 32 four-channel samples (Q1.23) arrive over a valid/ready
   stream. `in_ready` stays low while a block is being processed.
2. **Forward FFT.** The single `fft32` unit transforms each channel in
   turn. Its output, the FFT divided by 32, becomes Q12.20 spectra
   `x_k`, one 4-vector per subband k.
3. **Per subband k = 0..31, in order:**
   * *Filter:* `y_k = w^H x_k`, where `w` blends the LS and SNR weights
     stored for subband k. These weights were adapted on the **previous**
     block: a block is always filtered with weights the engine already
     holds, then used to adapt them.
   * *Correlation:* `R_xx <- beta R_xx + (1-beta) x_k x_k^H` (`corr_update`).
   * *Adapt, in parallel:* `ls_update` and `snr_update` start on the same
     clock for subband k. The sequencer waits for both, then writes back
     `P`, `w_LS` and `w_SNR`.
4. **Inverse FFT.** The 32 filtered subbands go through the same `fft32`
   in inverse mode. The real part streams out on `out_data` with
   `out_valid`, 32 consecutive clocks, with no back-pressure.

`block_done` pulses at the end. The eigen-pair index `p` (below) then
advances, modulo M.

## The two weight updates

### LS update (`ls_update`, all fixed point)

`P` is the inverse of the total correlation matrix: the calibrated source
correlation plus the data correlation. It is never inverted directly.
Each block applies two rank-one corrections, then smooths the weights:

    u   = P x                       (P is Hermitian, so x^H P = u^H)
    P'  = l P - l^2 u u^H / (1 + l x^H u)          l = 1/lambda
    v   = P' q_p
    P_n = P' - g v v^H / (1 + g q_p^H v)           g = gamma_p (1 - lambda)
    w   = alpha w + (1 - alpha) P_n r_s

* The first correction brings in the new snapshot with forgetting factor
  `lambda`.
* The second brings back one eigen-pair `(gamma_p, q_p)` of the calibrated
  matrix. This keeps the calibration information from being forgotten. The
  pair index rotates, `p = block number mod M`.
* `r_s` is the calibrated source cross-correlation.

A sequencer does one complex multiply-accumulate per clock. The two scalar
divisions share one sequential divider (`fx_div`, 52 quotient bits). The
update takes 200 clocks.

### Max-SNR update (`snr_update`, hybrid)

The max-SNR weights are the dominant eigenvector of `A = R_xx^-1 R_ss`.
The power method finds it:

    v <- A v / ||A v||

It starts from the previous block's SNR weights, so a few iterations per
block (input `n_iter`) are enough to track a slowly changing noise field.

Fixed point is not accurate enough to invert `R_xx`. Only that step runs
in floating point:

* `R_xx` is converted to floating point.
* `cmat_inv_fp` inverts it by Cramer's rule, with no pivoting:
  * all 16 cofactors, each the signed sum of six 3-term products, one
    product per clock;
  * the determinant, by expansion along row 0;
  * one complex reciprocal, computed as `conj(det)/|det|^2`;
  * the adjugate scaled by that reciprocal.
* The inverse is converted back to Q12.20.

The rest is fixed point:

* 64 MACs for `A`.
* Per iteration: 16 MACs for `A v`, the squared norm, a bit-serial square
  root, one reciprocal on the divider, and four scalings.
* Timing: `186 + 73 * n_iter` clocks.

The power-method vector is used as the weight vector directly. It already
is the generalized eigenvector, so no whitening transform
(`R_xx^-1/2`) is applied.

## Number formats (`bf_pkg`)

| type    | format | used for |
|---------|--------|----------|
| `fx_t`  | 32-bit signed Q12.20 (12 integer bits, sign included) | all matrices, vectors and weights |
| `fl_t`  | 32-bit float, IEEE-single layout; no subnormals, infinities or NaNs; truncating; overflow saturates to the largest finite value | the matrix inversion only |
| `fft_t` | 24-bit Q1.23 | stream samples, FFT data |

* Fixed-point results truncate (floor) and saturate.
* The forward FFT halves each of its 5 stages, so it cannot overflow.
* The inverse FFT is unscaled and saturating, so `IFFT(FFT(x)) = x`.
* A spectrum goes from Q1.23 to Q12.20 by an arithmetic right shift of 3.
  Filtered subbands are saturated back to [-1, 1) before the inverse
  transform.

## Host interface

The host processor computes the calibration data: `R_ss`, `r_s` and the
eigen-decomposition of the total correlation. It loads that data, plus
start values, through a write port. `cfg_we` writes `cfg_data`, a complex
Q12.20 word, into the memory that `cfg_sel` selects, at subband `cfg_k`,
row `cfg_r` and column `cfg_c`:

| `cfg_sel` | memory | index |
|-----------|--------|-------|
| 0 | `R_ss` | [k][r][c] |
| 1 | `r_s` | [k][r] |
| 2 | eigenvectors `q_p` | [k][p=r][element c] |
| 3 | eigenvalues `gamma_p` (real part of `cfg_data`) | [k][p=r] |
| 4 | `P`, normally the inverse of the initial total correlation | [k][r][c] |
| 5 | `w_LS` | [k][r] |
| 6 | `w_SNR`, the power-method start vector | [k][r] |
| 7 | `R_xx` | [k][r][c] |

* Writes are allowed only while the engine is idle (`busy` low). An
  assertion checks this.
* `theta`, `lambda`, `lam_inv` (=1/lambda), `alpha`, `beta` and `n_iter`
  are static inputs. The host supplies `1/lambda` so that the engine
  needs no extra divider.
* `rxx_singular` is sticky. It is set if a determinant is exactly zero;
  the affected weights then go to zero.

## Timing and throughput

These counts are at the defaults (M = 4, K = 32) with `n_iter = 2`,
measured in simulation:

| phase | clocks |
|-------|--------|
| 4 forward transforms: feed 32 + butterflies 80 + unload 32, per channel | about 580 |
| 32 subbands: filter 1 + correlation 17 + max(LS 200, SNR 332) + handover | about 11,200 |
| inverse transform | about 145 |
| **block, from end of input to `block_done`** | **11,985** |

* At 184 MHz, the clock the paper reports for its Virtex-4 accelerator,
  a 32-sample block takes 65 us. That is about 490,000 samples/s.
* Real time at 16 kHz needs 16,000 samples/s.
* This RTL has not been synthesised for an FPGA, so whether it reaches
  184 MHz is unknown. Each update unit has a combinational complex
  multiply in one clock, and the inverter a product of three complex
  floats; a fast target would need pipelining there.
* The SNR update is the critical path of the schedule. LS and SNR
  updates of one subband overlap completely.

## Departures and limits

* **Subband count.** The paper's simulations use a 128-subband filter bank
  with decimation 64 and 64-sample blocks. Its profiled hardware kernel
  is a 32-point FFT. This design follows the 32-point transform:
  32 subbands, 32-sample non-overlapping blocks, no analysis window and no
  prototype filter. Circular-convolution effects of plain block FFT
  filtering are therefore present.
* **Instances.** One transform unit and one pair of update units. The
  paper's scaled-up configurations, with up to 4 transform units and 3
  update units, are not built.
* **Bit widths.** Q12.20 is fixed in `bf_pkg`. The other integer/fraction
  splits that were studied are not parameterised.
* **Subband output.** `y = w^H x`, the conjugated form. The weights are
  conjugated.
* **Left to the host.** Calibration and eigen-decomposition. The
  processor and its co-processor bus are not modelled; a plain write
  port replaces them.
* **Not exploited.** All 32 bins are processed, although a real input
  gives a conjugate-symmetric spectrum.
* **Fixed sizes.** The inverter is fixed at 4x4 and the transform at
  32 points. Both are checked at elaboration.

## Files

| file | content |
|------|---------|
| `rtl/bf_pkg.sv` | sizes, types, fixed and float arithmetic functions |
| `rtl/fft32.sv` | 32-point FFT / IFFT |
| `rtl/fx_div.sv` | sequential Q12.20 divider |
| `rtl/corr_update.sv` | recursive `R_xx` estimate |
| `rtl/ls_update.sv` | LS weight update |
| `rtl/cmat_inv_fp.sv` | floating-point Cramer's-rule 4x4 inverse |
| `rtl/snr_update.sv` | power-method max-SNR update |
| `rtl/weight_combine.sv` | theta blend |
| `rtl/subband_filter.sv` | `w^H x` |
| `rtl/beamformer_top.sv` | the engine |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=F` and ends with
`$finish`. For example, the end-to-end test:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_beamformer_top \
        -y rtl -y tb +libext+.sv rtl/bf_pkg.sv tb/tb_beamformer_top.sv
    ./obj_dir/Vtb_beamformer_top

It runs in under a second at the default size. The same command with
another `tb_<module>` runs the unit tests.

What the tests check, against models written independently in
double-precision arithmetic inside each testbench:

* `tb_fft32`: forward and inverse transforms against a direct DFT, the
  80-clock compute latency, and the frame length.
* `tb_ls_update`: `P_n` and `w_n` after each step, and 200 clocks per
  update.
* `tb_cmat_inv_fp`: that `A * Ainv = I`, including matrices scaled by 50;
  the singular flag; 119 clocks.
* `tb_snr_update`: against Gauss-Jordan inversion followed by the same
  power iterations, 1 to 4 iterations; unit norm; cycle count.
* `tb_corr_update`, `tb_weight_combine`, `tb_subband_filter`: element by
  element; the last one also checks saturation.
* `tb_beamformer_top`: the full default-size engine over 6 blocks.
  * Every output sample is compared with a DFT -> blend -> `w^H x` ->
    inverse-DFT model that uses the weights the engine held before the
    block.
  * `theta` is switched between 1, 0 and 0.3.
  * The adapted state is checked: SNR weights of unit norm, `P` still
    Hermitian, LS weights updated.
  * It checks 11,985 clocks per block.
  * It checks that input stalls, both transform directions, every update
    type and all four eigen-pair indices occur.

The end-to-end test does not check adapted weights against a full
independent model of the adaptation; the unit tests cover that.
