// weight_combine: the parallel beamformer's weight blend for one subband.
//
//   w = theta * w_LS + (1 - theta) * w_SNR
//
// theta (Q12.20, normally in [0, 1]) moves the beamformer continuously
// between the low-distortion least-squares weights (theta = 1) and the
// high-noise-suppression max-SNR weights (theta = 0).  The equation is the
// document's; the arithmetic is Q12.20 with truncation and saturation.
// Purely combinational: w is valid in the same clock as its inputs.
module weight_combine
  import bf_pkg::*;
#(
  parameter int unsigned M = N_MICS
)(
  input  fx_t  theta,
  input  cfx_t w_ls  [M],
  input  cfx_t w_snr [M],
  output cfx_t w     [M]
);

  fx_t one_m_theta;
  assign one_m_theta = fx_sub(FX_ONE, theta);

  always_comb begin
    for (int i = 0; i < M; i++)
      w[i] = c_add(c_rscale(theta, w_ls[i]), c_rscale(one_m_theta, w_snr[i]));
  end

endmodule
