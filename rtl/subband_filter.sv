// subband_filter: output of the beamformer in one frequency subband.
//
//   y = w^H x = sum_i conj(w_i) x_i
//
// x holds the M microphone spectra of one subband and w the blended
// weights.  The conjugated form is the one the document writes for the
// subband output of its adaptive algorithm; its frequency-domain signal
// model writes the same sum without the conjugate, and this design follows
// the former.  The M products are summed at full precision (67 bits) and rescaled
// once (Q12.20, saturating).  Purely combinational.
module subband_filter
  import bf_pkg::*;
#(
  parameter int unsigned M = N_MICS
)(
  input  cfx_t w [M],
  input  cfx_t x [M],
  output cfx_t y
);

  always_comb begin
    logic signed [66:0] acc_re, acc_im, wr, wi, xr, xi;
    acc_re = '0;
    acc_im = '0;
    for (int i = 0; i < M; i++) begin
      wr = w[i].re; wi = w[i].im;
      xr = x[i].re; xi = x[i].im;
      acc_re = acc_re + wr * xr + wi * xi;
      acc_im = acc_im + wr * xi - wi * xr;
    end
    acc_re = acc_re >>> FX_FRAC;
    acc_im = acc_im >>> FX_FRAC;
    y.re = fx_sat64(acc_re[63:0]);
    y.im = fx_sat64(acc_im[63:0]);
  end

endmodule
