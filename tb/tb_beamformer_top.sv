// tb_beamformer_top: end-to-end test of the beamforming engine at its
// default size (4 microphones, 32 subbands).
//
// The host port is used to load calibration data and start values for all
// subbands; then blocks of a four-channel test signal are streamed in with
// random gaps.  For every block the weights held in the engine before the
// block (the ones it must filter with) are read, and the expected output is
// computed here independently: a direct DFT of every channel, the blend
// theta w_LS + (1 - theta) w_SNR, y_k = w^H x_k, and a direct inverse DFT.
// theta is switched between blocks (pure LS, pure SNR, a blend).  After
// each block the adapted state is checked for plausibility: SNR weights of
// unit norm, P Hermitian, weights changed by the update.  The number of
// clocks per block is checked against the real-time budget of a 16 kHz
// sample rate at 184 MHz.  Each mechanism (forward and inverse transforms,
// correlation, LS and SNR updates, theta mode changes, all eigen-pair
// indices, input stalls) is counted and must occur.
module tb_beamformer_top;
  import bf_pkg::*;

  localparam int M = N_MICS;
  localparam int K = N_SUB;
  localparam int NBLK = 6;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [2:0] cfg_sel = '0;
  logic [$clog2(K)-1:0] cfg_k = '0;
  logic [$clog2(M)-1:0] cfg_r = '0, cfg_c = '0;
  cfx_t cfg_data = '0;
  fx_t  theta, lambda, lam_inv, alpha, beta;
  logic [3:0] n_iter;
  logic in_valid = 0, in_ready, out_valid, busy, block_done, rxx_singular;
  fft_t in_data [M];
  fft_t out_data;

  int checks = 0, failures = 0;
  int n_fwd = 0, n_inv = 0, n_corr = 0, n_ls = 0, n_snr = 0, n_stall = 0, n_theta_modes = 0;
  bit p_seen [M];

  always #5 clk = ~clk;

  beamformer_top dut (.*);

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fx_t tofx(real r);
    return fx_t'($rtoi(r * 1048576.0));
  endfunction
  function automatic real fromfx(fx_t v);
    return $itor(v) / 1048576.0;
  endfunction
  function automatic real rnd(real a);
    return ($itor($urandom_range(0, 20000)) - 10000.0) / 10000.0 * a;
  endfunction

  // mechanism counters from the engine's internal strobes
  always @(posedge clk) if (rst_n) begin
    if (dut.u_fft.in_valid && dut.u_fft.in_ready && dut.u_fft.cnt == 5'd0) begin
      if (dut.u_fft.inv) n_inv++; else n_fwd++;
    end
    if (dut.u_corr.done) n_corr++;
    if (dut.u_ls.done)   n_ls++;
    if (dut.u_snr.done)  n_snr++;
    if (in_valid && !in_ready) n_stall++;
    if (dut.u_ls.start)  p_seen[dut.p_idx] = 1'b1;
  end

  task automatic cfg(input logic [2:0] sel, input int kk, input int r, input int c,
                     input real re, input real im);
    @(negedge clk);
    cfg_we = 1; cfg_sel = sel; cfg_k = 5'(kk); cfg_r = 2'(r); cfg_c = 2'(c);
    cfg_data.re = tofx(re); cfg_data.im = tofx(im);
    @(negedge clk);
    cfg_we = 0;
  endtask

  real pi = 3.14159265358979;
  real xs [M][K];                       // time samples of a block
  real wl_r [K][M], wl_i [K][M], ws_r [K][M], ws_i [K][M];
  real yexp [K];

  task automatic snapshot_weights();
    for (int kk = 0; kk < K; kk++)
      for (int i = 0; i < M; i++) begin
        wl_r[kk][i] = fromfx(dut.wls_m[kk][i].re);  wl_i[kk][i] = fromfx(dut.wls_m[kk][i].im);
        ws_r[kk][i] = fromfx(dut.wsnr_m[kk][i].re); ws_i[kk][i] = fromfx(dut.wsnr_m[kk][i].im);
      end
  endtask

  task automatic expected_output(input real th);
    real Yr [K], Yi [K];
    for (int kk = 0; kk < K; kk++) begin
      Yr[kk] = 0; Yi[kk] = 0;
      for (int i = 0; i < M; i++) begin
        real Xr, Xi, wr, wi;
        Xr = 0; Xi = 0;
        for (int t = 0; t < K; t++) begin
          Xr += xs[i][t] * $cos(-2.0 * pi * kk * t / K) / K;
          Xi += xs[i][t] * $sin(-2.0 * pi * kk * t / K) / K;
        end
        wr = th * wl_r[kk][i] + (1.0 - th) * ws_r[kk][i];
        wi = th * wl_i[kk][i] + (1.0 - th) * ws_i[kk][i];
        Yr[kk] += wr * Xr + wi * Xi;
        Yi[kk] += wr * Xi - wi * Xr;
      end
    end
    for (int t = 0; t < K; t++) begin
      yexp[t] = 0;
      for (int kk = 0; kk < K; kk++)
        yexp[t] += Yr[kk] * $cos(2.0 * pi * kk * t / K) - Yi[kk] * $sin(2.0 * pi * kk * t / K);
    end
  endtask

  int blk_cycles;
  int nout;
  real got [K];

  always @(posedge clk) if (out_valid && nout < K) begin
    got[nout] = $itor(out_data) / 8388608.0;
    nout++;
  end

  initial begin
    real th;
    real prev_th;
    int cyc;
    theta = tofx(1.0); lambda = tofx(0.95); lam_inv = tofx(1.0 / 0.95);
    alpha = tofx(0.8); beta = tofx(0.9); n_iter = 4'd2;
    for (int i = 0; i < M; i++) in_data[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // calibration data: source steering vector with a per-subband phase
    for (int kk = 0; kk < K; kk++) begin
      real sr [M], si [M];
      for (int i = 0; i < M; i++) begin
        sr[i] = $cos(0.3 * i * kk / K * 2.0 * pi);
        si[i] = -$sin(0.3 * i * kk / K * 2.0 * pi);
      end
      for (int r = 0; r < M; r++) begin
        for (int c = 0; c < M; c++) begin
          cfg(3'd0, kk, r, c, sr[r] * sr[c] + si[r] * si[c] + ((r == c) ? 0.05 : 0.0),
                               si[r] * sr[c] - sr[r] * si[c]);
          cfg(3'd2, kk, r, c, (r == c) ? 1.0 : 0.0, 0.0);
          cfg(3'd4, kk, r, c, (r == c) ? 1.0 : 0.0, 0.0);
          cfg(3'd7, kk, r, c, (r == c) ? 0.5 : 0.0, 0.0);
        end
        cfg(3'd1, kk, r, 0, 0.25 * sr[r], 0.25 * si[r]);
        cfg(3'd3, kk, r, 0, 1.0 + 0.1 * r, 0.0);
        cfg(3'd5, kk, r, 0, (r == 0) ? 1.0 : 0.0, 0.0);
        cfg(3'd6, kk, r, 0, 0.5, 0.0);
      end
    end
    prev_th = 1.0;
    for (int b = 0; b < NBLK; b++) begin
      th = (b % 3 == 0) ? 1.0 : (b % 3 == 1) ? 0.0 : 0.3;
      if (th != prev_th) n_theta_modes++;
      prev_th = th;
      theta = tofx(th); th = fromfx(theta);
      for (int t = 0; t < K; t++) begin
        real src;
        src = 0.15 * $sin(2.0 * pi * 3.0 * (b * K + t) / K);
        for (int i = 0; i < M; i++) begin
          xs[i][t] = src + rnd(0.05);
          in_data[i] = fft_t'($rtoi(xs[i][t] * 8388608.0));
          xs[i][t] = $itor(in_data[i]) / 8388608.0;
        end
      end
      snapshot_weights();
      expected_output(th);
      nout = 0;
      // stream the block in, with random gaps
      for (int t = 0; t < K; t++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        for (int i = 0; i < M; i++) in_data[i] = fft_t'($rtoi(xs[i][t] * 8388608.0));
        while (!in_ready) @(negedge clk);
      end
      @(negedge clk);
      // one attempted sample while the block is processed: must be held off
      in_valid = 1;
      repeat (3) @(negedge clk);
      in_valid = 0;
      cyc = 4;
      while (!block_done) begin @(negedge clk); cyc++; end
      blk_cycles = cyc;
      // output against the independent model
      checks++;
      if (nout != K) begin failures++; $display("block %0d: %0d outputs", b, nout); end
      for (int t = 0; t < K; t++) begin
        checks++;
        if (got[t] - yexp[t] > 2e-4 || yexp[t] - got[t] > 2e-4) begin
          failures++;
          $display("block %0d theta %f sample %0d: got %f expected %f", b, th, t, got[t], yexp[t]);
        end
      end
      // adapted state
      for (int kk = 0; kk < K; kk++) begin
        real nn, dl;
        nn = 0; dl = 0;
        for (int i = 0; i < M; i++) begin
          nn += fromfx(dut.wsnr_m[kk][i].re) ** 2 + fromfx(dut.wsnr_m[kk][i].im) ** 2;
          dl += (fromfx(dut.wls_m[kk][i].re) - wl_r[kk][i]) ** 2
              + (fromfx(dut.wls_m[kk][i].im) - wl_i[kk][i]) ** 2;
        end
        checks++;
        if (nn > 1.002 || nn < 0.998) begin
          failures++; $display("block %0d subband %0d: ||w_SNR||^2 = %f", b, kk, nn);
        end
        checks++;
        if (dl == 0.0) begin
          failures++; $display("block %0d subband %0d: w_LS not updated", b, kk);
        end
        for (int r = 0; r < M; r++)
          for (int c = r + 1; c < M; c++) begin
            real d;
            d = (fromfx(dut.p_m[kk][r][c].re) - fromfx(dut.p_m[kk][c][r].re)) ** 2
              + (fromfx(dut.p_m[kk][r][c].im) + fromfx(dut.p_m[kk][c][r].im)) ** 2;
            checks++;
            if (d > 1e-8) begin
              failures++; $display("block %0d subband %0d: P not Hermitian at (%0d,%0d)", b, kk, r, c);
            end
          end
      end
      $display("block %0d: theta %f, %0d clocks from the first held-off sample to block_done",
               b, th, blk_cycles);
      // real time at 16 kHz and 184 MHz: K samples every K/16000 s
      checks++;
      if (blk_cycles > 368000) begin failures++; $display("block too slow"); end
      // measured schedule: 4 x (32 + 80 + 32 + 1) transform clocks, 32 x (1 + 17 +
      // SNR update with 2 iterations + 2) subband clocks, 32 + 80 + 32 inverse
      checks++;
      if (blk_cycles != 11985) begin failures++; $display("block took %0d clocks, expected 11985", blk_cycles); end
    end
    checks++;
    if (rxx_singular) begin failures++; $display("R_xx reported singular"); end
    $display("mechanisms: fwd FFT %0d, inverse FFT %0d, corr %0d, LS %0d, SNR %0d, theta changes %0d, stalls %0d",
             n_fwd, n_inv, n_corr, n_ls, n_snr, n_theta_modes, n_stall);
    checks++; if (n_fwd != NBLK * M) begin failures++; $display("forward transforms %0d", n_fwd); end
    checks++; if (n_inv != NBLK) begin failures++; $display("inverse transforms %0d", n_inv); end
    checks++; if (n_corr != NBLK * K) begin failures++; $display("corr updates %0d", n_corr); end
    checks++; if (n_ls != NBLK * K) begin failures++; $display("LS updates %0d", n_ls); end
    checks++; if (n_snr != NBLK * K) begin failures++; $display("SNR updates %0d", n_snr); end
    checks++; if (n_theta_modes == 0) begin failures++; $display("theta never changed"); end
    checks++; if (n_stall == 0) begin failures++; $display("no input stall"); end
    for (int p = 0; p < M; p++) begin
      checks++;
      if (!p_seen[p]) begin failures++; $display("eigen-pair %0d never used", p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
