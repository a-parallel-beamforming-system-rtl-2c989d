// beamformer_top: frequency-domain parallel LS / max-SNR beamforming engine
// for an M-microphone array.
//
// A block of K samples per microphone is transformed with the K-point FFT,
// and every one of the K frequency subbands is processed on its own:
//   1. filter: y_k = w^H x_k with w = theta w_LS + (1 - theta) w_SNR, the
//      weights being those adapted on the previous block;
//   2. adapt: the subband's data correlation matrix R_xx is updated from
//      x_k, then the least-squares update (ls_update) and the power-method
//      max-SNR update (snr_update) run side by side on the same subband and
//      write back P, w_LS and w_SNR.
// The K filtered subbands are taken back to the time domain with the
// inverse FFT and the real part is streamed out.  One FFT/IFFT unit and one
// pair of update units are shared by all channels and subbands, which is
// the document's base configuration (one transform and one update
// accelerator).  The structure (two optimisers in parallel on each received
// block, blended by theta, applied to the next block) follows the document;
// the schedule, the memories and the interfaces are this design's own.
//
// Calibration data is not computed here: the host processor writes, per
// subband, the source correlation R_ss, the cross-correlation r_s, the
// eigen-pairs (gamma_p, q_p) of the total correlation, and the initial P,
// weights and R_xx, through the cfg_* port (one complex word per clock,
// selected by cfg_sel / cfg_k / cfg_r / cfg_c; gamma uses the real part).
// theta, lambda, 1/lambda, alpha, beta and the number of power iterations
// are static inputs.  The eigen-pair used for block n is p = n mod M.
//
// Stream interface: in_data carries one sample of every microphone (Q1.23)
// and is accepted when in_valid && in_ready; after K samples the block is
// processed and K output samples (Q1.23) appear on out_data with out_valid
// on consecutive clocks, with no back-pressure.  in_ready is low while a
// block is being processed (no overlap between blocks).
// Timing for M = 4, K = 32 and two power iterations per update: 11,985
// clocks from the last input sample to block_done (each extra power
// iteration adds 73 clocks per subband); see the README for the breakdown.
module beamformer_top
  import bf_pkg::*;
#(
  parameter int unsigned M = N_MICS,
  parameter int unsigned K = N_SUB
)(
  input  logic        clk,
  input  logic        rst_n,
  // host configuration
  input  logic        cfg_we,
  input  logic [2:0]  cfg_sel,
  input  logic [$clog2(K)-1:0] cfg_k,
  input  logic [$clog2(M)-1:0] cfg_r,
  input  logic [$clog2(M)-1:0] cfg_c,
  input  cfx_t        cfg_data,
  input  fx_t         theta,
  input  fx_t         lambda,
  input  fx_t         lam_inv,
  input  fx_t         alpha,
  input  fx_t         beta,
  input  logic [3:0]  n_iter,
  // sample streams
  input  logic        in_valid,
  output logic        in_ready,
  input  fft_t        in_data [M],
  output logic        out_valid,
  output fft_t        out_data,
  // status
  output logic        busy,
  output logic        block_done,
  output logic        rxx_singular
);

  localparam int unsigned KW = $clog2(K);
  localparam int unsigned MW = $clog2(M);

  // cfg_sel codes
  localparam logic [2:0] SEL_RSS  = 3'd0;   // R_ss[k][r][c]
  localparam logic [2:0] SEL_RS   = 3'd1;   // r_s[k][r]
  localparam logic [2:0] SEL_Q    = 3'd2;   // q_p[k][p = r][element c]
  localparam logic [2:0] SEL_GAM  = 3'd3;   // gamma_p[k][p = r] (real part)
  localparam logic [2:0] SEL_P    = 3'd4;   // P[k][r][c]
  localparam logic [2:0] SEL_WLS  = 3'd5;   // w_LS[k][r]
  localparam logic [2:0] SEL_WSNR = 3'd6;   // w_SNR[k][r]
  localparam logic [2:0] SEL_RXX  = 3'd7;   // R_xx[k][r][c]

  // ------------------------------------------------------------ memories
  cfx_t rss_m  [K][M][M];
  cfx_t rxx_m  [K][M][M];
  cfx_t p_m    [K][M][M];
  cfx_t q_m    [K][M][M];
  fx_t  gam_m  [K][M];
  cfx_t rs_m   [K][M];
  cfx_t wls_m  [K][M];
  cfx_t wsnr_m [K][M];

  fft_t tbuf   [M][K];     // time samples of the current block
  cfx_t xf     [M][K];     // spectra of the current block
  cfx_t yf     [K];        // filtered subbands

  // ------------------------------------------------------------ control
  typedef enum logic [3:0] {
    S_IN, S_FFT_FEED, S_FFT_COL, S_FILT, S_CORR, S_UPD, S_IFFT_FEED, S_IFFT_COL
  } state_t;
  state_t state;

  logic [KW-1:0] n_cnt;        // sample / bin counter
  logic [KW-1:0] k;            // current subband
  logic [MW-1:0] ch;           // current channel
  logic [MW-1:0] p_idx;        // eigen-pair index = block number mod M
  logic          ls_ok, snr_ok;

  // ------------------------------------------------------------ FFT unit
  logic fft_in_valid, fft_in_ready, fft_inv, fft_out_valid;
  fft_t fft_in_re, fft_in_im, fft_out_re, fft_out_im;
  fft32 u_fft (
    .clk, .rst_n,
    .in_valid(fft_in_valid), .in_ready(fft_in_ready), .inv(fft_inv),
    .in_re(fft_in_re), .in_im(fft_in_im),
    .out_valid(fft_out_valid), .out_re(fft_out_re), .out_im(fft_out_im)
  );

  always_comb begin
    fft_in_valid = 1'b0;
    fft_inv      = 1'b0;
    fft_in_re    = '0;
    fft_in_im    = '0;
    if (state == S_FFT_FEED) begin
      fft_in_valid = 1'b1;
      fft_in_re    = tbuf[ch][n_cnt];
    end else if (state == S_IFFT_FEED) begin
      fft_in_valid = 1'b1;
      fft_inv      = 1'b1;
      fft_in_re    = fft_from_fx(yf[n_cnt].re);
      fft_in_im    = fft_from_fx(yf[n_cnt].im);
    end
  end

  // --------------------------------------------------- subband datapath
  cfx_t x_k [M];
  always_comb
    for (int i = 0; i < M; i++) x_k[i] = xf[i][k];

  cfx_t w_theta [M];
  cfx_t y_k;
  weight_combine #(.M(M)) u_comb (
    .theta(theta), .w_ls(wls_m[k]), .w_snr(wsnr_m[k]), .w(w_theta)
  );
  subband_filter #(.M(M)) u_filt (.w(w_theta), .x(x_k), .y(y_k));

  logic corr_start, corr_busy, corr_done;
  cfx_t rxx_new [M][M];
  corr_update #(.M(M)) u_corr (
    .clk, .rst_n, .start(corr_start), .R_in(rxx_m[k]), .x(x_k), .beta(beta),
    .R_out(rxx_new), .busy(corr_busy), .done(corr_done)
  );

  logic upd_start;
  logic ls_busy, ls_done;
  cfx_t p_new [M][M];
  cfx_t wls_new [M];
  fx_t  g_p;
  assign g_p = fx_mul(gam_m[k][p_idx], fx_sub(FX_ONE, lambda));
  ls_update #(.M(M)) u_ls (
    .clk, .rst_n, .start(upd_start),
    .P_in(p_m[k]), .x(x_k), .qp(q_m[k][p_idx]), .g(g_p), .lam_inv(lam_inv),
    .alpha(alpha), .rs(rs_m[k]), .w_in(wls_m[k]),
    .P_out(p_new), .w_out(wls_new), .busy(ls_busy), .done(ls_done)
  );

  logic snr_busy, snr_done, snr_sing;
  cfx_t wsnr_new [M];
  snr_update #(.M(M)) u_snr (
    .clk, .rst_n, .start(upd_start),
    .Rxx(rxx_m[k]), .Rss(rss_m[k]), .v_in(wsnr_m[k]), .n_iter(n_iter),
    .w_out(wsnr_new), .busy(snr_busy), .done(snr_done), .singular(snr_sing)
  );

  assign in_ready  = (state == S_IN);
  assign busy      = (state != S_IN);
  assign out_valid = (state == S_IFFT_COL) && fft_out_valid;
  assign out_data  = fft_out_re;

  // ------------------------------------------------------------ sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IN;
      n_cnt <= '0; k <= '0; ch <= '0; p_idx <= '0;
      ls_ok <= 1'b0; snr_ok <= 1'b0;
      corr_start <= 1'b0; upd_start <= 1'b0;
      block_done <= 1'b0; rxx_singular <= 1'b0;
      for (int a = 0; a < M; a++)
        for (int b = 0; b < K; b++) begin
          tbuf[a][b] <= '0;
          xf[a][b]   <= CFX_ZERO;
        end
      for (int b = 0; b < K; b++) yf[b] <= CFX_ZERO;
    end else begin
      corr_start <= 1'b0;
      upd_start  <= 1'b0;
      block_done <= 1'b0;
      unique case (state)
        S_IN: if (in_valid) begin
          for (int a = 0; a < M; a++) tbuf[a][n_cnt] <= in_data[a];
          n_cnt <= n_cnt + 1'b1;
          if (n_cnt == KW'(K - 1)) begin
            ch    <= '0;
            state <= S_FFT_FEED;
          end
        end
        // forward transform of channel ch
        S_FFT_FEED: if (fft_in_ready) begin
          n_cnt <= n_cnt + 1'b1;
          if (n_cnt == KW'(K - 1)) state <= S_FFT_COL;
        end
        S_FFT_COL: if (fft_out_valid) begin
          xf[ch][n_cnt] <= '{re: fx_from_fft(fft_out_re), im: fx_from_fft(fft_out_im)};
          n_cnt <= n_cnt + 1'b1;
          if (n_cnt == KW'(K - 1)) begin
            if (ch == MW'(M - 1)) begin
              k     <= '0;
              state <= S_FILT;
            end else begin
              ch    <= ch + 1'b1;
              state <= S_FFT_FEED;
            end
          end
        end
        // filter subband k with the weights of the previous block
        S_FILT: begin
          yf[k]      <= y_k;
          corr_start <= 1'b1;
          state      <= S_CORR;
        end
        S_CORR: if (corr_done) begin
          rxx_m[k]  <= rxx_new;
          upd_start <= 1'b1;
          ls_ok     <= 1'b0;
          snr_ok    <= 1'b0;
          state     <= S_UPD;
        end
        // LS and SNR updates of subband k run in parallel
        S_UPD: begin
          if (ls_done) begin
            p_m[k]   <= p_new;
            wls_m[k] <= wls_new;
            ls_ok    <= 1'b1;
          end
          if (snr_done) begin
            wsnr_m[k]    <= wsnr_new;
            snr_ok       <= 1'b1;
            if (snr_sing) rxx_singular <= 1'b1;
          end
          if ((ls_ok || ls_done) && (snr_ok || snr_done)) begin
            k <= k + 1'b1;
            if (k == KW'(K - 1)) begin
              n_cnt <= '0;
              state <= S_IFFT_FEED;
            end else begin
              state <= S_FILT;
            end
          end
        end
        // inverse transform of the filtered subbands
        S_IFFT_FEED: if (fft_in_ready) begin
          n_cnt <= n_cnt + 1'b1;
          if (n_cnt == KW'(K - 1)) state <= S_IFFT_COL;
        end
        S_IFFT_COL: if (fft_out_valid) begin
          n_cnt <= n_cnt + 1'b1;
          if (n_cnt == KW'(K - 1)) begin
            p_idx      <= (p_idx == MW'(M - 1)) ? '0 : p_idx + 1'b1;
            block_done <= 1'b1;
            state      <= S_IN;
          end
        end
        default: state <= S_IN;
      endcase
      // host writes to the calibration and state memories (only while idle)
      if (cfg_we) begin
        unique case (cfg_sel)
          SEL_RSS:  rss_m[cfg_k][cfg_r][cfg_c] <= cfg_data;
          SEL_RS:   rs_m[cfg_k][cfg_r]         <= cfg_data;
          SEL_Q:    q_m[cfg_k][cfg_r][cfg_c]   <= cfg_data;
          SEL_GAM:  gam_m[cfg_k][cfg_r]        <= cfg_data.re;
          SEL_P:    p_m[cfg_k][cfg_r][cfg_c]   <= cfg_data;
          SEL_WLS:  wls_m[cfg_k][cfg_r]        <= cfg_data;
          SEL_WSNR: wsnr_m[cfg_k][cfg_r]       <= cfg_data;
          default:  rxx_m[cfg_k][cfg_r][cfg_c] <= cfg_data;
        endcase
      end
    end
  end

  if (K != 32) begin : g_fft_size_check
    $error("beamformer_top: the transform unit is 32 points");
  end

  // the host must not rewrite the memories while a block is in flight
  assert property (@(posedge clk) disable iff (!rst_n) cfg_we |-> state == S_IN);

endmodule
