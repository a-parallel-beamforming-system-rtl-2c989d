// snr_update: adaptation of the maximum-SNR subband beamformer by the power
// method.
//
// The max-SNR weights are the dominant generalized eigenvector of the pair
// (R_ss, R_xx): the source and observed-data correlation matrices of one
// subband.  With A = R_xx^-1 R_ss (R_xx is Hermitian, so R_xx^-H = R_xx^-1)
// the power method iterates
//   v <- A v / ||A v||
// from a start vector, here the previous weights, so the weights track a
// changing noise field with a few iterations per update.
//
// How it works, following the document's hybrid arithmetic: R_xx is
// converted to floating point and inverted by Cramer's rule (cmat_inv_fp);
// the inverse is converted back to Q12.20 and everything else runs in fixed
// point: A = R_xx^-1 R_ss (64 complex MACs, one per clock), then per
// iteration z = A v (16 MACs), ||z||^2, its square root, one reciprocal on
// the shared sequential divider and the scaling of z.  A zero z leaves v
// unchanged.
//
// This design's choices: the vector of the power method is used directly
// as the weight vector (it already is the generalized eigenvector, so the
// whitening transform of the eigen-problem is not applied in hardware), the
// start vector is the previous weight vector, and the number of iterations
// per update is an input.
//
// Interface: inputs are sampled on the clock where start is high; done
// pulses one clock when w_out holds the new unit-norm weights (held until
// the next start); singular reports that R_xx could not be inverted.
// Timing, M = 4: 1 + 119 + 1 + 64 + n_iter * (16 + 1 + 55 + 1) + 1 clocks
// from the start clock to done (259 for one iteration).
module snr_update
  import bf_pkg::*;
#(
  parameter int unsigned M = N_MICS
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  cfx_t       Rxx   [M][M],
  input  cfx_t       Rss   [M][M],
  input  cfx_t       v_in  [M],
  input  logic [3:0] n_iter,
  output cfx_t       w_out [M],
  output logic       busy,
  output logic       done,
  output logic       singular
);

  localparam int unsigned IW = (M > 1) ? $clog2(M) : 1;

  typedef enum logic [3:0] {
    S_IDLE, S_INV, S_A, S_Z, S_SQ, S_DV, S_N, S_DONE
  } state_t;
  state_t state;

  cfx_t Rs [M][M], Ri [M][M], A [M][M];
  cfx_t v [M], z [M];
  cfx_t acc;
  fx_t  n2;
  logic [3:0] iters;
  logic [IW-1:0] i, j, l;
  logic last_i, last_j, last_l;

  assign last_i = (i == IW'(M - 1));
  assign last_j = (j == IW'(M - 1));
  assign last_l = (l == IW'(M - 1));
  assign busy   = (state != S_IDLE);

  // floating-point inverter (Cramer's rule)
  cfl_t fA [4][4], fAi [4][4];
  logic inv_start, inv_done, inv_busy, inv_sing;
  cmat_inv_fp u_inv (
    .clk, .rst_n, .start(inv_start), .A(fA), .Ainv(fAi),
    .busy(inv_busy), .done(inv_done), .singular(inv_sing)
  );

  // shared divider
  logic div_start, div_done, div_busy;
  fx_t  div_den, div_q;
  fx_div u_div (
    .clk, .rst_n, .start(div_start), .num(FX_ONE), .den(div_den),
    .busy(div_busy), .done(div_done), .q(div_q)
  );

  // one complex MAC per clock
  cfx_t mac_sum;
  always_comb begin
    if (state == S_A) mac_sum = c_add(acc, c_mul(Ri[i][l], Rs[l][j]));
    else              mac_sum = c_add(acc, c_mul(A[i][j], v[j]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done <= 1'b0; singular <= 1'b0;
      inv_start <= 1'b0; div_start <= 1'b0; div_den <= '0;
      acc <= CFX_ZERO; n2 <= '0; iters <= '0;
      i <= '0; j <= '0; l <= '0;
      for (int a = 0; a < M; a++) begin
        v[a] <= CFX_ZERO; z[a] <= CFX_ZERO;
        for (int b = 0; b < M; b++) begin
          Rs[a][b] <= CFX_ZERO; Ri[a][b] <= CFX_ZERO; A[a][b] <= CFX_ZERO;
        end
      end
      for (int a = 0; a < 4; a++)
        for (int b = 0; b < 4; b++) fA[a][b] <= '0;
    end else begin
      done      <= 1'b0;
      inv_start <= 1'b0;
      div_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          for (int a = 0; a < M; a++)
            for (int b = 0; b < M; b++) fA[a][b] <= cfl_from_cfx(Rxx[a][b]);
          Rs        <= Rss;
          v         <= v_in;
          iters     <= n_iter;
          inv_start <= 1'b1;
          state     <= S_INV;
        end
        S_INV: if (inv_done) begin
          for (int a = 0; a < M; a++)
            for (int b = 0; b < M; b++) Ri[a][b] <= cfx_from_cfl(fAi[a][b]);
          singular <= inv_sing;
          i <= '0; j <= '0; l <= '0; acc <= CFX_ZERO;
          state <= S_A;
        end
        // A = R_xx^-1 R_ss
        S_A: begin
          l <= last_l ? '0 : l + 1'b1;
          if (last_l) begin
            A[i][j] <= mac_sum;
            acc <= CFX_ZERO;
            j <= last_j ? '0 : j + 1'b1;
            if (last_j) begin
              i <= last_i ? '0 : i + 1'b1;
              if (last_i) begin
                n2 <= '0;
                state <= (iters == 4'd0) ? S_DONE : S_Z;
              end
            end
          end else acc <= mac_sum;
        end
        // z = A v and ||z||^2
        S_Z: begin
          j <= last_j ? '0 : j + 1'b1;
          if (last_j) begin
            z[i] <= mac_sum;
            n2   <= fx_add(n2, c_abs2(mac_sum));
            acc  <= CFX_ZERO;
            i    <= last_i ? '0 : i + 1'b1;
            if (last_i) state <= S_SQ;
          end else acc <= mac_sum;
        end
        S_SQ: begin
          div_den   <= fx_sqrt(n2);
          div_start <= (n2 > 0);
          state     <= (n2 > 0) ? S_DV : S_N;
        end
        S_DV: if (div_done) state <= S_N;
        // v = z / ||z||
        S_N: begin
          if (n2 > 0)
            for (int a = 0; a < M; a++) v[a] <= c_rscale(div_q, z[a]);
          n2    <= '0;
          iters <= iters - 4'd1;
          state <= (iters == 4'd1) ? S_DONE : S_Z;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign w_out = v;

  if (M != 4) begin : g_size_check
    $error("snr_update: the Cramer's-rule inverter is 4x4");
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE);

endmodule
