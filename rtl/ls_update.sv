// ls_update: one adaptation step of the least-squares subband beamformer.
//
// For one subband it performs the recursion of the LS filter:
//   u   = P x                                   (P Hermitian, so x^H P = u^H)
//   P'  = l P - l^2 u u^H / (1 + l x^H u)       l = 1/lambda
//   v   = P' q_p
//   P_n = P' - g v v^H / (1 + g q_p^H v)        g = gamma_p (1 - lambda)
//   w_n = alpha w + (1 - alpha) P_n r_s
// i.e. the inverse of the total correlation matrix (calibration source
// correlation plus observed data correlation) is corrected by one rank-one
// term for the new snapshot x and one for the calibration eigen-pair
// (gamma_p, q_p), and the weights are smoothed towards P_n r_s.  The
// equations are the document's; the schedule below is this design's.
//
// How it works: a sequencer walks the steps above element by element, one
// complex multiply-accumulate per clock, in Q12.20 fixed point (the LS
// filter is fully fixed point in the document's hybrid scheme).  The two
// scalar divisions go through one shared sequential divider (fx_div).
// Cycle count per update, M = 4: 16 + 4 + 55 + 16 + 16 + 4 + 55 + 16 + 16 +
// 2 = 200 clocks from the start clock to the done clock.
//
// Interface: all inputs are sampled on the clock where start is high; done
// pulses for one clock when P_out and w_out hold the new values (they keep
// them until the next start).  The caller supplies l = 1/lambda and
// g = gamma_p (1 - lambda) already formed.
module ls_update
  import bf_pkg::*;
#(
  parameter int unsigned M = N_MICS
)(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  cfx_t P_in  [M][M],
  input  cfx_t x     [M],
  input  cfx_t qp    [M],
  input  fx_t  g,
  input  fx_t  lam_inv,
  input  fx_t  alpha,
  input  cfx_t rs    [M],
  input  cfx_t w_in  [M],
  output cfx_t P_out [M][M],
  output cfx_t w_out [M],
  output logic busy,
  output logic done
);

  localparam int unsigned IW = (M > 1) ? $clog2(M) : 1;

  typedef enum logic [3:0] {
    S_IDLE, S_U, S_E1, S_D1, S_P1, S_V, S_E2, S_D2, S_P2, S_T, S_DONE
  } state_t;
  state_t state;

  cfx_t P [M][M];
  cfx_t xr [M], qr [M], rsr [M], w [M], u [M], v [M];
  fx_t  gr, lr, ar, c;
  cfx_t acc;
  logic [IW-1:0] i, j;
  logic last_j, last_i;

  // shared divider
  logic div_start, div_done, div_busy;
  fx_t  div_num, div_den, div_q;
  fx_div u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .q(div_q)
  );

  assign last_j = (j == IW'(M - 1));
  assign last_i = (i == IW'(M - 1));
  assign busy   = (state != S_IDLE);

  // one complex multiply-accumulate per clock; operands chosen by state
  cfx_t mac_a, mac_b, mac_sum;
  always_comb begin
    mac_a = CFX_ZERO;
    mac_b = CFX_ZERO;
    unique case (state)
      S_U:  begin mac_a = P[i][j]; mac_b = xr[j];  end
      S_E1: begin mac_a = c_conj(xr[i]); mac_b = u[i]; end
      S_V:  begin mac_a = P[i][j]; mac_b = qr[j];  end
      S_E2: begin mac_a = c_conj(qr[i]); mac_b = v[i]; end
      S_T:  begin mac_a = P[i][j]; mac_b = rsr[j]; end
      default: ;
    endcase
    mac_sum = c_add(acc, c_mul(mac_a, mac_b));
  end

  // rank-one correction of element (i, j): P - c * a_i * conj(a_j)
  cfx_t r1_vec_i, r1_vec_j, r1_term;
  always_comb begin
    r1_vec_i = (state == S_P1) ? u[i] : v[i];
    r1_vec_j = (state == S_P1) ? u[j] : v[j];
    r1_term  = c_rscale(c, c_mulc(r1_vec_i, r1_vec_j));
  end

  // scalar divisor of each step: 1 + s * Re(sum)
  fx_t den_next;
  always_comb begin
    den_next = fx_add(FX_ONE, fx_mul((state == S_E1) ? lr : gr, mac_sum.re));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      i <= '0; j <= '0;
      acc <= CFX_ZERO; c <= '0;
      gr <= '0; lr <= '0; ar <= '0;
      div_start <= 1'b0; div_num <= '0; div_den <= '0;
      for (int a = 0; a < M; a++) begin
        xr[a] <= CFX_ZERO; qr[a] <= CFX_ZERO; rsr[a] <= CFX_ZERO;
        w[a] <= CFX_ZERO; u[a] <= CFX_ZERO; v[a] <= CFX_ZERO;
        for (int b = 0; b < M; b++) P[a][b] <= CFX_ZERO;
      end
    end else begin
      done      <= 1'b0;
      div_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          P   <= P_in;
          xr  <= x;
          qr  <= qp;
          rsr <= rs;
          w   <= w_in;
          gr  <= g;
          lr  <= lam_inv;
          ar  <= alpha;
          i <= '0; j <= '0; acc <= CFX_ZERO;
          state <= S_U;
        end
        // u = P x
        S_U: begin
          j <= last_j ? '0 : j + 1'b1;
          if (last_j) begin
            u[i] <= mac_sum;
            acc  <= CFX_ZERO;
            i    <= last_i ? '0 : i + 1'b1;
            if (last_i) state <= S_E1;
          end else acc <= mac_sum;
        end
        // x^H u, then c = l^2 / (1 + l x^H u)
        S_E1: begin
          i <= last_i ? '0 : i + 1'b1;
          if (last_i) begin
            acc       <= CFX_ZERO;
            div_num   <= fx_mul(lr, lr);
            div_den   <= den_next;
            div_start <= 1'b1;
            state     <= S_D1;
          end else acc <= mac_sum;
        end
        S_D1: if (div_done) begin
          c <= div_q;
          i <= '0; j <= '0;
          state <= S_P1;
        end
        // P' = l P - c u u^H
        S_P1: begin
          P[i][j] <= c_sub(c_rscale(lr, P[i][j]), r1_term);
          j <= last_j ? '0 : j + 1'b1;
          if (last_j) begin
            i <= last_i ? '0 : i + 1'b1;
            if (last_i) state <= S_V;
          end
        end
        // v = P' q
        S_V: begin
          j <= last_j ? '0 : j + 1'b1;
          if (last_j) begin
            v[i] <= mac_sum;
            acc  <= CFX_ZERO;
            i    <= last_i ? '0 : i + 1'b1;
            if (last_i) state <= S_E2;
          end else acc <= mac_sum;
        end
        // q^H v, then c = g / (1 + g q^H v)
        S_E2: begin
          i <= last_i ? '0 : i + 1'b1;
          if (last_i) begin
            acc       <= CFX_ZERO;
            div_num   <= gr;
            div_den   <= den_next;
            div_start <= 1'b1;
            state     <= S_D2;
          end else acc <= mac_sum;
        end
        S_D2: if (div_done) begin
          c <= div_q;
          i <= '0; j <= '0;
          state <= S_P2;
        end
        // P_n = P' - c v v^H
        S_P2: begin
          P[i][j] <= c_sub(P[i][j], r1_term);
          j <= last_j ? '0 : j + 1'b1;
          if (last_j) begin
            i <= last_i ? '0 : i + 1'b1;
            if (last_i) state <= S_T;
          end
        end
        // t = P_n r_s, w = alpha w + (1 - alpha) t
        S_T: begin
          j <= last_j ? '0 : j + 1'b1;
          if (last_j) begin
            w[i] <= c_add(c_rscale(ar, w[i]), c_rscale(fx_sub(FX_ONE, ar), mac_sum));
            acc  <= CFX_ZERO;
            i    <= last_i ? '0 : i + 1'b1;
            if (last_i) state <= S_DONE;
          end else acc <= mac_sum;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign P_out = P;
  assign w_out = w;

  // a new update must not be requested while one is running
  assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE);

endmodule
