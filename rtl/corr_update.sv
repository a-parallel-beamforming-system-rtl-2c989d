// corr_update: recursive estimate of one subband's observed-data correlation
// matrix.
//
//   R <- beta R + (1 - beta) x x^H
//
// The document says only that the data correlation matrix is "calculated
// recursively from the received data"; the exponentially weighted form and
// the forgetting factor beta are this design's choice.  One element is
// updated per clock in row-major order, so an update takes M*M clocks; the
// result stays Hermitian up to rounding because each element is computed
// from the same x.
//
// Interface: R_in, x and beta are sampled on the clock where start is high;
// done pulses one clock when R_out holds the new matrix (held until the
// next start).  Timing: M*M + 1 clocks from the start clock to done
// (17 for M = 4).
module corr_update
  import bf_pkg::*;
#(
  parameter int unsigned M = N_MICS
)(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  cfx_t R_in  [M][M],
  input  cfx_t x     [M],
  input  fx_t  beta,
  output cfx_t R_out [M][M],
  output logic busy,
  output logic done
);

  localparam int unsigned IW = (M > 1) ? $clog2(M) : 1;

  cfx_t R [M][M];
  cfx_t xr [M];
  fx_t  br, omb;
  logic [IW-1:0] i, j;
  logic run;

  assign busy  = run;
  assign R_out = R;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; done <= 1'b0;
      i <= '0; j <= '0; br <= '0; omb <= '0;
      for (int a = 0; a < M; a++) begin
        xr[a] <= CFX_ZERO;
        for (int b = 0; b < M; b++) R[a][b] <= CFX_ZERO;
      end
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          R   <= R_in;
          xr  <= x;
          br  <= beta;
          omb <= fx_sub(FX_ONE, beta);
          i <= '0; j <= '0;
          run <= 1'b1;
        end
      end else begin
        R[i][j] <= c_add(c_rscale(br, R[i][j]), c_rscale(omb, c_mulc(xr[i], xr[j])));
        j <= (j == IW'(M - 1)) ? '0 : j + 1'b1;
        if (j == IW'(M - 1)) begin
          i <= (i == IW'(M - 1)) ? '0 : i + 1'b1;
          if (i == IW'(M - 1)) begin
            run  <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> !run);

endmodule
