// tb_snr_update: self-checking test of the power-method SNR weight update.
// Random Hermitian positive-definite R_xx and a source correlation
// R_ss = s s^H + small diagonal are driven with a random start vector.  The
// reference inverts R_xx by Gauss-Jordan elimination in double precision,
// forms A = R_xx^-1 R_ss and runs the same number of normalised power
// iterations; the block's weights must match it.  Checks the documented
// cycle count and the unit norm of the result.
module tb_snr_update;
  import bf_pkg::*;

  localparam int M = 4;
  logic clk = 0, rst_n = 0, start = 0, busy, done, singular;
  cfx_t Rxx [M][M], Rss [M][M], v_in [M], w_out [M];
  logic [3:0] n_iter;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  snr_update #(.M(M)) dut (.*);

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rnd(real a);
    return ($itor($urandom_range(0, 20000)) - 10000.0) / 10000.0 * a;
  endfunction
  function automatic fx_t tofx(real r);
    return fx_t'($rtoi(r * 1048576.0));
  endfunction
  function automatic real fromfx(fx_t v);
    return $itor(v) / 1048576.0;
  endfunction

  real xr [M][M], xi [M][M], sr [M][M], si [M][M];
  real gr [M][2*M], gi [M][2*M];     // Gauss-Jordan work array
  real ar [M][M], ai [M][M], vr [M], vi [M], zr [M], zi [M];

  task automatic check(string what, real got, real exp, real tol);
    real d;
    d = got - exp;
    checks++;
    if (d > tol || d < -tol) begin
      failures++;
      $display("%s: got %f expected %f", what, got, exp);
    end
  endtask

  task automatic one_case(int iters);
    real br [M][M], bi [M][M], s_r [M], s_i [M], pr, pi, nr, nn;
    int cyc;
    // R_xx = B B^H / M + I
    for (int a = 0; a < M; a++)
      for (int b = 0; b < M; b++) begin br[a][b] = rnd(1.0); bi[a][b] = rnd(1.0); end
    for (int a = 0; a < M; a++) begin
      s_r[a] = rnd(1.0); s_i[a] = rnd(1.0);
    end
    for (int a = 0; a < M; a++)
      for (int b = 0; b < M; b++) begin
        xr[a][b] = (a == b) ? 1.0 : 0.0; xi[a][b] = 0.0;
        for (int k = 0; k < M; k++) begin
          xr[a][b] += (br[a][k] * br[b][k] + bi[a][k] * bi[b][k]) / M;
          xi[a][b] += (bi[a][k] * br[b][k] - br[a][k] * bi[b][k]) / M;
        end
        sr[a][b] = s_r[a] * s_r[b] + s_i[a] * s_i[b] + ((a == b) ? 0.05 : 0.0);
        si[a][b] = s_i[a] * s_r[b] - s_r[a] * s_i[b];
      end
    for (int a = 0; a < M; a++) begin
      for (int b = 0; b < M; b++) begin
        Rxx[a][b].re = tofx(xr[a][b]); Rxx[a][b].im = tofx(xi[a][b]);
        Rss[a][b].re = tofx(sr[a][b]); Rss[a][b].im = tofx(si[a][b]);
        xr[a][b] = fromfx(Rxx[a][b].re); xi[a][b] = fromfx(Rxx[a][b].im);
        sr[a][b] = fromfx(Rss[a][b].re); si[a][b] = fromfx(Rss[a][b].im);
      end
      v_in[a].re = tofx(0.5 + rnd(0.3)); v_in[a].im = tofx(rnd(0.3));
      vr[a] = fromfx(v_in[a].re); vi[a] = fromfx(v_in[a].im);
    end
    n_iter = 4'(iters);
    // reference inverse by Gauss-Jordan (R_xx is positive definite)
    for (int a = 0; a < M; a++)
      for (int b = 0; b < 2 * M; b++) begin
        if (b < M) begin gr[a][b] = xr[a][b]; gi[a][b] = xi[a][b]; end
        else begin gr[a][b] = (b - M == a) ? 1.0 : 0.0; gi[a][b] = 0.0; end
      end
    for (int c = 0; c < M; c++) begin
      nn = gr[c][c] * gr[c][c] + gi[c][c] * gi[c][c];
      pr = gr[c][c] / nn; pi = -gi[c][c] / nn;
      for (int b = 0; b < 2 * M; b++) begin
        nr = gr[c][b] * pr - gi[c][b] * pi;
        gi[c][b] = gr[c][b] * pi + gi[c][b] * pr;
        gr[c][b] = nr;
      end
      for (int a = 0; a < M; a++) if (a != c) begin
        pr = gr[a][c]; pi = gi[a][c];
        for (int b = 0; b < 2 * M; b++) begin
          gr[a][b] -= pr * gr[c][b] - pi * gi[c][b];
          gi[a][b] -= pr * gi[c][b] + pi * gr[c][b];
        end
      end
    end
    for (int a = 0; a < M; a++)
      for (int b = 0; b < M; b++) begin
        ar[a][b] = 0; ai[a][b] = 0;
        for (int k = 0; k < M; k++) begin
          ar[a][b] += gr[a][M+k] * sr[k][b] - gi[a][M+k] * si[k][b];
          ai[a][b] += gr[a][M+k] * si[k][b] + gi[a][M+k] * sr[k][b];
        end
      end
    for (int t = 0; t < iters; t++) begin
      nn = 0;
      for (int a = 0; a < M; a++) begin
        zr[a] = 0; zi[a] = 0;
        for (int b = 0; b < M; b++) begin
          zr[a] += ar[a][b] * vr[b] - ai[a][b] * vi[b];
          zi[a] += ar[a][b] * vi[b] + ai[a][b] * vr[b];
        end
        nn += zr[a] * zr[a] + zi[a] * zi[a];
      end
      for (int a = 0; a < M; a++) begin vr[a] = zr[a] / $sqrt(nn); vi[a] = zi[a] / $sqrt(nn); end
    end
    // run
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 186 + 73 * iters) begin
      failures++;
      $display("update took %0d clocks, expected %0d", cyc, 186 + 73 * iters);
    end
    checks++;
    if (singular) begin failures++; $display("R_xx flagged singular"); end
    nn = 0;
    for (int a = 0; a < M; a++) begin
      check($sformatf("w[%0d].re", a), fromfx(w_out[a].re), vr[a], 2e-3);
      check($sformatf("w[%0d].im", a), fromfx(w_out[a].im), vi[a], 2e-3);
      nn += fromfx(w_out[a].re) ** 2 + fromfx(w_out[a].im) ** 2;
    end
    check("||w||^2", nn, 1.0, 2e-3);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) one_case(1 + t % 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
