// tb_ls_update: self-checking test of one LS adaptation step.
// Builds a random Hermitian positive-definite P, random snapshot x, unit
// calibration eigenvector q, cross-correlation r_s and old weights, runs
// the block, and compares P_n and w_n with the same recursion evaluated here
// in double precision.  Also checks the 200-clock update time.
module tb_ls_update;
  import bf_pkg::*;

  localparam int M = 4;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  cfx_t P_in [M][M], x [M], qp [M], rs [M], w_in [M], P_out [M][M], w_out [M];
  fx_t  g, lam_inv, alpha;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ls_update #(.M(M)) dut (.*);

  initial begin
    #1_000_000;
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

  real Pr [M][M], Pi [M][M], xr_ [M], xi_ [M], qr_ [M], qi_ [M];
  real rr [M], ri [M], wr [M], wi [M];
  real ur [M], ui [M], vr [M], vi [M];
  real lam, li, gg, al;

  task automatic check(string what, real got, real exp, real tol);
    real d;
    d = got - exp;
    checks++;
    if (d > tol || d < -tol) begin
      failures++;
      $display("%s: got %f expected %f", what, got, exp);
    end
  endtask

  task automatic one_case();
    real e, cc, nr, ni;
    int  cyc;
    lam = 0.9 + rnd(0.05);
    li  = 1.0 / lam;
    gg  = (1.0 + rnd(0.5) + 0.6) * (1.0 - lam);
    al  = 0.5 + rnd(0.4);
    // P = diag(d) + small Hermitian part
    for (int a = 0; a < M; a++)
      for (int b = a; b < M; b++) begin
        if (a == b) begin Pr[a][a] = 1.5 + rnd(0.5); Pi[a][a] = 0; end
        else begin
          Pr[a][b] = rnd(0.2); Pi[a][b] = rnd(0.2);
          Pr[b][a] = Pr[a][b]; Pi[b][a] = -Pi[a][b];
        end
      end
    nr = 0;
    for (int a = 0; a < M; a++) begin
      xr_[a] = rnd(0.8); xi_[a] = rnd(0.8);
      qr_[a] = rnd(1.0); qi_[a] = rnd(1.0);
      nr += qr_[a] * qr_[a] + qi_[a] * qi_[a];
      rr[a] = rnd(0.5); ri[a] = rnd(0.5);
      wr[a] = rnd(0.5); wi[a] = rnd(0.5);
    end
    for (int a = 0; a < M; a++) begin qr_[a] /= $sqrt(nr); qi_[a] /= $sqrt(nr); end
    // drive (quantised values are used by the reference too)
    for (int a = 0; a < M; a++) begin
      for (int b = 0; b < M; b++) begin
        P_in[a][b].re = tofx(Pr[a][b]); P_in[a][b].im = tofx(Pi[a][b]);
        Pr[a][b] = fromfx(P_in[a][b].re); Pi[a][b] = fromfx(P_in[a][b].im);
      end
      x[a].re = tofx(xr_[a]); x[a].im = tofx(xi_[a]);
      qp[a].re = tofx(qr_[a]); qp[a].im = tofx(qi_[a]);
      rs[a].re = tofx(rr[a]); rs[a].im = tofx(ri[a]);
      w_in[a].re = tofx(wr[a]); w_in[a].im = tofx(wi[a]);
      xr_[a] = fromfx(x[a].re); xi_[a] = fromfx(x[a].im);
      qr_[a] = fromfx(qp[a].re); qi_[a] = fromfx(qp[a].im);
      rr[a] = fromfx(rs[a].re); ri[a] = fromfx(rs[a].im);
      wr[a] = fromfx(w_in[a].re); wi[a] = fromfx(w_in[a].im);
    end
    lam_inv = tofx(li); li = fromfx(lam_inv);
    g = tofx(gg); gg = fromfx(g);
    alpha = tofx(al); al = fromfx(alpha);
    // reference: u = P x
    for (int a = 0; a < M; a++) begin
      ur[a] = 0; ui[a] = 0;
      for (int b = 0; b < M; b++) begin
        ur[a] += Pr[a][b] * xr_[b] - Pi[a][b] * xi_[b];
        ui[a] += Pr[a][b] * xi_[b] + Pi[a][b] * xr_[b];
      end
    end
    e = 0;
    for (int a = 0; a < M; a++) e += xr_[a] * ur[a] + xi_[a] * ui[a];
    cc = li * li / (1.0 + li * e);
    for (int a = 0; a < M; a++)
      for (int b = 0; b < M; b++) begin
        nr = li * Pr[a][b] - cc * (ur[a] * ur[b] + ui[a] * ui[b]);
        ni = li * Pi[a][b] - cc * (ui[a] * ur[b] - ur[a] * ui[b]);
        Pr[a][b] = nr; Pi[a][b] = ni;
      end
    for (int a = 0; a < M; a++) begin
      vr[a] = 0; vi[a] = 0;
      for (int b = 0; b < M; b++) begin
        vr[a] += Pr[a][b] * qr_[b] - Pi[a][b] * qi_[b];
        vi[a] += Pr[a][b] * qi_[b] + Pi[a][b] * qr_[b];
      end
    end
    e = 0;
    for (int a = 0; a < M; a++) e += qr_[a] * vr[a] + qi_[a] * vi[a];
    cc = gg / (1.0 + gg * e);
    for (int a = 0; a < M; a++)
      for (int b = 0; b < M; b++) begin
        Pr[a][b] -= cc * (vr[a] * vr[b] + vi[a] * vi[b]);
        Pi[a][b] -= cc * (vi[a] * vr[b] - vr[a] * vi[b]);
      end
    for (int a = 0; a < M; a++) begin
      nr = 0; ni = 0;
      for (int b = 0; b < M; b++) begin
        nr += Pr[a][b] * rr[b] - Pi[a][b] * ri[b];
        ni += Pr[a][b] * ri[b] + Pi[a][b] * rr[b];
      end
      wr[a] = al * wr[a] + (1.0 - al) * nr;
      wi[a] = al * wi[a] + (1.0 - al) * ni;
    end
    // run
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 200) begin failures++; $display("update took %0d clocks, expected 200", cyc); end
    for (int a = 0; a < M; a++) begin
      for (int b = 0; b < M; b++) begin
        check($sformatf("P[%0d][%0d].re", a, b), fromfx(P_out[a][b].re), Pr[a][b], 1e-4);
        check($sformatf("P[%0d][%0d].im", a, b), fromfx(P_out[a][b].im), Pi[a][b], 1e-4);
      end
      check($sformatf("w[%0d].re", a), fromfx(w_out[a].re), wr[a], 1e-4);
      check($sformatf("w[%0d].im", a), fromfx(w_out[a].im), wi[a], 1e-4);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 10; t++) one_case();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
