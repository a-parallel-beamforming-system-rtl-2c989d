// tb_corr_update: self-checking test of the recursive correlation estimate.
// Runs a chain of updates with random snapshots from a random start matrix
// and compares every element with beta R + (1 - beta) x x^H evaluated here
// in double precision; checks the 17-clock update time.
module tb_corr_update;
  import bf_pkg::*;

  localparam int M = 4;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  cfx_t R_in [M][M], x [M], R_out [M][M];
  fx_t  beta;
  int checks = 0, failures = 0;
  real rr [M][M], ri [M][M], xr [M], xi [M], b;

  always #5 clk = ~clk;

  corr_update #(.M(M)) dut (.*);

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

  initial begin
    int cyc;
    real er, ei, d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < M; a++)
      for (int c = 0; c < M; c++) begin
        R_in[a][c].re = tofx(rnd(2.0)); R_in[a][c].im = tofx(rnd(2.0));
      end
    for (int t = 0; t < 20; t++) begin
      b = 0.7 + rnd(0.25);
      beta = tofx(b); b = fromfx(beta);
      for (int a = 0; a < M; a++) begin
        x[a].re = tofx(rnd(3.0)); x[a].im = tofx(rnd(3.0));
        xr[a] = fromfx(x[a].re); xi[a] = fromfx(x[a].im);
      end
      for (int a = 0; a < M; a++)
        for (int c = 0; c < M; c++) begin
          rr[a][c] = fromfx(R_in[a][c].re); ri[a][c] = fromfx(R_in[a][c].im);
        end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 17) begin failures++; $display("took %0d clocks", cyc); end
      for (int a = 0; a < M; a++)
        for (int c = 0; c < M; c++) begin
          er = b * rr[a][c] + (1.0 - b) * (xr[a] * xr[c] + xi[a] * xi[c]);
          ei = b * ri[a][c] + (1.0 - b) * (xi[a] * xr[c] - xr[a] * xi[c]);
          d = (fromfx(R_out[a][c].re) - er) ** 2 + (fromfx(R_out[a][c].im) - ei) ** 2;
          checks++;
          if (d > 1e-10) begin
            failures++;
            $display("R[%0d][%0d] got (%f,%f) expected (%f,%f)", a, c,
                     fromfx(R_out[a][c].re), fromfx(R_out[a][c].im), er, ei);
          end
        end
      R_in = R_out;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
