// tb_cmat_inv_fp: self-checking test of the floating-point Cramer's-rule
// inverter.  Random diagonally dominant complex 4x4 matrices are encoded to
// the 32-bit float layout here, inverted by the block, decoded here, and the
// product A * Ainv is compared with the identity in double precision.  A
// singular matrix (two equal rows) must raise singular.  Checks the
// 119-clock inversion time.
module tb_cmat_inv_fp;
  import bf_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, busy, done, singular;
  cfl_t A [4][4], Ainv [4][4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cmat_inv_fp dut (.*);

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

  // real -> sign / exponent / 23-bit fraction, truncated
  function automatic fl_t enc(real r);
    logic s;
    int   e;
    real  m;
    if (r == 0.0) return '0;
    s = (r < 0.0);
    m = s ? -r : r;
    e = 127;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0)  begin m = m * 2.0; e--; end
    return {s, 8'(e), 23'($rtoi((m - 1.0) * 8388608.0))};
  endfunction

  function automatic real dec(fl_t f);
    real m;
    if (f[30:23] == 0) return 0.0;
    m = 1.0 + $itor(f[22:0]) / 8388608.0;
    for (int k = 0; k < int'(f[30:23]) - 127; k++) m = m * 2.0;
    for (int k = 0; k < 127 - int'(f[30:23]); k++) m = m / 2.0;
    return f[31] ? -m : m;
  endfunction

  real ar [4][4], ai [4][4];

  task automatic run(output int cyc);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    int cyc;
    real sr, si, er, ei, d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          ar[r][c] = rnd(1.0) + ((r == c) ? 4.0 : 0.0);
          ai[r][c] = rnd(1.0);
          if (t % 3 == 0) begin ar[r][c] *= 50.0; ai[r][c] *= 50.0; end
          A[r][c].re = enc(ar[r][c]); A[r][c].im = enc(ai[r][c]);
          ar[r][c] = dec(A[r][c].re); ai[r][c] = dec(A[r][c].im);
        end
      run(cyc);
      checks++;
      if (cyc != 119) begin failures++; $display("inversion took %0d clocks", cyc); end
      checks++;
      if (singular) begin failures++; $display("regular matrix flagged singular"); end
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          sr = 0; si = 0;
          for (int k = 0; k < 4; k++) begin
            sr += ar[r][k] * dec(Ainv[k][c].re) - ai[r][k] * dec(Ainv[k][c].im);
            si += ar[r][k] * dec(Ainv[k][c].im) + ai[r][k] * dec(Ainv[k][c].re);
          end
          er = sr - ((r == c) ? 1.0 : 0.0);
          ei = si;
          d  = er * er + ei * ei;
          checks++;
          if (d > 1e-9) begin
            failures++;
            $display("case %0d: (A*Ainv)[%0d][%0d] = (%f,%f)", t, r, c, sr, si);
          end
        end
    end
    // singular matrix with small integer entries (exact in float): row 3 = row 1
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        A[r][c].re = enc($itor($urandom_range(0, 8)) - 4.0 + ((r == c) ? 9.0 : 0.0));
        A[r][c].im = enc($itor($urandom_range(0, 8)) - 4.0);
      end
    for (int c = 0; c < 4; c++) A[3][c] = A[1][c];
    run(cyc);
    checks++;
    if (!singular) begin failures++; $display("singular matrix not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
