// tb_fft32: self-checking test of the 32-point FFT/IFFT.
// Drives random frames forward and compares each bin with a direct DFT
// (computed here with real arithmetic) divided by 32; then feeds a random
// spectrum through the inverse transform and compares with the direct
// inverse DFT.  Also checks the 80-clock compute latency and that the block
// streams exactly 32 outputs per frame.
module tb_fft32;
  import bf_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, inv = 0, out_valid;
  fft_t in_re, in_im, out_re, out_im;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fft32 dut (.*);

  real xr [32], xi [32], er [32], ei [32];
  real gr [32], gi [32];
  int  lat;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(input bit inverse, input real amp);
    int n;
    real pi = 3.14159265358979;
    for (int i = 0; i < 32; i++) begin
      xr[i] = ($itor($urandom_range(0, 2000)) - 1000.0) / 1000.0 * amp;
      xi[i] = ($itor($urandom_range(0, 2000)) - 1000.0) / 1000.0 * amp;
    end
    // reference
    for (int k = 0; k < 32; k++) begin
      er[k] = 0; ei[k] = 0;
      for (int t = 0; t < 32; t++) begin
        real ang;
        ang = (inverse ? 2.0 : -2.0) * pi * k * t / 32.0;
        er[k] += xr[t] * $cos(ang) - xi[t] * $sin(ang);
        ei[k] += xr[t] * $sin(ang) + xi[t] * $cos(ang);
      end
      if (!inverse) begin er[k] /= 32.0; ei[k] /= 32.0; end
    end
    // drive
    @(negedge clk);
    for (int i = 0; i < 32; i++) begin
      while (!in_ready) @(negedge clk);
      in_valid = 1; inv = inverse;
      in_re = fft_t'($rtoi(xr[i] * 8388608.0));
      in_im = fft_t'($rtoi(xi[i] * 8388608.0));
      @(negedge clk);
    end
    in_valid = 0;
    lat = 0;
    while (!out_valid) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 80) begin failures++; $display("latency %0d, expected 80", lat); end
    n = 0;
    while (out_valid) begin
      real dr, di, tol;
      gr[n] = $itor(out_re) / 8388608.0;
      gi[n] = $itor(out_im) / 8388608.0;
      dr = gr[n] - er[n]; di = gi[n] - ei[n];
      tol = inverse ? 2.0e-5 : 1.0e-5;
      checks++;
      if (dr > tol || dr < -tol || di > tol || di < -tol) begin
        failures++;
        $display("inv=%0d bin %0d got (%f,%f) expected (%f,%f)", inverse, n, gr[n], gi[n], er[n], ei[n]);
      end
      n++;
      @(negedge clk);
    end
    checks++;
    if (n != 32) begin failures++; $display("%0d outputs, expected 32", n); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) run_frame(1'b0, 0.99);
    for (int f = 0; f < 4; f++) run_frame(1'b1, 0.02);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
