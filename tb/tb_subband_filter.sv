// tb_subband_filter: self-checking test of y = w^H x for one subband,
// against the conjugated dot product evaluated in double precision, plus
// one case that must saturate.
module tb_subband_filter;
  import bf_pkg::*;

  localparam int M = 4;
  cfx_t w [M], x [M], y;
  int checks = 0, failures = 0;

  subband_filter #(.M(M)) dut (.*);

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
    real er, ei;
    for (int t = 0; t < 100; t++) begin
      er = 0; ei = 0;
      for (int i = 0; i < M; i++) begin
        w[i].re = tofx(rnd(2.0)); w[i].im = tofx(rnd(2.0));
        x[i].re = tofx(rnd(10.0)); x[i].im = tofx(rnd(10.0));
        er += fromfx(w[i].re) * fromfx(x[i].re) + fromfx(w[i].im) * fromfx(x[i].im);
        ei += fromfx(w[i].re) * fromfx(x[i].im) - fromfx(w[i].im) * fromfx(x[i].re);
      end
      #1;
      checks++;
      if ((fromfx(y.re) - er) ** 2 + (fromfx(y.im) - ei) ** 2 > 1e-11) begin
        failures++;
        $display("y got (%f,%f) expected (%f,%f)", fromfx(y.re), fromfx(y.im), er, ei);
      end
    end
    for (int i = 0; i < M; i++) begin
      w[i].re = tofx(40.0); w[i].im = '0;
      x[i].re = tofx(40.0); x[i].im = tofx(-40.0);
    end
    #1;
    checks++;
    if (y.re != FX_MAX || y.im != FX_MIN) begin
      failures++;
      $display("saturation: got %h %h", y.re, y.im);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
