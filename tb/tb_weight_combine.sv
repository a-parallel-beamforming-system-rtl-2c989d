// tb_weight_combine: self-checking test of the theta blend of LS and SNR
// weights, including the end points theta = 0 and theta = 1 and a value
// outside [0, 1] with saturation-free operands.
module tb_weight_combine;
  import bf_pkg::*;

  localparam int M = 4;
  fx_t  theta;
  cfx_t w_ls [M], w_snr [M], w [M];
  int checks = 0, failures = 0;

  weight_combine #(.M(M)) dut (.*);

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
    real th, er, ei;
    for (int t = 0; t < 50; t++) begin
      th = (t == 0) ? 0.0 : (t == 1) ? 1.0 : (t == 2) ? 1.5 : 0.5 + rnd(0.5);
      theta = tofx(th); th = fromfx(theta);
      for (int i = 0; i < M; i++) begin
        w_ls[i].re = tofx(rnd(4.0));  w_ls[i].im = tofx(rnd(4.0));
        w_snr[i].re = tofx(rnd(1.0)); w_snr[i].im = tofx(rnd(1.0));
      end
      #1;
      for (int i = 0; i < M; i++) begin
        er = th * fromfx(w_ls[i].re) + (1.0 - th) * fromfx(w_snr[i].re);
        ei = th * fromfx(w_ls[i].im) + (1.0 - th) * fromfx(w_snr[i].im);
        checks++;
        if ((fromfx(w[i].re) - er) ** 2 + (fromfx(w[i].im) - ei) ** 2 > 1e-11) begin
          failures++;
          $display("theta %f w[%0d] got (%f,%f) expected (%f,%f)", th, i,
                   fromfx(w[i].re), fromfx(w[i].im), er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
