// Self-checking testbench of rls_gains_mults: random regressors, covariance
// and estimates, outputs compared with the same formulas evaluated in
// floating point (tolerance: a few fixed-point LSBs).
module tb_rls_gains_mults;

  import sysid_pkg::*;

  fix_t phi1, phi2, y, r_num1, r_num2, r_den, err;
  pmat_t p;
  theta_t theta;
  int checks = 0, failures = 0;

  rls_gains_mults dut (.phi1, .phi2, .y, .p, .theta, .r_num1, .r_num2, .r_den, .err);

  function automatic real r(input fix_t v);
    return real'(v) / real'(64'(1) << FIX_F);
  endfunction

  function automatic fix_t f(input real v);
    return fix_t'($rtoi(v * real'(64'(1) << FIX_F)));
  endfunction

  function automatic real rnd(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1.0e6;
  endfunction

  task automatic close(input real got, input real exp, input string what);
    checks++;
    if (got - exp > 1.0e-6 || exp - got > 1.0e-6) begin
      failures++;
      $display("FAIL: %s got %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      real off;
      phi1 = f(rnd(-1.0, 1.0));
      phi2 = f(rnd(-1.0, 1.0));
      y    = f(rnd(-1.0, 1.0));
      off  = rnd(-4.0, 4.0);
      p.p11 = f(rnd(0.0, 16.0));
      p.p22 = f(rnd(0.0, 16.0));
      p.p12 = f(off);
      p.p21 = f(off);
      theta.den = f(rnd(-1.5, 1.5));
      theta.num = f(rnd(-1.5, 1.5));
      #1;
      close(r(r_num1), r(p.p11) * r(phi1) + r(p.p12) * r(phi2), "r_num1");
      close(r(r_num2), r(p.p21) * r(phi1) + r(p.p22) * r(phi2), "r_num2");
      close(r(r_den), 1.0 + r(phi1) * (r(p.p11) * r(phi1) + r(p.p12) * r(phi2))
                          + r(phi2) * (r(p.p21) * r(phi1) + r(p.p22) * r(phi2)), "r_den");
      close(r(err), r(y) - r(phi1) * r(theta.den) - r(phi2) * r(theta.num), "err");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
