// Self-checking testbench of rls_p_update: random covariance, P*phi and
// reciprocal; P_new compared with P - (P phi)(P phi)' / r_den evaluated in
// floating point, and P12_new must equal P21_new exactly.
module tb_rls_p_update;

  import sysid_pkg::*;

  pmat_t p, p_new;
  fix_t r_num1, r_num2, recip;
  int checks = 0, failures = 0;

  rls_p_update dut (.p, .r_num1, .r_num2, .recip, .p_new);

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
    if (got - exp > 1.0e-5 || exp - got > 1.0e-5) begin
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
      real off, den;
      off   = rnd(-4.0, 4.0);
      p.p11 = f(rnd(0.0, 16.0));
      p.p22 = f(rnd(0.0, 16.0));
      p.p12 = f(off);
      p.p21 = f(off);
      r_num1 = f(rnd(-8.0, 8.0));
      r_num2 = f(rnd(-8.0, 8.0));
      den    = rnd(1.0, 30.0);
      recip  = f(1.0 / den);
      #1;
      close(r(p_new.p11), r(p.p11) - r(r_num1) * r(r_num1) * r(recip), "p11");
      close(r(p_new.p12), r(p.p12) - r(r_num1) * r(r_num2) * r(recip), "p12");
      close(r(p_new.p21), r(p.p21) - r(r_num1) * r(r_num2) * r(recip), "p21");
      close(r(p_new.p22), r(p.p22) - r(r_num2) * r(r_num2) * r(recip), "p22");
      checks++;
      if (p_new.p12 != p_new.p21) begin
        failures++;
        $display("FAIL: P_new not symmetric");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
