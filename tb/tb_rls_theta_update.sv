// Self-checking testbench of rls_theta_update: random estimates, P*phi,
// reciprocal and error; theta_new compared with theta + (P phi) e / r_den
// evaluated in floating point.
module tb_rls_theta_update;

  import sysid_pkg::*;

  theta_t theta, theta_new;
  fix_t r_num1, r_num2, recip, err;
  int checks = 0, failures = 0;

  rls_theta_update dut (.theta, .r_num1, .r_num2, .recip, .err, .theta_new);

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
      theta.den = f(rnd(-1.5, 1.5));
      theta.num = f(rnd(-1.5, 1.5));
      r_num1 = f(rnd(-8.0, 8.0));
      r_num2 = f(rnd(-8.0, 8.0));
      recip  = f(1.0 / rnd(1.0, 30.0));
      err    = f(rnd(-2.0, 2.0));
      #1;
      close(r(theta_new.den), r(theta.den) + r(r_num1) * r(recip) * r(err), "den");
      close(r(theta_new.num), r(theta.num) + r(r_num2) * r(recip) * r(err), "num");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
