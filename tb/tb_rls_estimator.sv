// Self-checking testbench of rls_estimator.
//
// A first-order plant y(k) = 0.9048 y(k-1) + 0.09516 u(k-1) (10/(s+10)
// sampled every 10 ms) is simulated in real arithmetic and quantised to
// 8-bit codes, as the A/D delivers them. The same codes drive the DUT and a
// floating-point RLS reference with the same start (theta = [1, 1],
// P = 16 I). Checked: after every update both coefficients agree with the
// reference to 0.01; with a random input the estimate ends near the plant;
// with a step input (the tool's stimulus) it ends near the plant; the
// strobe-to-update latency is 51 clocks; the first pair after reset only
// primes the regressor; strobes while busy are ignored; reset restores
// theta = [1, 1].
module tb_rls_estimator;

  import sysid_pkg::*;

  localparam int  LATENCY = 2 * FIX_F + 3;
  localparam real B_TRUE  = 0.9048;
  localparam real A_TRUE  = 0.09516;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  sample_t y_in, u_in;
  fix_t theta_den, theta_num;
  logic upd_valid, busy;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  rls_estimator dut (.clk, .rst_n, .in_valid, .y_in, .u_in,
                     .theta_den, .theta_num, .upd_valid, .busy);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real to_real(input fix_t v);
    return real'(v) / real'(64'(1) << FIX_F);
  endfunction

  function automatic sample_t quant(input real v);
    int c;
    c = $rtoi(v * 128.0 + ((v >= 0) ? 0.5 : -0.5));
    if (c > 127) c = 127;
    if (c < -128) c = -128;
    return sample_t'(c);
  endfunction

  // floating-point reference RLS
  real rp11, rp12, rp21, rp22, rb, ra, rphi1, rphi2;
  bit  rprimed;

  task automatic ref_reset();
    rp11 = 16.0; rp12 = 0.0; rp21 = 0.0; rp22 = 16.0;
    rb = 1.0; ra = 1.0; rprimed = 0;
  endtask

  task automatic ref_step(input real y, input real u);
    real n1, n2, den, e, k1, k2;
    if (rprimed) begin
      n1  = rp11 * rphi1 + rp12 * rphi2;
      n2  = rp21 * rphi1 + rp22 * rphi2;
      den = 1.0 + rphi1 * n1 + rphi2 * n2;
      e   = y - rphi1 * rb - rphi2 * ra;
      k1  = n1 / den;
      k2  = n2 / den;
      rb  = rb + k1 * e;
      ra  = ra + k2 * e;
      rp11 = rp11 - k1 * n1;
      rp12 = rp12 - k1 * n2;
      rp21 = rp21 - k1 * n2;
      rp22 = rp22 - k2 * n2;
    end
    rphi1 = y;
    rphi2 = u;
    rprimed = 1;
  endtask

  // one sample pair into DUT and reference; returns clocks to upd_valid
  // (with stray = 1 a second strobe with other data follows while busy)
  task automatic feed(input sample_t yc, input sample_t uc, output int lat,
                      input bit stray = 0);
    @(negedge clk);
    y_in = yc;
    u_in = uc;
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    lat = 1;
    while (!upd_valid && lat < 200) begin
      if (stray && lat == 4) begin
        y_in = 8'sd100;
        u_in = -8'sd100;
        in_valid = 1'b1;
      end else begin
        in_valid = 1'b0;
      end
      @(negedge clk);
      lat++;
    end
    in_valid = 1'b0;
    ref_step(real'(yc) / 128.0, real'(uc) / 128.0);
  endtask

  initial begin
    #(20 * 400000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real yp, up, u;
    int lat;
    int max_dev_fail;
    y_in = '0;
    u_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    ref_reset();
    @(negedge clk);
    check(theta_den == FIX_ONE && theta_num == FIX_ONE, "reset estimate [1, 1]");

    // ---- random input --------------------------------------------------
    yp = 0.0;
    up = 0.0;
    // first pair: primes the regressor, no update
    feed(quant(yp), quant(up), lat);
    check(lat == 200 && theta_den == FIX_ONE, "first pair does not update");
    max_dev_fail = 0;
    for (int k = 0; k < 300; k++) begin
      real yq, uq;
      yq = real'(quant(yp)) / 128.0;
      uq = real'(quant(up)) / 128.0;
      // plant driven by the quantised input it actually received
      yp = B_TRUE * yp + A_TRUE * uq;
      u  = (real'($urandom_range(0, 2000)) - 1000.0) / 1100.0;
      up = u;
      feed(quant(yp), quant(up), lat, k == 5);
      if (k == 0) check(lat == LATENCY + 1, $sformatf("latency %0d, expected %0d", lat - 1, LATENCY));
      if (k == 5) begin
        repeat (3) @(negedge clk);
        check(!busy, "no step started by a strobe that came while busy");
      end
      checks++;
      if ((to_real(theta_den) - rb > 0.01) || (rb - to_real(theta_den) > 0.01) ||
          (to_real(theta_num) - ra > 0.01) || (ra - to_real(theta_num) > 0.01)) begin
        failures++;
        if (max_dev_fail++ < 5)
          $display("FAIL: step %0d dut b=%f a=%f ref b=%f a=%f", k,
                   to_real(theta_den), to_real(theta_num), rb, ra);
      end
    end
    $display("random input: b=%f a=%f (ref %f %f)", to_real(theta_den), to_real(theta_num), rb, ra);
    check((to_real(theta_den) - B_TRUE) < 0.02 && (B_TRUE - to_real(theta_den)) < 0.02, "b converged");
    check((to_real(theta_num) - A_TRUE) < 0.02 && (A_TRUE - to_real(theta_num)) < 0.02, "a converged");

    // ---- reset, then the tool's step test --------------------------------
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    ref_reset();
    check(theta_den == FIX_ONE && theta_num == FIX_ONE, "reset restores [1, 1]");
    yp = 0.0;
    up = 0.0;
    for (int k = 0; k < 200; k++) begin
      real uq;
      uq = real'(quant(up)) / 128.0;
      yp = B_TRUE * yp + A_TRUE * uq;
      up = 0.75;                      // step applied together with reset release
      feed(quant(yp), quant(up), lat);
      if (k > 0) begin
        checks++;
        if ((to_real(theta_den) - rb > 0.01) || (rb - to_real(theta_den) > 0.01) ||
            (to_real(theta_num) - ra > 0.01) || (ra - to_real(theta_num) > 0.01)) begin
          failures++;
          if (max_dev_fail++ < 10)
            $display("FAIL: step test %0d dut b=%f a=%f ref b=%f a=%f", k,
                     to_real(theta_den), to_real(theta_num), rb, ra);
        end
      end
    end
    $display("step input: b=%f a=%f (ref %f %f)", to_real(theta_den), to_real(theta_num), rb, ra);
    check((to_real(theta_den) - B_TRUE) < 0.05 && (B_TRUE - to_real(theta_den)) < 0.05, "step: b near plant");
    check((to_real(theta_num) - A_TRUE) < 0.05 && (A_TRUE - to_real(theta_num)) < 0.05, "step: a near plant");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
