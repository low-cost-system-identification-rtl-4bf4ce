// Self-checking testbench of coeff_convert: fixed edge values (0, 0.1, 0.9,
// 1.0, the largest code, negative values, values above the range) and random
// coefficients, each compared with round(theta * 128) clipped to 0 .. 255
// worked out in floating point.
module tb_coeff_convert;

  import sysid_pkg::*;

  fix_t theta;
  logic [7:0] code;
  logic sat;
  int checks = 0, failures = 0;

  coeff_convert dut (.theta, .code, .sat);

  function automatic fix_t f(input real v);
    return fix_t'($rtoi(v * real'(64'(1) << FIX_F)));
  endfunction

  task automatic try(input real v);
    real x;
    int exp_code;
    bit exp_sat;
    theta = f(v);
    #1;
    x = real'(theta) / real'(64'(1) << FIX_F) * 128.0;
    exp_code = $rtoi(x + 0.5);
    if (x + 0.5 < 0.0) exp_code = -1;    // $rtoi truncates toward zero
    exp_sat = 0;
    if (v < 0.0) begin exp_code = 0; exp_sat = 1; end
    else if (exp_code > 255) begin exp_code = 255; exp_sat = 1; end
    checks++;
    if (code != 8'(exp_code) || sat != exp_sat) begin
      failures++;
      $display("FAIL: theta %f code %0d sat %b, expected %0d %b", v, code, sat, exp_code, exp_sat);
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
    try(0.0); try(0.1); try(0.9); try(1.0); try(0.9048); try(0.09516);
    try(255.0 / 128.0); try(255.49 / 128.0); try(255.51 / 128.0); try(2.0);
    try(100.0); try(-0.001); try(-3.0); try(-127.0); try(127.9);
    for (int n = 0; n < 2000; n++)
      try((real'($urandom_range(0, 600000)) - 100000.0) / 200000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
