// Self-checking testbench of the rls_recip helper: for random divisors the
// result must equal floor(2^48 / den) computed with 64-bit integers, ready
// 2*FIX_F + 1 clocks after start; zero, negative and very small divisors
// must give the largest positive value.
module tb_rls_recip;

  import sysid_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  fix_t den, recip;
  logic done, busy;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  rls_recip dut (.clk, .rst_n, .start, .den, .recip, .done, .busy);

  task automatic try(input fix_t d);
    longint q;
    int lat;
    @(negedge clk);
    den = d;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    if (d <= 0) q = 64'h7FFF_FFFF;
    else begin
      q = (64'sd1 <<< (2 * FIX_F)) / longint'(d);
      if (q > 64'h7FFF_FFFF) q = 64'h7FFF_FFFF;
    end
    checks++;
    if (longint'(recip) != q || lat != 2 * FIX_F + 2) begin
      failures++;
      $display("FAIL: den %0d recip %0d expected %0d after %0d clocks", d, recip, q, lat - 1);
    end
  endtask

  initial begin
    #(20 * 100000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    den = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    try(FIX_ONE);
    try(FIX_ONE * 3);
    try(0);
    try(-5);
    try(1);
    try(fix_t'(32'h7FFF_FFFF));
    for (int n = 0; n < 300; n++) try(fix_t'($urandom_range(32'h0100_0000, 32'h7FFF_FFFF)));
    for (int n = 0; n < 100; n++) try(fix_t'($urandom_range(1, 32'h0100_0000)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
