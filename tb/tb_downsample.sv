// Self-checking testbench of downsample with the default ratio of 100:
// random input strobes with random gaps; the output must fire on input
// strobes 0, 100, 200, ... one clock later, carry exactly those samples and
// hold them in between.
module tb_downsample;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [7:0] in1, in2, out1, out2;
  logic out_valid;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  downsample dut (.clk, .rst_n, .in_valid, .in1, .in2, .out_valid, .out1, .out2);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #(20 * 200000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] e1, e2;
    int outs;
    in1 = '0;
    in2 = '0;
    e1 = '0;
    e2 = '0;
    outs = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      repeat ($urandom_range(0, 4)) begin
        @(negedge clk);
        check(!out_valid, "no output without input");
      end
      in1 = 8'($urandom);
      in2 = 8'($urandom);
      in_valid = 1'b1;
      if (n % 100 == 0) begin
        e1 = in1;
        e2 = in2;
      end
      @(negedge clk);
      in_valid = 1'b0;
      check(out_valid == (n % 100 == 0), $sformatf("out_valid at input %0d", n));
      if (out_valid) outs++;
      check(out1 == e1 && out2 == e2, $sformatf("held samples at input %0d", n));
    end
    check(outs == 10, $sformatf("%0d outputs for 1000 inputs", outs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
