// Self-checking testbench of sample_timer at the default 50 MHz / 10 kHz:
// every tick is one clock wide and consecutive ticks are exactly 5000
// clocks apart; the first comes 5000 clocks after reset release.
module tb_sample_timer;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic tick;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  sample_timer dut (.clk, .rst_n, .tick);

  initial begin
    #(20 * 200000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, last, n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    cyc = 0;
    last = 0;
    n = 0;
    while (n < 20) begin
      @(negedge clk);
      cyc++;
      if (tick) begin
        checks++;
        if (cyc - last != 5000) begin
          failures++;
          $display("FAIL: tick %0d after %0d clocks", n, cyc - last);
        end
        last = cyc;
        n++;
        @(negedge clk);
        cyc++;
        checks++;
        if (tick) begin
          failures++;
          $display("FAIL: tick wider than one clock");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
