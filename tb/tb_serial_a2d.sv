// Self-checking testbench of serial_a2d.
//
// Two converter models feed random codes; every result must equal the code
// with its MSB inverted (offset binary to two's complement). Also checked:
// convst_n is low for 51 clocks, eight serial clock pulses per read, the
// 1117-clock latency from the accepted start to `valid`, that a start while
// busy is ignored, and that no bit is read before the conversion ended.
module tb_serial_a2d;

  localparam int LATENCY = 51 + 250 + 2 * 8 * 51;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic d1, d2, convst_n, a2d_clk, valid, busy;
  logic [7:0] s1, s2;
  logic [7:0] code1, code2;
  int conv1, conv2, early1, early2;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  serial_a2d dut (
    .clk, .rst_n, .start, .data_in1 (d1), .data_in2 (d2),
    .convst_n, .a2d_clk, .sample1 (s1), .sample2 (s2), .valid, .busy
  );

  ad7823_model m1 (.convst_n, .sclk (a2d_clk), .code (code1), .dout (d1),
                   .conversions (conv1), .early_reads (early1));
  ad7823_model m2 (.convst_n, .sclk (a2d_clk), .code (code2), .dout (d2),
                   .conversions (conv2), .early_reads (early2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // count convst_n low clocks and sclk rising edges of the current conversion
  int low_clks, sclk_pulses;
  logic sclk_d;
  always @(posedge clk) begin
    sclk_d <= a2d_clk;
    if (!convst_n) low_clks++;
    if (a2d_clk && !sclk_d) sclk_pulses++;
  end

  initial begin
    #(20 * 200000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    code1 = 8'h00;
    code2 = 8'h00;
    sclk_d = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(convst_n && !a2d_clk && !busy, "idle outputs after reset");
    for (int n = 0; n < 24; n++) begin
      case (n)
        0: begin code1 = 8'h00; code2 = 8'hFF; end
        1: begin code1 = 8'h80; code2 = 8'h7F; end
        2: begin code1 = 8'hA5; code2 = 8'h5A; end
        default: begin code1 = 8'($urandom); code2 = 8'($urandom); end
      endcase
      low_clks = 0;
      sclk_pulses = 0;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      cyc = 1;
      // a second start in the middle of the conversion must be ignored
      repeat (100) @(negedge clk) cyc++;
      start = 1'b1;
      @(negedge clk) begin start = 1'b0; cyc++; end
      while (!valid) @(negedge clk) cyc++;
      // cyc counts from the clock that samples start, plus one for the valid edge
      check(cyc == LATENCY + 1, $sformatf("latency %0d, expected %0d", cyc - 1, LATENCY));
      check(s1 == (code1 ^ 8'h80), $sformatf("ch1 %h for code %h", s1, code1));
      check(s2 == (code2 ^ 8'h80), $sformatf("ch2 %h for code %h", s2, code2));
      check(low_clks == 51, $sformatf("convst_n low %0d clocks", low_clks));
      check(sclk_pulses == 8, $sformatf("%0d sclk pulses", sclk_pulses));
      @(negedge clk);
      check(!valid && !busy, "valid is a single pulse, back to idle");
      repeat (20) @(negedge clk);
      check(low_clks == 51, "no conversion started by the ignored start");
    end
    check(conv1 == 24 && conv2 == 24, $sformatf("conversions %0d %0d", conv1, conv2));
    check(early1 == 0 && early2 == 0, "no read before end of conversion");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
