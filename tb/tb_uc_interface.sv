// Self-checking testbench of uc_interface.
//
// Models the microcontroller's access sequence: a write cycle (RD/WR low,
// ENABLE pulsed) that puts 0x80 + channel on the bus, then a read cycle
// (RD/WR high, ENABLE high) that samples the bus. Checked: each of the four
// channels returns its register, channels above 3 return zero, bit 7 of the
// written byte is ignored, the FPGA drives the bus only during a read, the
// select register holds between accesses, and a register change is seen by
// the next read.
module tb_uc_interface;

  logic clk = 1'b0;
  logic [7:0] coeff_in [4];
  logic enable_in = 1'b0;
  logic read_in = 1'b0;
  logic [7:0] databus_i = '0;
  logic [7:0] databus_o;
  logic databus_oe;
  logic [6:0] sel;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  uc_interface dut (.clk, .coeff_in, .enable_in, .read_in,
                    .databus_i, .databus_o, .databus_oe, .sel);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic bus_write(input logic [7:0] v);
    @(negedge clk);
    read_in = 1'b0;
    databus_i = v;
    enable_in = 1'b1;
    @(negedge clk);
    check(!databus_oe, "bus not driven during a write");
    enable_in = 1'b0;
    databus_i = 8'hFF;
  endtask

  task automatic bus_read(output logic [7:0] v);
    @(negedge clk);
    read_in = 1'b1;
    check(!databus_oe, "bus not driven before ENABLE");
    enable_in = 1'b1;
    #1;
    check(databus_oe, "bus driven during a read");
    @(negedge clk);
    v = databus_o;
    enable_in = 1'b0;
    #1;
    check(!databus_oe, "bus released after ENABLE");
  endtask

  initial begin
    #(20 * 100000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v;
    for (int i = 0; i < 4; i++) coeff_in[i] = '0;
    repeat (2) @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      int ch;
      for (int i = 0; i < 4; i++) coeff_in[i] = 8'($urandom);
      ch = (n % 5 == 4) ? $urandom_range(4, 127) : $urandom_range(0, 3);
      bus_write(8'((n % 2 ? 8'h80 : 8'h00) + ch));
      check(sel == 7'(ch), $sformatf("select %0d, expected %0d", sel, ch));
      bus_read(v);
      if (ch < 4)
        check(v == coeff_in[ch], $sformatf("channel %0d read %h, expected %h", ch, v, coeff_in[ch]));
      else
        check(v == 8'h00, $sformatf("unused channel %0d read %h", ch, v));
      // select holds: change the register and read again without a write
      if (ch < 4) begin
        coeff_in[ch] = ~coeff_in[ch];
        @(negedge clk);
        bus_read(v);
        check(v == coeff_in[ch], $sformatf("re-read channel %0d %h, expected %h", ch, v, coeff_in[ch]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
