// End-to-end testbench of system_id_top at its default parameters
// (50 MHz clock, 10 kHz A/D rate, decimation 100, i.e. 10 ms model samples).
//
// The system under test is H(s) = 10/(s+10), evaluated analytically at each
// conversion start: after a step of height U at t0 its output is
// U (1 - exp(-10 (t - t0))). Two converter models digitise y (channel 1)
// and u (channel 2) as offset binary codes. A bus model follows the
// microcontroller's test sequence: hold reset low with the stimulus low,
// release reset and raise the step together, then every 10 ms write a
// channel number and read it back for channels 0..3 (plus one unused
// channel). Two complete runs are made, so the reset-restart is exercised.
//
// Checked: the identified H(z) = a/(z - b) ends within 4 codes (4/128) of
// the exact discretisation 0.09516/(z - 0.9048); during reset both
// coefficient codes read 128 (1.0); the sample channels match the plant;
// the unused channel reads 0; the RS-232 lines pass through; and each
// mechanism happened: conversions, decimated samples, estimator updates,
// restarts, select writes, reads of every channel. Coefficient clipping is
// counted and reported.
module tb_system_id_top;

  localparam real TCLK   = 20.0e-9;     // 50 MHz
  localparam real U_STEP = 0.75;        // step height, fraction of full scale
  localparam int  PRE    = 5;           // 10 ms periods with reset held low
  localparam int  POST   = 100;         // 10 ms periods after the step
  localparam int  PERIOD = 500_000;     // clocks per 10 ms
  localparam int  B_CODE = 116;         // round(0.9048 * 128)
  localparam int  A_CODE = 12;          // round(0.09516 * 128)

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic d1, d2, a2d_clk, convst_n;
  logic enable_in = 1'b0, read_in = 1'b0;
  logic [7:0] databus_i = 8'hFF;
  logic [7:0] databus_o;
  logic databus_oe;
  logic tx_in = 1'b1, rx_in = 1'b1, tx_out, rx_out;
  logic coeff_sat;
  logic [7:0] code_y = 8'h80, code_u = 8'h80;
  int conv1, conv2, early1, early2;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  system_id_top dut (
    .clk, .rst_n, .data_in1 (d1), .data_in2 (d2), .a2d_clk, .convst_n,
    .enable_in, .read_in, .databus_i, .databus_o, .databus_oe,
    .tx_in, .rx_in, .tx_out, .rx_out, .coeff_sat
  );

  ad7823_model m_y (.convst_n, .sclk (a2d_clk), .code (code_y), .dout (d1),
                    .conversions (conv1), .early_reads (early1));
  ad7823_model m_u (.convst_n, .sclk (a2d_clk), .code (code_u), .dout (d2),
                    .conversions (conv2), .early_reads (early2));

  // ---- plant ------------------------------------------------------------
  longint cyc = 0;
  longint step_cyc = -1;
  bit     step_on = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic real plant_y();
    real t;
    if (!step_on) return 0.0;
    t = real'(cyc - step_cyc) * TCLK;
    return U_STEP * (1.0 - $exp(-10.0 * t));
  endfunction

  function automatic logic [7:0] to_code(input real v);
    int c;
    c = $rtoi(v * 128.0 + 128.5);
    if (c > 255) c = 255;
    if (c < 0) c = 0;
    return 8'(c);
  endfunction

  // analog values at the converter inputs, refreshed every microsecond
  always @(posedge clk) begin
    if (cyc % 50 == 0) begin
      code_y <= to_code(plant_y());
      code_u <= to_code(step_on ? U_STEP : 0.0);
    end
  end

  // ---- mechanism counters -------------------------------------------------
  int n_ds = 0, n_upd = 0, n_sat = 0, n_restart = 0, n_write = 0, n_unused = 0;
  int n_read [4] = '{0, 0, 0, 0};
  always @(posedge clk) begin
    if (dut.u_ds.out_valid) n_ds++;
    if (dut.u_est.upd_valid) n_upd++;
    if (coeff_sat) n_sat++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- microcontroller bus model ------------------------------------------
  task automatic bus_read_ch(input int ch, output logic [7:0] v);
    @(negedge clk);
    read_in = 1'b0;
    databus_i = 8'(8'h80 + ch);
    enable_in = 1'b1;
    @(negedge clk);
    enable_in = 1'b0;
    databus_i = 8'hFF;
    n_write++;
    @(negedge clk);
    read_in = 1'b1;
    enable_in = 1'b1;
    @(negedge clk);
    check(databus_oe, "FPGA drives the bus during a read");
    v = databus_o;
    enable_in = 1'b0;
    if (ch < 4) n_read[ch]++;
    else n_unused++;
  endtask

  task automatic wait_clocks(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    #(20.0 * 2 * (PRE + POST + 10) * PERIOD);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] den, num, ys, us, v;
    logic [7:0] first_den, first_num;
    for (int run = 0; run < 2; run++) begin
      // stimulus low, reset low
      rst_n = 1'b0;
      step_on = 0;
      for (int j = 0; j < PRE; j++) begin
        wait_clocks(PERIOD - 20);
        bus_read_ch(0, den);
        bus_read_ch(1, num);
        check(den == 8'd128 && num == 8'd128, "coefficients read 1.0 during reset");
      end
      n_restart++;
      // step and reset release together
      @(negedge clk);
      rst_n = 1'b1;
      step_on = 1;
      step_cyc = cyc;
      // RS-232 lines are routed straight through
      tx_in = 1'b0; rx_in = 1'b1; #1;
      check(tx_out == 1'b0 && rx_out == 1'b1, "RS-232 routing");
      tx_in = 1'b1; rx_in = 1'b0; #1;
      check(tx_out == 1'b1 && rx_out == 1'b0, "RS-232 routing");
      rx_in = 1'b1;
      for (int j = 0; j < POST; j++) begin
        wait_clocks(PERIOD - 40);
        bus_read_ch(0, den);
        bus_read_ch(1, num);
        bus_read_ch(2, ys);
        bus_read_ch(3, us);
        if (j > 2) begin
          int dy;
          dy = int'($signed(ys)) - int'($signed(to_code(plant_y()) ^ 8'h80));
          check(dy >= -2 && dy <= 2, $sformatf("system output sample %h vs plant %h", ys, to_code(plant_y()) ^ 8'h80));
          check(us == (to_code(U_STEP) ^ 8'h80), $sformatf("system input sample %h", us));
        end
        if (j % 30 == 0)
          $display("run %0d t=%0d ms: b=%0.4f a=%0.4f  y=%0d u=%0d", run, 10 * j,
                   real'(den) / 128.0, real'(num) / 128.0, $signed(ys), $signed(us));
      end
      bus_read_ch(5, v);
      check(v == 8'h00, "unused channel reads 0");
      $display("run %0d result: H(z) = %0.4f / (z - %0.4f)", run, real'(num) / 128.0, real'(den) / 128.0);
      if (run == 0) begin
        first_den = den;
        first_num = num;
      end else begin
        check(den == first_den && num == first_num, "a restarted run repeats the first one");
      end
      check(int'(den) >= B_CODE - 4 && int'(den) <= B_CODE + 4, $sformatf("den code %0d, plant %0d", den, B_CODE));
      check(int'(num) >= A_CODE - 4 && int'(num) <= A_CODE + 4, $sformatf("num code %0d, plant %0d", num, A_CODE));
    end
    // every mechanism happened
    $display("conversions=%0d decimated=%0d updates=%0d restarts=%0d writes=%0d reads=%0d/%0d/%0d/%0d unused=%0d clipped_clocks=%0d",
             conv1, n_ds, n_upd, n_restart, n_write, n_read[0], n_read[1], n_read[2], n_read[3], n_unused, n_sat);
    check(conv1 > 0 && conv1 == conv2, "A/D conversions happened on both channels");
    check(early1 == 0 && early2 == 0, "no serial read before conversion end");
    check(n_ds > 0, "decimated samples reached the estimator");
    check(n_upd >= 2 * (POST - 2), $sformatf("%0d estimator updates", n_upd));
    check(n_restart == 2, "estimator restarted by reset");
    check(n_write > 0, "select writes");
    check(n_read[0] > 0 && n_read[1] > 0 && n_read[2] > 0 && n_read[3] > 0, "every channel read");
    check(n_unused > 0, "unused channel read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
