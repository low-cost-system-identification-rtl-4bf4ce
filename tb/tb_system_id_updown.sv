// Testbench of system_id_top running the microcontroller's complete test
// cycle at the default parameters: reset low with the stimulus low, then the
// step up together with reset release, then the step back down while the
// estimator keeps running, then reset low again. The plant 10/(s+10) is
// integrated exactly for a piecewise-constant input every microsecond.
//
// Checked: the coefficients read 1.0 while reset is low; after the rising
// step and again after the falling step the identified H(z) = a/(z - b) is
// within 4/128 of the exact discretisation 0.09516/(z - 0.9048); updates
// continue through the falling step; the system-input channel follows the
// stimulus.
module tb_system_id_updown;

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
  real    u_now = 0.0;
  real    y_now = 0.0;
  localparam real DECAY = 0.99999000005;   // exp(-10 * 1 us)

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc % 50 == 0) y_now = u_now + (y_now - u_now) * DECAY;
  end

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
      code_y <= to_code(y_now);
      code_u <= to_code(u_now);
    end
  end

  int n_upd = 0;
  always @(posedge clk) if (dut.u_est.upd_valid) n_upd++;

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
    @(negedge clk);
    read_in = 1'b1;
    enable_in = 1'b1;
    @(negedge clk);
    v = databus_o;
    enable_in = 1'b0;
  endtask

  task automatic read_coeffs(output logic [7:0] den, output logic [7:0] num, output logic [7:0] us);
    bus_read_ch(0, den);
    bus_read_ch(1, num);
    bus_read_ch(3, us);
  endtask

  task automatic near_plant(input logic [7:0] den, input logic [7:0] num, input string when);
    $display("%s: H(z) = %0.4f / (z - %0.4f)", when, real'(num) / 128.0, real'(den) / 128.0);
    check(int'(den) >= B_CODE - 4 && int'(den) <= B_CODE + 4, $sformatf("%s: den code %0d, plant %0d", when, den, B_CODE));
    check(int'(num) >= A_CODE - 4 && int'(num) <= A_CODE + 4, $sformatf("%s: num code %0d, plant %0d", when, num, A_CODE));
  endtask

  task automatic wait_clocks(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    #(20.0 * (2 * PRE + 2 * POST + 10) * PERIOD);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] den, num, us, den_up, num_up;
    int upd_at_down;
    // reset low, stimulus low
    for (int j = 0; j < PRE; j++) begin
      wait_clocks(PERIOD - 20);
      read_coeffs(den, num, us);
      check(den == 8'd128 && num == 8'd128, "coefficients read 1.0 during reset");
    end
    // step up with reset release
    @(negedge clk);
    rst_n = 1'b1;
    u_now = U_STEP;
    for (int j = 0; j < POST; j++) begin
      wait_clocks(PERIOD - 20);
      read_coeffs(den, num, us);
      if (j > 2) check(us == (to_code(U_STEP) ^ 8'h80), "system input reads the high step");
    end
    near_plant(den, num, "after the rising step");
    den_up = den;
    num_up = num;
    // step down, estimator keeps running
    upd_at_down = n_upd;
    u_now = 0.0;
    for (int j = 0; j < POST; j++) begin
      wait_clocks(PERIOD - 20);
      read_coeffs(den, num, us);
      if (j > 2) check(us == 8'h00, "system input reads the low step");
    end
    near_plant(den, num, "after the falling step");
    check(n_upd - upd_at_down >= POST - 1, $sformatf("%0d updates during the falling step", n_upd - upd_at_down));
    // reset low again
    @(negedge clk);
    rst_n = 1'b0;
    for (int j = 0; j < PRE; j++) begin
      wait_clocks(PERIOD - 20);
      read_coeffs(den, num, us);
      check(den == 8'd128 && num == 8'd128, "coefficients read 1.0 after reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
