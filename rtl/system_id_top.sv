// FPGA top of the low-cost first-order system identification tool.
//
// Two analog channels, the output y and the input u of the system under
// test, are conditioned on the analog board and digitised by two serial
// 8-bit A/D converters. Inside the FPGA:
//   sample_timer  -> 10 kHz conversion start
//   serial_a2d    -> both channels converted together, two's complement
//   downsample    -> every DECIM-th pair (10 ms model sample time)
//   rls_estimator -> recursive least squares fit of H(z) = a/(z - b)
//   coeff_convert -> b and a as 8-bit codes (value = code/128)
//   uc_interface  -> the PSoC reads channel 0 = b, 1 = a, 2 = latest system
//                    output sample, 3 = latest system input sample
// The PSoC also owns the reset line (it holds rst_n low until it applies
// the step stimulus, which restarts the estimate from theta = [1, 1]) and
// the UART, whose two lines are only routed through the FPGA to the
// board's RS-232 level translator (tx_in -> tx_out, rx_in -> rx_out).
//
// The shared tri-state data bus is brought out as databus_i, databus_o and
// databus_oe; the pad buffer belongs in the board-level wrapper.
// coeff_sat reports whether either coefficient code is clipped.
// Everything is clocked by the 50 MHz clk; rst_n resets asynchronously.
module system_id_top #(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned SAMPLE_HZ = 10_000,
  parameter int unsigned DECIM     = 100,
  parameter int unsigned P_INIT    = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  // serial A/D converters
  input  logic       data_in1,
  input  logic       data_in2,
  output logic       a2d_clk,
  output logic       convst_n,
  // PSoC bus
  input  logic       enable_in,
  input  logic       read_in,
  input  logic [7:0] databus_i,
  output logic [7:0] databus_o,
  output logic       databus_oe,
  // RS-232 routing
  input  logic       tx_in,
  input  logic       rx_in,
  output logic       tx_out,
  output logic       rx_out,
  // status
  output logic       coeff_sat
);

  import sysid_pkg::*;

  logic       tick;
  logic [7:0] a2d_y, a2d_u;
  logic       a2d_valid, a2d_busy;
  logic [7:0] ds_y, ds_u;
  logic       ds_valid;
  fix_t       theta_den, theta_num;
  logic       upd_valid, est_busy;
  logic [7:0] den_code, num_code;
  logic       den_sat, num_sat;
  logic [7:0] regs_in [4];
  logic [6:0] sel;

  sample_timer #(.CLK_HZ(CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ)) u_timer (
    .clk, .rst_n, .tick
  );

  serial_a2d u_a2d (
    .clk, .rst_n, .start (tick), .data_in1, .data_in2,
    .convst_n, .a2d_clk, .sample1 (a2d_y), .sample2 (a2d_u),
    .valid (a2d_valid), .busy (a2d_busy)
  );

  downsample #(.DECIM(DECIM), .W(8)) u_ds (
    .clk, .rst_n, .in_valid (a2d_valid), .in1 (a2d_y), .in2 (a2d_u),
    .out_valid (ds_valid), .out1 (ds_y), .out2 (ds_u)
  );

  rls_estimator #(.P_INIT(P_INIT)) u_est (
    .clk, .rst_n, .in_valid (ds_valid), .y_in (ds_y), .u_in (ds_u),
    .theta_den, .theta_num, .upd_valid, .busy (est_busy)
  );

  coeff_convert u_conv_den (.theta (theta_den), .code (den_code), .sat (den_sat));
  coeff_convert u_conv_num (.theta (theta_num), .code (num_code), .sat (num_sat));

  assign regs_in[0] = den_code;
  assign regs_in[1] = num_code;
  assign regs_in[2] = a2d_y;
  assign regs_in[3] = a2d_u;

  uc_interface #(.NUM_REGS(4)) u_uc (
    .clk, .coeff_in (regs_in), .enable_in, .read_in,
    .databus_i, .databus_o, .databus_oe, .sel
  );

  assign tx_out    = tx_in;
  assign rx_out    = rx_in;
  assign coeff_sat = den_sat | num_sat;

endmodule
