// Microcontroller bus interface: the register file the PSoC reads.
//
// The PSoC shares an 8-bit data bus with the FPGA and controls it with
// ENABLE and RD/WR (read_in). A read of one register is two bus cycles:
//   write: read_in = 0, enable_in = 1, the PSoC drives the channel number on
//          databus[6:0]; it is captured into the select register on each
//          clock edge while enable_in is high
//   read : read_in = 1, enable_in = 1, the FPGA drives the selected register
//          onto the bus (databus_oe = 1) for as long as both are high
// Channels 0..NUM_REGS-1 return coeff_in[0..]; any other channel returns 0.
// In the tool the four channels are: 0 denominator coefficient, 1 numerator
// coefficient, 2 system output sample, 3 system input sample. Bit 7 of the
// written byte is not used.
//
// The microcontroller keeps the FPGA in reset while it reads (it shows the
// initial coefficients of 1.0 before the test starts), so the interface
// must work during reset: the read path is the live register inputs, and
// the select register has no reset; it is set by the first write cycle.
// The module therefore has no reset input. These points, the
// two-cycle protocol, the 7-bit select register, the register order and the
// zero for unused channels follow the tool. Splitting the tri-state bus into
// databus_i / databus_o / databus_oe (the pad is a tri-state buffer outside
// this module) is this design's choice. Timing: databus_o follows the select
// register and the inputs combinationally; a new select value is visible the
// clock after the write edge.
module uc_interface #(
  parameter int unsigned NUM_REGS = 4
) (
  input  logic       clk,
  input  logic [7:0] coeff_in [NUM_REGS],
  input  logic       enable_in,
  input  logic       read_in,
  input  logic [7:0] databus_i,
  output logic [7:0] databus_o,
  output logic       databus_oe,
  output logic [6:0] sel
);

  logic [7:0] mux_out;

  // select register: written on every clock edge of a write cycle
  always_ff @(posedge clk) begin
    if (enable_in && !read_in)
      sel <= databus_i[6:0];
  end

  always_comb begin
    mux_out = '0;
    for (int i = 0; i < NUM_REGS; i++)
      if (sel == 7'(i)) mux_out = coeff_in[i];
  end

  assign databus_oe = enable_in && read_in;
  assign databus_o  = databus_oe ? mux_out : '0;

  // the bus is only driven in a read cycle
  a_no_drive_on_write: assert property (@(posedge clk) !(databus_oe && !read_in));

endmodule
