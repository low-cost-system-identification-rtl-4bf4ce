// Behavioural model of an AD7823-style 8-bit serial A/D converter, for
// simulation only (not synthesizable).
//
// A falling edge on convst_n samples the input code; after CONV_DELAY time
// units the conversion is complete and the MSB appears on dout. Each falling
// edge of sclk moves the next bit onto dout (after a small output delay), so
// a receiver sampling just before each falling edge sees the bits MSB
// first. `early_reads` counts sclk falling edges that arrive while a
// conversion is still running, which a correct interface never produces.
// Delays are in the simulator's default time unit; the testbenches use a
// 20-unit clock period, so CONV_DELAY = 275 stands for the converter's
// 5.5 us conversion time at a 50 MHz clock.
module ad7823_model #(
  parameter int CONV_DELAY = 275
) (
  input  logic       convst_n,
  input  logic       sclk,
  input  logic [7:0] code,       // offset-binary value to convert
  output logic       dout,
  output int         conversions,
  output int         early_reads
);

  logic [7:0] sreg = '0;
  logic       ready = 1'b0;
  logic       converting = 1'b0;

  initial begin
    dout        = 1'b0;
    conversions = 0;
    early_reads = 0;
  end

  always @(negedge convst_n) begin
    ready = 1'b0;
    converting = 1'b1;
    sreg  = code;
    #(CONV_DELAY);
    ready = 1'b1;
    converting = 1'b0;
    dout  = sreg[7];
    conversions++;
  end

  always @(negedge sclk) begin
    if (converting) early_reads++;
    #1;
    sreg = {sreg[6:0], 1'b0};
    dout = sreg[7];
  end

endmodule
