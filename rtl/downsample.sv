// Sample-pair decimator ("Down Sample" ahead of the estimator).
//
// Passes one of every DECIM input sample pairs to the output and holds it
// there: out1/out2 load and out_valid pulses for one clock on the first
// input strobe after reset and then on every DECIM-th strobe. With the A/D
// running at 10 kHz and DECIM = 100 the estimator sees a sample every 10 ms,
// the sample time of the identified discrete model. The ratio is this
// design's choice; it reconciles the 10 kHz acquisition rate with the 10 ms
// model sample time. Latency: one clock.
module downsample #(
  parameter int unsigned DECIM = 100,
  parameter int unsigned W     = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  output logic         out_valid,
  output logic [W-1:0] out1,
  output logic [W-1:0] out2
);

  localparam int unsigned CNT_W = (DECIM > 1) ? $clog2(DECIM) : 1;

  logic [CNT_W-1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      out_valid <= 1'b0;
      out1      <= '0;
      out2      <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (phase == '0) begin
          out1      <= in1;
          out2      <= in2;
          out_valid <= 1'b1;
        end
        phase <= (phase == CNT_W'(DECIM - 1)) ? '0 : phase + 1'b1;
      end
    end
  end

endmodule
