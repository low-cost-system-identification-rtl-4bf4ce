// Sample-rate clock enable.
//
// Divides the system clock down to the A/D sampling rate: `tick` is high for
// one clock every CLK_HZ/SAMPLE_HZ clocks (every 5000 clocks, i.e. 10 kHz,
// with the 50 MHz clock). Each tick starts one conversion of both A/D
// channels. The 10 kHz rate and 50 MHz clock are the tool's; the free-running
// counter is this design's own. The first tick comes PERIOD clocks after
// reset is released.
module sample_timer #(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned SAMPLE_HZ = 10_000
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  localparam int unsigned PERIOD = CLK_HZ / SAMPLE_HZ;
  localparam int unsigned CNT_W  = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CNT_W'(PERIOD - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

endmodule
