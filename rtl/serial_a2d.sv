// Dual serial A/D interface for two AD7823-style 8-bit converters.
//
// Both converters share the start-convert (convst_n) and serial clock
// (a2d_clk) lines; each has its own data line. A pulse on `start` while the
// interface is idle runs one conversion:
//   CONVST : convst_n held low for CONVST_CYCLES clocks (starts conversion)
//   WAIT   : convst_n high for WAIT_CYCLES clocks (conversion time)
//   READ   : a2d_clk toggles every SCLK_HALF_CYCLES clocks; on each
//            high-to-low transition one bit of each converter is shifted
//            in, MSB first, until BITS bits are held
// The converters deliver offset binary (mid-scale = 0x80 for the 1.65 V
// bias); inverting the MSB yields two's complement. Both results are loaded
// into sample1/sample2 and `valid` pulses for one clock.
//
// The state sequence, the counts 51 / 250 / 51 at 50 MHz, falling-edge
// sampling and the MSB inversion follow the tool's A/D interface. Choices of
// this design: every register uses the rising clock edge (the original
// interface logic ran on the falling edge), registered a2d_clk, a `busy` output, starts that arrive while
// busy are ignored, and the output registers load only at the end of a
// complete read. Timing: with the defaults `valid` rises
// 51 + 250 + 2*8*51 = 1117 clocks (22.3 us at 50 MHz) after the clock edge
// that accepts `start`.
module serial_a2d #(
  parameter int unsigned CONVST_CYCLES    = 51,
  parameter int unsigned WAIT_CYCLES      = 250,
  parameter int unsigned SCLK_HALF_CYCLES = 51,
  parameter int unsigned BITS             = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            data_in1,
  input  logic            data_in2,
  output logic            convst_n,
  output logic            a2d_clk,
  output logic [BITS-1:0] sample1,
  output logic [BITS-1:0] sample2,
  output logic            valid,
  output logic            busy
);

  typedef enum logic [1:0] {S_IDLE, S_CONVST, S_WAIT, S_READ} state_t;

  localparam int unsigned CNT_MAX = (WAIT_CYCLES > CONVST_CYCLES) ?
                                    ((WAIT_CYCLES > SCLK_HALF_CYCLES) ? WAIT_CYCLES : SCLK_HALF_CYCLES) :
                                    ((CONVST_CYCLES > SCLK_HALF_CYCLES) ? CONVST_CYCLES : SCLK_HALF_CYCLES);
  localparam int unsigned CNT_W = $clog2(CNT_MAX + 1);
  localparam int unsigned BIT_W = $clog2(BITS + 1);

  state_t            state;
  logic [CNT_W-1:0]  cnt;
  logic [BIT_W-1:0]  bit_cnt;
  logic [BITS-1:0]   shift1, shift2;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      bit_cnt  <= '0;
      shift1   <= '0;
      shift2   <= '0;
      convst_n <= 1'b1;
      a2d_clk  <= 1'b0;
      sample1  <= '0;
      sample2  <= '0;
      valid    <= 1'b0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          convst_n <= 1'b1;
          a2d_clk  <= 1'b0;
          if (start) begin
            convst_n <= 1'b0;
            cnt      <= '0;
            state    <= S_CONVST;
          end
        end
        S_CONVST: begin
          if (cnt == CNT_W'(CONVST_CYCLES - 1)) begin
            cnt      <= '0;
            convst_n <= 1'b1;
            state    <= S_WAIT;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_WAIT: begin
          if (cnt == CNT_W'(WAIT_CYCLES - 1)) begin
            cnt     <= '0;
            bit_cnt <= '0;
            state   <= S_READ;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_READ: begin
          if (cnt == CNT_W'(SCLK_HALF_CYCLES - 1)) begin
            cnt     <= '0;
            a2d_clk <= ~a2d_clk;
            if (a2d_clk) begin
              // falling edge of the serial clock: take one bit per channel
              shift1  <= {shift1[BITS-2:0], data_in1};
              shift2  <= {shift2[BITS-2:0], data_in2};
              bit_cnt <= bit_cnt + 1'b1;
              if (bit_cnt == BIT_W'(BITS - 1)) begin
                sample1 <= {~shift1[BITS-2], shift1[BITS-3:0], data_in1};
                sample2 <= {~shift2[BITS-2], shift2[BITS-3:0], data_in2};
                valid   <= 1'b1;
                state   <= S_IDLE;
              end
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
