// Sequential fixed-point reciprocal, recip = 1/den.
//
// Restoring division of 2^(2*FIX_F) by den, one quotient bit per clock,
// 2*FIX_F+1 clocks after `start`; `done` pulses for one clock with the
// result. A quotient that does not fit the fixed-point word (den below
// 2^-(FIX_W-FIX_F-1)) or a non-positive den gives the largest positive
// value. The estimator uses it for the 1/(1 + phi' P phi) factor of the
// gain; a bit-serial divider is this design's choice, since the update rate
// (100 Hz) leaves thousands of clocks per update.
module rls_recip
  import sysid_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fix_t den,
  output fix_t recip,
  output logic done,
  output logic busy
);

  localparam int unsigned QB = 2 * FIX_F + 1;      // quotient bits
  localparam int unsigned IW = $clog2(QB + 1);
  localparam logic [QB-1:0] FIX_MAX_Q = QB'({1'b0, {(FIX_W-1){1'b1}}});

  logic [FIX_W-1:0] rem;
  logic [FIX_W:0]  rem_sh;
  logic [FIX_W-1:0] dvs;
  logic [QB-1:0]   quo;
  logic [IW-1:0]   idx;
  logic            neg;

  // Next partial remainder: shift in the next dividend bit (only the
  // first, most significant bit of 2^(2*FIX_F) is a one).
  assign rem_sh = {rem[FIX_W-1:0], (idx == IW'(QB - 1))};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem   <= '0;
      dvs   <= '0;
      quo   <= '0;
      idx   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      neg   <= 1'b0;
      recip <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        rem  <= '0;
        dvs  <= den;
        neg  <= (den <= 0);
        quo  <= '0;
        idx  <= IW'(QB - 1);
        busy <= 1'b1;
      end else if (busy) begin
        if (rem_sh >= {1'b0, dvs}) begin
          rem <= FIX_W'(rem_sh - {1'b0, dvs});
          quo <= {quo[QB-2:0], 1'b1};
        end else begin
          rem <= FIX_W'(rem_sh);
          quo <= {quo[QB-2:0], 1'b0};
        end
        if (idx == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          idx <= idx - 1'b1;
        end
      end
      if (busy && idx == '0) begin
        // final quotient bit is decided in this cycle
        if (neg || ({quo[QB-2:0], (rem_sh >= {1'b0, dvs})} > FIX_MAX_Q))
          recip <= fix_t'(FIX_MAX_Q);
        else
          recip <= fix_t'({quo[QB-2:0], (rem_sh >= {1'b0, dvs})});
      end
    end
  end

endmodule
