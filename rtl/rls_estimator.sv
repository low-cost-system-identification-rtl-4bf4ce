// Recursive least-squares identifier of a first-order discrete system.
//
// Fits y(k) = b*y(k-1) + a*u(k-1), i.e. H(z) = a/(z - b), to the sampled
// system output y and system input u. Regressor phi = [y(k-1), u(k-1)]',
// estimate theta = [b, a]'. Each accepted sample pair runs one RLS step:
//   r_num = P phi, r_den = 1 + phi' P phi, e = y(k) - phi' theta
//   theta <- theta + (r_num / r_den) e
//   P     <- P - (r_num r_num') / r_den
// The state is the four covariance registers P11..P22, the two parameter
// registers and the delayed samples. Reset loads theta = [1, 1] and
// P = P_INIT * I; the first sample pair after reset only fills the regressor.
//
// Interface: in_valid strobes an 8-bit two's complement pair (value =
// code/128); busy is high while a step runs and new strobes are ignored;
// upd_valid pulses when theta has been updated. Timing: upd_valid rises
// 2*FIX_F + 3 = 51 clocks after the clock edge that accepts the strobe (one
// clock to start the reciprocal, 2*FIX_F+1 for the division, one to write).
//
// The model structure, the RLS method and the initial estimate of 1 for both
// coefficients follow the tool; P_INIT, the absence of a forgetting factor,
// the fixed-point format and the bit-serial division are this design's.
module rls_estimator
  import sysid_pkg::*;
#(
  parameter int unsigned P_INIT = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t y_in,
  input  sample_t u_in,
  output fix_t    theta_den,
  output fix_t    theta_num,
  output logic    upd_valid,
  output logic    busy
);

  typedef enum logic [1:0] {E_IDLE, E_START, E_DIV} est_state_t;

  localparam fix_t P0 = fix_t'(P_INIT) <<< FIX_F;

  est_state_t state;
  pmat_t      p_q;
  theta_t     theta_q;
  fix_t       phi1_q, phi2_q;     // y(k-1), u(k-1)
  fix_t       y_q, u_q;           // y(k), u(k)
  logic       have_prev;

  fix_t   r_num1, r_num2, r_den, err, recip;
  pmat_t  p_new;
  theta_t theta_new;
  logic   div_done, div_busy;

  rls_gains_mults u_gains (
    .phi1 (phi1_q), .phi2 (phi2_q), .y (y_q), .p (p_q), .theta (theta_q),
    .r_num1, .r_num2, .r_den, .err
  );

  rls_recip u_recip (
    .clk, .rst_n, .start (state == E_START), .den (r_den),
    .recip, .done (div_done), .busy (div_busy)
  );

  rls_p_update u_pupd (
    .p (p_q), .r_num1, .r_num2, .recip, .p_new
  );

  rls_theta_update u_tupd (
    .theta (theta_q), .r_num1, .r_num2, .recip, .err, .theta_new
  );

  assign busy      = (state != E_IDLE);
  assign theta_den = theta_q.den;
  assign theta_num = theta_q.num;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= E_IDLE;
      p_q       <= '{p11: P0, p12: '0, p21: '0, p22: P0};
      theta_q   <= '{den: FIX_ONE, num: FIX_ONE};
      phi1_q    <= '0;
      phi2_q    <= '0;
      y_q       <= '0;
      u_q       <= '0;
      have_prev <= 1'b0;
      upd_valid <= 1'b0;
    end else begin
      upd_valid <= 1'b0;
      unique case (state)
        E_IDLE: begin
          if (in_valid) begin
            if (have_prev) begin
              y_q   <= from_sample(y_in);
              u_q   <= from_sample(u_in);
              state <= E_START;
            end else begin
              phi1_q    <= from_sample(y_in);
              phi2_q    <= from_sample(u_in);
              have_prev <= 1'b1;
            end
          end
        end
        E_START: state <= E_DIV;
        E_DIV: begin
          if (div_done) begin
            p_q       <= p_new;
            theta_q   <= theta_new;
            phi1_q    <= y_q;
            phi2_q    <= u_q;
            upd_valid <= 1'b1;
            state     <= E_IDLE;
          end
        end
        default: state <= E_IDLE;
      endcase
    end
  end

  // The reciprocal unit is started only from E_START, when it is idle.
  a_recip_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 (state == E_START) |-> !div_busy);

endmodule
