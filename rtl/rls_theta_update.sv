// RLS step, parameter update.
//
// theta_new = theta + k * err   with the gain k = (P phi) * recip and
// recip = 1/(1 + phi' P phi). theta.den is the pole b and theta.num the gain
// a of H(z) = a/(z - b). Purely combinational; the arithmetic is this
// design's.
module rls_theta_update
  import sysid_pkg::*;
(
  input  theta_t theta,
  input  fix_t   r_num1,
  input  fix_t   r_num2,
  input  fix_t   recip,
  input  fix_t   err,
  output theta_t theta_new
);

  fix_t k1, k2;

  always_comb begin
    k1 = fmul(r_num1, recip);
    k2 = fmul(r_num2, recip);
    theta_new.den = theta.den + fmul(k1, err);
    theta_new.num = theta.num + fmul(k2, err);
  end

endmodule
