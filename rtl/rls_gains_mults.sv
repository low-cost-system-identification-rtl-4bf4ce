// RLS step, first stage: the products of one recursive least-squares update.
//
// For the regressor phi = [y(k-1), u(k-1)]' and the current estimate
// theta = [b, a]' it forms
//   r_num = P * phi                 (numerator of the gain vector)
//   r_den = 1 + phi' * P * phi      (scalar denominator of the gain)
//   err   = y(k) - phi' * theta     (a-priori prediction error)
// all in sysid_pkg fixed point. The split into this block, a covariance
// update and a parameter update mirrors the estimator's block structure; the
// exact arithmetic and word sizes are this design's. Purely combinational.
module rls_gains_mults
  import sysid_pkg::*;
(
  input  fix_t   phi1,
  input  fix_t   phi2,
  input  fix_t   y,
  input  pmat_t  p,
  input  theta_t theta,
  output fix_t   r_num1,
  output fix_t   r_num2,
  output fix_t   r_den,
  output fix_t   err
);

  always_comb begin
    r_num1 = fmul(p.p11, phi1) + fmul(p.p12, phi2);
    r_num2 = fmul(p.p21, phi1) + fmul(p.p22, phi2);
    r_den  = FIX_ONE + fmul(phi1, r_num1) + fmul(phi2, r_num2);
    err    = y - fmul(phi1, theta.den) - fmul(phi2, theta.num);
  end

endmodule
