// RLS step, covariance update.
//
// P_new = P - k * (P phi)'   with the gain k = (P phi) / r_den,
// where recip = 1/r_den comes from the shared reciprocal unit. The cross
// term k1*(P phi)_2 is formed once and subtracted from both P12 and P21, so
// a symmetric P stays exactly symmetric in fixed point. This is the
// standard RLS covariance recursion without forgetting factor; that choice
// and the arithmetic are this design's. Purely combinational.
module rls_p_update
  import sysid_pkg::*;
(
  input  pmat_t p,
  input  fix_t  r_num1,
  input  fix_t  r_num2,
  input  fix_t  recip,
  output pmat_t p_new
);

  fix_t k1, k2, t11, t12, t22;

  always_comb begin
    k1  = fmul(r_num1, recip);
    k2  = fmul(r_num2, recip);
    t11 = fmul(k1, r_num1);
    t12 = fmul(k1, r_num2);
    t22 = fmul(k2, r_num2);
    p_new.p11 = p.p11 - t11;
    p_new.p12 = p.p12 - t12;
    p_new.p21 = p.p21 - t12;
    p_new.p22 = p.p22 - t22;
  end

endmodule
