// Shared types and fixed-point helpers of the first-order system identifier.
//
// The estimator works in signed two's complement fixed point with FIX_W bits,
// FIX_F of them fractional (Q8.24 by default: range -128 .. +128, step
// 2^-24). A/D samples are 8-bit two's complement codes that stand for the
// value code/128, so a sample enters the fixed-point domain by a left shift
// of FIX_F-7 bits. The word sizes are this design's own choice; the
// first-order model y(k) = b*y(k-1) + a*u(k-1), i.e. H(z) = a/(z-b), is the
// one the tool identifies.
package sysid_pkg;

  localparam int unsigned FIX_W    = 32;
  localparam int unsigned FIX_F    = 24;
  localparam int unsigned SAMPLE_W = 8;

  typedef logic signed [FIX_W-1:0] fix_t;
  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // 2x2 covariance matrix, entries named as in the estimator's registers
  typedef struct packed {
    fix_t p11;
    fix_t p12;
    fix_t p21;
    fix_t p22;
  } pmat_t;

  // Parameter vector: den = b (denominator pole), num = a (numerator gain)
  typedef struct packed {
    fix_t den;
    fix_t num;
  } theta_t;

  localparam fix_t FIX_ONE = fix_t'(1) <<< FIX_F;

  // Fixed-point product, truncated toward minus infinity.
  function automatic fix_t fmul(input fix_t a, input fix_t b);
    logic signed [2*FIX_W-1:0] prod;
    prod = (2*FIX_W)'(a) * (2*FIX_W)'(b);
    return fix_t'(prod >>> FIX_F);
  endfunction

  // Sample code (value = code/128) to fixed point.
  function automatic fix_t from_sample(input sample_t s);
    return fix_t'(s) <<< (FIX_F - (SAMPLE_W - 1));
  endfunction

endpackage
