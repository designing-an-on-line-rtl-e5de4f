// olmc_pkg -- shared constants, types and helper functions of the on-line
// magnitude comparator.
//
// Number system: radix-r ordinary signed-digit system (OSDNS) with digit set
// {-alpha, ..., -1, 0, 1, ..., alpha}, r/2 < alpha < r. The default is the
// radix-4 system with digit set {-3..3}, the case the design is built around.
// Digits travel as two's-complement bit vectors ("extended two's-complement
// encoding"): for radix 4, -3..3 are 101, 110, 111, 000, 001, 010, 011.
//
// Signs (of a digit, or of a whole signed-digit number) use the 2-bit
// two's-complement encoding of {-1, 0, 1}: negative 11, zero 00, positive 01.
//
// The sign-combining operator "phi" used by on-line sign detection is
// K phi L = sign(K) if K is nonzero, otherwise sign(L): the earlier (more
// significant) nonzero sign wins.
package olmc_pkg;

  // Default number system: radix 4, alpha 3, digits 3 bits wide.
  localparam int unsigned DEF_RADIX   = 4;
  localparam int unsigned DEF_ALPHA   = 3;
  localparam int unsigned DEF_DIGIT_W = 3;

  // Sign of a digit or number, 2-bit two's-complement encoding of -1/0/+1.
  typedef enum logic [1:0] {
    SGN_ZERO = 2'b00,
    SGN_POS  = 2'b01,
    SGN_NEG  = 2'b11
  } sign_t;

  // Outcome of a magnitude comparison of X and Y.
  typedef enum logic [1:0] {
    MAG_EQ = 2'b00,   // |X| = |Y|
    MAG_GT = 2'b01,   // |X| > |Y|
    MAG_LT = 2'b10    // |X| < |Y|
  } mag_rel_t;

  // K phi L: sign of K when K is nonzero, else sign of L.
  function automatic sign_t sign_phi(sign_t k, sign_t l);
    return (k != SGN_ZERO) ? k : l;
  endfunction

  // Product of two signs (M = PE . PF).
  function automatic sign_t sign_mul(sign_t a, sign_t b);
    if (a == SGN_ZERO || b == SGN_ZERO) return SGN_ZERO;
    return (a == b) ? SGN_POS : SGN_NEG;
  endfunction

  // Decision of step (c): equal if either sign is zero, greater if the
  // signs agree (M = 1), less otherwise.
  function automatic mag_rel_t mag_decide(sign_t pe, sign_t pf);
    if (pe == SGN_ZERO || pf == SGN_ZERO) return MAG_EQ;
    return (sign_mul(pe, pf) == SGN_POS) ? MAG_GT : MAG_LT;
  endfunction

endpackage
