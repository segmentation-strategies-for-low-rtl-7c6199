// seg_pkg: types shared by the coefficient-segmentation FIR filter.
//
// repr_e selects the number representation of one filter instance:
//   REPR_TWOS    two's complement data and coefficients, two's complement
//                multiplier, segmentation that keeps every m_k >= 0;
//   REPR_SIGNMAG sign-magnitude data and coefficients, sign-magnitude
//                multiplier, segmentation that picks the nearer power of two
//                so that m_k is as small as possible and may be negative;
//   REPR_MIXED   two's complement data, sign-magnitude coefficients, two's
//                complement multiplier followed by an adder-subtractor driven
//                by the coefficient sign (the main configuration).
// The three representations and both segmentation rules follow the
// algorithm this design implements; the 2-bit encoding is a free choice.
package seg_pkg;

  typedef enum logic [1:0] {
    REPR_TWOS    = 2'd0,
    REPR_SIGNMAG = 2'd1,
    REPR_MIXED   = 2'd2
  } repr_e;

  // Bits of one coefficient-memory word: m_k (w bits), shift exponent of s_k
  // (sw bits), sign of s_k, and a flag for s_k = 0 (only when h_k = 0).
  function automatic int unsigned coef_word_w(int unsigned w, int unsigned sw);
    return w + sw + 2;
  endfunction

endpackage
