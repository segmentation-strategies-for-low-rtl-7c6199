// coef_segmenter: splits one filter coefficient h into h = s + m, where s is a
// signed power of two (realised later as a shift of the data sample) and m is
// the small remainder that is sent to the hardware multiplier.
//
// Stage 1 finds the smallest exponent i with 2^i >= |h| (a priority search over
// all candidate exponents, equivalent to the iterative i = i + 1 loop of the
// algorithm). What follows depends on REPR:
//   REPR_TWOS (keeps every m >= 0 so the multiplier operand never changes sign):
//     |h| = 2^i        -> s = h,        m = 0
//     h > 0            -> s = 2^(i-1),  m = h - 2^(i-1)
//     h < 0            -> s = -2^i,     m = h + 2^i
//   REPR_SIGNMAG / REPR_MIXED (nearest power of two, m may be negative):
//     ||h| - 2^i| < ||h| - 2^(i-1)|  -> s = 2^i,     m = |h| - 2^i
//     otherwise                      -> s = 2^(i-1), m = |h| - 2^(i-1)
//     and both are negated when h < 0.
// The rules above are the algorithm's; h = 0 is this design's own special
// case (s = 0, m = 0, flagged by s_zero_o), because the rules would need a
// fractional power of two for it.
//
// Interface: h_i is a W-bit two's complement coefficient. s is returned as an
// exponent s_exp_o, a sign s_neg_o and the zero flag s_zero_o. m_o is W bits,
// two's complement for REPR_TWOS and sign-magnitude {sign, magnitude} for the
// other two representations (a zero magnitude always carries sign 0).
// |m| < 2^(W-2) always, so nothing overflows. Purely combinational.
module coef_segmenter
  import seg_pkg::*;
#(
  parameter int unsigned W    = 16,
  parameter repr_e       REPR = REPR_MIXED,
  localparam int unsigned SW  = $clog2(W)
) (
  input  logic [W-1:0]  h_i,
  output logic [W-1:0]  m_o,
  output logic [SW-1:0] s_exp_o,
  output logic          s_neg_o,
  output logic          s_zero_o
);

  logic          h_neg;
  logic [W-1:0]  h_abs;      // |h|, up to 2^(W-1), fits W unsigned bits
  logic [SW-1:0] i_exp;      // smallest i with 2^i >= |h|
  logic [W-1:0]  p_hi;       // 2^i
  logic [W-1:0]  p_lo;       // 2^(i-1), 0 when i = 0
  logic [W-1:0]  d_hi;       // 2^i - |h|
  logic [W-1:0]  d_lo;       // |h| - 2^(i-1)
  logic          is_pow2;
  logic          take_hi;    // sign-magnitude rule: nearer power is 2^i
  logic [W-1:0]  sm_mag;     // sign-magnitude rule: |m|
  logic          sm_neg;     // sign-magnitude rule: sign of m

  assign h_neg = h_i[W-1];
  assign h_abs = h_neg ? (~h_i + 1'b1) : h_i;

  // Stage 1: smallest exponent whose power of two reaches |h|.
  always_comb begin
    i_exp = SW'(W - 1);
    for (int i = W - 1; i >= 0; i--) begin
      if ((W'(1) << i) >= h_abs) i_exp = SW'(i);
    end
  end

  assign p_hi    = W'(1) << i_exp;
  assign p_lo    = (i_exp == '0) ? '0 : (W'(1) << (i_exp - 1'b1));
  assign d_hi    = p_hi - h_abs;
  assign d_lo    = h_abs - p_lo;
  assign is_pow2 = (d_hi == '0);
  // With i = 0 only |h| = 1 reaches here, and it is a power of two.
  assign take_hi = is_pow2 || (d_hi < d_lo);

  always_comb begin
    m_o      = '0;
    s_exp_o  = i_exp;
    s_neg_o  = h_neg;
    s_zero_o = 1'b0;
    sm_mag   = take_hi ? d_hi : d_lo;
    sm_neg   = (take_hi ^ h_neg) && (sm_mag != '0);   // stage 3: negate for h < 0
    if (h_abs == '0) begin
      s_exp_o  = '0;
      s_neg_o  = 1'b0;
      s_zero_o = 1'b1;
    end else if (REPR == REPR_TWOS) begin
      if (is_pow2) begin
        m_o = '0;                       // stage 2: whole coefficient is a shift
      end else if (!h_neg) begin
        s_exp_o = i_exp - 1'b1;         // stage 3, positive: s = 2^(i-1)
        m_o     = h_i - p_lo;
      end else begin
        m_o     = h_i + p_hi;           // stage 3, negative: s = -2^i
      end
    end else begin
      // take_hi: s = 2^i and m = |h| - 2^i <= 0; else s = 2^(i-1), m > 0.
      if (!take_hi) s_exp_o = i_exp - 1'b1;
      m_o = {sm_neg, sm_mag[W-2:0]};
    end
  end

endmodule
