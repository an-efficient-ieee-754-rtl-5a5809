// pre_normalization_mds: operand preparation for multiply, divide and
// square root.
//
// Both IEEE-754 operands are unpacked with their hidden one (an exponent of
// zero marks the value zero). For division the dividend mantissa is doubled
// (and the exponent lowered by one) when it is smaller than the divisor
// mantissa, so that the quotient mantissa lies in [1,2) and exactly 24
// quotient bits are produced. For square root the mantissa is doubled when
// the unbiased exponent is odd, so the exponent can be halved exactly; the
// radicand is then positioned so that its integer square root is the 24-bit
// root mantissa. Which adjustments are made is this implementation's choice:
// the design only states that these operations normalise their operands
// themselves.
//
// Purely combinational.
module pre_normalization_mds
  import fpu_pkg::*;
(
  input  ieee_t                    a,
  input  ieee_t                    b,
  output logic [23:0]              ma,
  output logic [23:0]              mb,
  output logic                     a_zero,
  output logic                     b_zero,
  output logic                     res_sign,      // sign of a product or quotient
  // division
  output logic [24:0]              div_dividend,  // ma or 2*ma, >= mb
  output logic signed [XEXP_W-1:0] div_exp,
  // square root
  output logic [47:0]              sqrt_radicand,
  output logic signed [XEXP_W-1:0] sqrt_exp
);

  logic                     div_adj;
  logic signed [XEXP_W-1:0] ua;     // unbiased exponent of a
  logic                     odd;
  logic signed [XEXP_W-1:0] ua_even;

  assign a_zero = (a.exp == '0);
  assign b_zero = (b.exp == '0);
  assign ma     = {~a_zero, a.frac};
  assign mb     = {~b_zero, b.frac};
  assign res_sign = a.sign ^ b.sign;

  assign div_adj      = (ma < mb);
  assign div_dividend = div_adj ? {ma, 1'b0} : {1'b0, ma};
  assign div_exp      = XEXP_W'(a.exp) - XEXP_W'(b.exp) + XEXP_W'(BIAS)
                      - XEXP_W'(div_adj);

  assign ua      = XEXP_W'(a.exp) - XEXP_W'(BIAS);
  assign odd     = ua[0];
  assign ua_even = ua - XEXP_W'(odd);
  // radicand = (ma or 2*ma) * 2^23; its root lies in [2^23, 2^24)
  assign sqrt_radicand = odd ? {ma, 24'b0} : {1'b0, ma, 23'b0};
  assign sqrt_exp      = (ua_even >>> 1) + XEXP_W'(BIAS);

endmodule
