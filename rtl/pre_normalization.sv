// pre_normalization: aligns two IEEE-754 operands for addition or
// subtraction.
//
// The hidden one is inserted into each mantissa (an exponent of zero marks
// the value zero, whose mantissa is then all zeros). The operand with the
// larger magnitude is routed to the "big" output and the other to "small"
// (this ordering is this implementation's addition; it lets the subtract unit
// always compute big - small). The smaller operand's mantissa is shifted
// right by the exponent difference, and both take the larger exponent.
// Bits shifted out are kept as guard, round and sticky bits for rounding.
//
// Purely combinational.
module pre_normalization
  import fpu_pkg::*;
(
  input  ieee_t       a,
  input  ieee_t       b,
  output logic [23:0] big_mant,
  output logic [23:0] small_mant,
  output logic [2:0]  small_grs,
  output logic [7:0]  exp,
  output logic        big_sign,
  output logic        small_sign,
  output logic        swapped     // 1 when b has the larger magnitude
);

  ieee_t       big, sml;
  logic [7:0]  diff;
  logic [49:0] ext;      // {mantissa, 26 bits below it}
  logic [49:0] ext_sh;
  logic        sticky;

  assign swapped = {b.exp, b.frac} > {a.exp, a.frac};
  assign big     = swapped ? b : a;
  assign sml   = swapped ? a : b;
  assign diff    = big.exp - sml.exp;

  assign ext    = {(sml.exp != 0), sml.frac, 26'b0};
  // a shift of up to 26 keeps every mantissa bit inside ext_sh; beyond that
  // the whole mantissa lies below the round bit and only its sticky remains
  assign ext_sh = (diff > 8'd26) ? '0 : ext >> diff;

  // everything below the round bit folds into sticky
  assign sticky = (|ext_sh[23:0]) | ((diff > 8'd26) && (sml.exp != 0));

  assign big_mant   = {(big.exp != 0), big.frac};
  assign small_mant = ext_sh[49:26];
  assign small_grs  = {ext_sh[25], ext_sh[24], sticky};
  assign exp        = big.exp;
  assign big_sign   = big.sign;
  assign small_sign = sml.sign;

endmodule
