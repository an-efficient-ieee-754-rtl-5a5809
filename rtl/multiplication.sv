// multiplication: IEEE-754 single-precision multiply up to, but not
// including, rounding.
//
// The sign is the XOR of the operand signs, the exponent is
// e1 + e2 - 127, and the 48-bit mantissa product comes from the Karatsuba /
// bit-pair recoding multiplier. The product (value in [1,4)) is handed on
// in the unrounded format, its low 21 bits folded into the sticky bit;
// post_normalization normalises and rounds it. A zero operand gives a zero
// significand.
//
// Purely combinational.
module multiplication
  import fpu_pkg::*;
(
  input  logic        sa,
  input  logic        sb,
  input  logic [7:0]  ea,
  input  logic [7:0]  eb,
  input  logic [23:0] ma,
  input  logic [23:0] mb,
  output unrounded_t  res
);

  logic [47:0] prod;

  karatsuba_mul24 u_mul (.x(ma), .y(mb), .p(prod));

  assign res.sign = sa ^ sb;
  assign res.exp  = XEXP_W'(ea) + XEXP_W'(eb) - XEXP_W'(BIAS);
  assign res.sig  = {prod[47:21], |prod[20:0]};

endmodule
