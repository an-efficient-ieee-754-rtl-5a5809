// fp_add: magnitude addition of two aligned mantissas (the design's "add"
// module).
//
// The 24-bit aligned mantissas from pre_normalization are summed by the
// block carry-look-ahead adder; the carry out becomes bit 27 of the
// unrounded significand, so a sum in [2,4) is renormalised later by
// post_normalization (exponent + 1). The smaller operand's guard, round and
// sticky bits pass straight through because the larger operand has zeros
// there. The caller supplies the result sign (the sign of the larger
// operand).
//
// Purely combinational.
module fp_add
  import fpu_pkg::*;
(
  input  logic [23:0] big_mant,
  input  logic [23:0] small_mant,
  input  logic [2:0]  small_grs,
  input  logic [7:0]  exp,
  input  logic        sign,
  output unrounded_t  res,
  output logic        co
);

  logic [23:0] sum;

  cla_adder24 u_cla (
    .a   (big_mant),
    .b   (small_mant),
    .cin (1'b0),
    .sum (sum),
    .cout(co)
  );

  assign res.sign = sign;
  assign res.exp  = XEXP_W'(exp);
  assign res.sig  = {co, sum, small_grs};

endmodule
