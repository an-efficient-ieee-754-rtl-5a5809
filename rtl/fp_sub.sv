// fp_sub: magnitude subtraction big - small of two aligned mantissas (the
// design's "sub" module).
//
// As in the design, subtraction reuses the block carry-look-ahead adder
// with the two's complement of the second operand: big + ~small + 1. The
// bits of the smaller operand below its mantissa (guard, round, sticky) are
// subtracted from zeros: when they are non-zero the +1 moves down to them,
// so the adder's carry-in becomes 0. pre_normalization guarantees
// big >= small, so the result is never negative; `borrow` is C24 (1 means no
// borrow). Cancellation of leading bits is repaired by post_normalization.
//
// Purely combinational.
module fp_sub
  import fpu_pkg::*;
(
  input  logic [23:0] big_mant,
  input  logic [23:0] small_mant,
  input  logic [2:0]  small_grs,
  input  logic [7:0]  exp,
  input  logic        sign,
  output unrounded_t  res,
  output logic        borrow
);

  logic [23:0] diff;
  logic [2:0]  low;
  logic        cin;

  assign cin = (small_grs == 3'b000);
  assign low = 3'b000 - small_grs;

  cla_adder24 u_cla (
    .a   (big_mant),
    .b   (~small_mant),
    .cin (cin),
    .sum (diff),
    .cout(borrow)
  );

  assign res.sign = sign;
  assign res.exp  = XEXP_W'(exp);
  assign res.sig  = {1'b0, diff, low};

endmodule
