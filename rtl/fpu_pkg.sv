// fpu_pkg: types and constants shared by the single-precision FPU.
//
// The operation codes follow the operation-mode table of the design (0 add,
// 1 subtract, 2 multiply, 3 divide, 4 shift, 5 square root, 6 trigonometric).
// Code 7, tangent, is this implementation's: the design names the tangent
// among its trigonometric functions without giving it a code.
// Rounding mode 0 is truncation, the mode the design is built around; modes
// 1..3 (nearest-even, towards +inf, towards -inf) are this implementation's
// encoding of the further rounding techniques the design lists.
//
// unrounded_t is the common hand-over format from the arithmetic units to the
// post-normalisation and rounding unit:
//   value = (-1)^sign * sig / 2^26 * 2^(exp - 127)
//   sig[27]    carry position (value may be in [2,4) after an addition)
//   sig[26]    hidden-one position of a normalised value
//   sig[25:3]  fraction
//   sig[2]     guard bit, sig[1] round bit, sig[0] sticky bit
// exp is a signed biased exponent wide enough to hold results outside the
// single-precision range so that overflow and underflow can be detected.
package fpu_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned SIG_W  = 28;  // carry + 24 + guard/round/sticky
  localparam int unsigned XEXP_W = 11;  // signed working exponent
  localparam int          BIAS   = 127;

  typedef enum logic [3:0] {
    OP_ADD   = 4'd0,
    OP_SUB   = 4'd1,
    OP_MUL   = 4'd2,
    OP_DIV   = 4'd3,
    OP_SHIFT = 4'd4,
    OP_SQRT  = 4'd5,
    OP_TRIG  = 4'd6,
    OP_TAN   = 4'd7
  } fpu_op_e;

  typedef enum logic [1:0] {
    RM_TRUNC   = 2'd0,
    RM_NEAREST = 2'd1,
    RM_POS_INF = 2'd2,
    RM_NEG_INF = 2'd3
  } rmode_e;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } ieee_t;

  typedef struct packed {
    logic                     sign;
    logic signed [XEXP_W-1:0] exp;
    logic [SIG_W-1:0]         sig;
  } unrounded_t;

  localparam ieee_t QNAN = '{sign: 1'b0, exp: 8'hFF, frac: 23'h400000};

endpackage
