// exception_handling: selects the FPU result for the current operation and
// raises the exception flags.
//
// Add and subtract take the result of the add/subtract post-normalisation
// unit, multiply, divide, square root, sine and tangent that of the shared
// post-normalisation unit, and shift the barrel shifter's word unchanged.
// Overflow and underflow come from the post-normalisation unit of the
// selected operation. The IEEE-754 default results of the special cases
// replace the computed value:
//   x/0 (x != 0)          -> signed infinity, div_by_0
//   0/0                   -> quiet NaN, invalid
//   sqrt(negative)        -> quiet NaN, invalid
//   angle outside +-90deg -> quiet NaN, invalid (sine/cosine and tangent)
//   tangent with a cosine of 0 -> signed infinity, div_by_0
// inexact follows the post-normalisation unit of the selected operation; it
// is 0 for a shift and for the special cases, and always 1 for a valid sine,
// cosine or tangent, which the CORDIC only approximates.
// The invalid and inexact flags and the NaN results are additions of this
// implementation (the IEEE-754 exceptions); the design's interface has only
// the underflow, overflow and divide-by-zero flags.
//
// Purely combinational.
module exception_handling
  import fpu_pkg::*;
(
  input  fpu_op_e     op,
  input  ieee_t       addsub_result,
  input  logic        addsub_overflow,
  input  logic        addsub_underflow,
  input  logic        addsub_inexact,
  input  ieee_t       mds_result,
  input  logic        mds_overflow,
  input  logic        mds_underflow,
  input  logic        mds_inexact,
  input  logic [31:0] shift_result,
  input  logic        div_sign,
  input  logic        div_by_0_in,
  input  logic        div_invalid,
  input  logic        sqrt_invalid,
  input  logic        trig_invalid,
  output logic [31:0] result,
  output logic        overflow,
  output logic        underflow,
  output logic        div_by_0,
  output logic        invalid,
  output logic        inexact
);

  always_comb begin
    result    = '0;
    overflow  = 1'b0;
    underflow = 1'b0;
    div_by_0  = 1'b0;
    invalid   = 1'b0;
    inexact   = 1'b0;
    unique case (op)
      OP_ADD, OP_SUB: begin
        result    = addsub_result;
        overflow  = addsub_overflow;
        underflow = addsub_underflow;
        inexact   = addsub_inexact;
      end
      OP_MUL: begin
        result    = mds_result;
        overflow  = mds_overflow;
        underflow = mds_underflow;
        inexact   = mds_inexact;
      end
      OP_DIV: begin
        if (div_invalid) begin
          result  = QNAN;
          invalid = 1'b1;
        end else if (div_by_0_in) begin
          result   = {div_sign, 8'hFF, 23'b0};
          div_by_0 = 1'b1;
        end else begin
          result    = mds_result;
          overflow  = mds_overflow;
          underflow = mds_underflow;
          inexact   = mds_inexact;
        end
      end
      OP_SHIFT: result = shift_result;
      OP_SQRT: begin
        if (sqrt_invalid) begin
          result  = QNAN;
          invalid = 1'b1;
        end else begin
          result    = mds_result;
          overflow  = mds_overflow;
          underflow = mds_underflow;
          inexact   = mds_inexact;
        end
      end
      OP_TRIG: begin
        if (trig_invalid) begin
          result  = QNAN;
          invalid = 1'b1;
        end else begin
          result    = mds_result;
          overflow  = mds_overflow;
          underflow = mds_underflow;
          inexact   = 1'b1;
        end
      end
      OP_TAN: begin
        if (trig_invalid) begin
          result  = QNAN;
          invalid = 1'b1;
        end else if (div_by_0_in) begin
          result   = {div_sign, 8'hFF, 23'b0};
          div_by_0 = 1'b1;
        end else begin
          result    = mds_result;
          overflow  = mds_overflow;
          underflow = mds_underflow;
          inexact   = 1'b1;
        end
      end
      default: result = '0;
    endcase
  end

endmodule
