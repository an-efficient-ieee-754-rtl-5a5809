// division: IEEE-754 single-precision divide up to, but not including,
// rounding.
//
// Takes the pre-normalised dividend mantissa (ma or 2*ma, never smaller than
// the divisor mantissa) and divisor mantissa from pre_normalization_mds and
// runs the non-restoring divider on the 48-bit dividend
// dividend * 2^23, giving a 24-bit quotient mantissa in [2^23, 2^24). The
// remainder R supplies the rounding information: guard = (2R >= M),
// sticky = (2R - guard*M != 0). Sign is the XOR of the operand signs.
// div_by_0 is raised for a zero divisor with a non-zero dividend, invalid for
// 0/0; the special results themselves (infinity, NaN) are substituted by
// exception_handling.
//
// Timing: start is sampled when idle; done pulses for one cycle 3*24+2
// cycles later (the divider's 72 iteration cycles, the remainder correction
// and one cycle to register the result). Outputs hold until the next start.
module division
  import fpu_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  logic                     sa,
  input  logic                     sb,
  input  logic                     a_zero,
  input  logic                     b_zero,
  input  logic [24:0]              dividend,
  input  logic [23:0]              divisor,
  input  logic signed [XEXP_W-1:0] exp_in,
  output unrounded_t               res,
  output logic                     div_by_0,
  output logic                     invalid,
  output logic                     done
);

  logic [23:0] quo, rem;
  logic        nrd_done, nrd_busy;
  logic [24:0] two_r;
  logic        guard, sticky;

  // operand attributes held for the whole operation
  logic                     s_q, az_q, bz_q;
  logic signed [XEXP_W-1:0] e_q;
  logic [23:0]              m_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      s_q  <= 1'b0;
      az_q <= 1'b0;
      bz_q <= 1'b0;
      e_q  <= '0;
      m_q  <= '0;
    end else if (start && !nrd_busy) begin
      s_q  <= sa ^ sb;
      az_q <= a_zero;
      bz_q <= b_zero;
      e_q  <= exp_in;
      m_q  <= divisor;
    end
  end

  nrd_divider #(.N(24)) u_nrd (
    .clk      (clk),
    .rst      (rst),
    .start    (start),
    .a_init   (dividend[24:1]),
    .q_init   ({dividend[0], 23'b0}),
    .divisor  (divisor),
    .quotient (quo),
    .remainder(rem),
    .busy     (nrd_busy),
    .done     (nrd_done)
  );

  assign two_r  = {rem, 1'b0};
  assign guard  = (two_r >= {1'b0, m_q});
  assign sticky = guard ? (two_r != {1'b0, m_q}) : (rem != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      res      <= '0;
      div_by_0 <= 1'b0;
      invalid  <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= nrd_done;
      if (nrd_done) begin
        res.sign <= s_q;
        res.exp  <= e_q;
        res.sig  <= (az_q || bz_q) ? '0 : {1'b0, quo, guard, 1'b0, sticky};
        div_by_0 <= bz_q & ~az_q;
        invalid  <= bz_q & az_q;
      end
    end
  end

endmodule
