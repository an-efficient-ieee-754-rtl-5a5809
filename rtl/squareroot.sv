// squareroot: IEEE-754 single-precision square root of operand 1 up to, but
// not including, rounding.
//
// pre_normalization_mds supplies the radicand (mantissa, doubled for an odd
// exponent, times 2^23) and the halved exponent. A 24-bit non-restoring
// square root (nr_sqrt with ROOT_W = 24) gives the root mantissa R in
// [2^23, 2^24) and the remainder rem = radicand - R^2. Rounding information
// comes from the remainder: the exact root is at least R + 1/2 exactly when
// rem > R (guard), and is inexact when rem != 0 (sticky). A negative
// non-zero operand raises invalid (exception_handling substitutes a NaN);
// the root of a signed zero is that zero.
//
// Timing: start is sampled when idle; done pulses 3*24+2 cycles later.
module squareroot
  import fpu_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  logic                     sa,
  input  logic                     a_zero,
  input  logic [47:0]              radicand,
  input  logic signed [XEXP_W-1:0] exp_in,
  output unrounded_t               res,
  output logic                     invalid,
  output logic                     done
);

  logic [23:0] root;
  logic [24:0] rem;
  logic        sq_done, sq_busy;
  logic        guard, sticky;

  logic                     s_q, az_q;
  logic signed [XEXP_W-1:0] e_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      s_q  <= 1'b0;
      az_q <= 1'b0;
      e_q  <= '0;
    end else if (start && !sq_busy) begin
      s_q  <= sa;
      az_q <= a_zero;
      e_q  <= exp_in;
    end
  end

  nr_sqrt #(.ROOT_W(24)) u_sqrt (
    .clk      (clk),
    .rst      (rst),
    .start    (start),
    .radicand (radicand),
    .root     (root),
    .remainder(rem),
    .busy     (sq_busy),
    .done     (sq_done)
  );

  assign guard  = (rem > {1'b0, root});
  assign sticky = (rem != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      res     <= '0;
      invalid <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= sq_done;
      if (sq_done) begin
        res.sign <= s_q;
        res.exp  <= e_q;
        res.sig  <= az_q ? '0 : {1'b0, root, guard, 1'b0, sticky};
        invalid  <= s_q & ~az_q;
      end
    end
  end

endmodule
