// trig_unit: sine and cosine of an IEEE-754 angle in degrees.
//
// The angle (operand 1) is converted to the CORDIC's fixed-point form,
// degrees * 2048, by shifting its mantissa (truncating towards zero). The
// cordic block then rotates for twelve steps, and its 2048-scaled sine and
// cosine are handed on in the unrounded format (exponent chosen so that the
// value is the integer divided by 2048) for post_normalization to turn into
// IEEE words. Angles outside -90..+90 degrees are outside the CORDIC's
// convergence range as built and raise range_err (reported as invalid).
// The fixed-point conversion and the range check are this implementation's
// choices; the design gives only the integer CORDIC itself.
//
// Timing: start is sampled when idle; done pulses ITER+2 cycles later.
module trig_unit
  import fpu_pkg::*;
#(
  parameter int unsigned ANG_W = 20
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  ieee_t      a,
  output unrounded_t sin_res,
  output unrounded_t cos_res,
  output logic [15:0] sin_fx,   // 2048 * sin, two's complement
  output logic [15:0] cos_fx,   // 2048 * cos, two's complement
  output logic       range_err,
  output logic       done
);

  localparam int MAX_ANGLE = 90 * 2048;

  logic signed [XEXP_W-1:0] ue;
  logic [23:0]              ma;
  logic [31:0]              mag;
  logic                     too_big;
  logic signed [ANG_W-1:0]  angle;
  logic signed [15:0]       s, c;
  logic                     c_done, c_busy;
  logic                     err_q;

  assign ue = XEXP_W'(a.exp) - XEXP_W'(BIAS);
  assign ma = {(a.exp != 0), a.frac};

  always_comb begin
    mag     = '0;
    too_big = 1'b0;
    if (a.exp == '0)
      mag = '0;
    else if (ue > XEXP_W'(7))
      too_big = 1'b1;
    else if (ue >= XEXP_W'(-12))
      mag = 32'(ma) >> (XEXP_W'(12) - ue);
    if (mag > 32'(MAX_ANGLE)) too_big = 1'b1;
  end

  assign angle = a.sign ? -ANG_W'(mag) : ANG_W'(mag);

  always_ff @(posedge clk) begin
    if (rst)                    err_q <= 1'b0;
    else if (start && !c_busy)  err_q <= too_big;
  end

  cordic #(.ITER(12), .XY_W(16), .ANG_W(ANG_W)) u_cordic (
    .clk    (clk),
    .rst    (rst),
    .start  (start),
    .angle  (too_big ? '0 : angle),
    .sin_out(s),
    .cos_out(c),
    .busy   (c_busy),
    .done   (c_done)
  );

  function automatic unrounded_t fx_to_unrounded(logic signed [15:0] v);
    unrounded_t u;
    logic [15:0] m;
    m      = v[15] ? -v : v;
    u.sign = v[15];
    u.exp  = XEXP_W'(128);
    u.sig  = SIG_W'(m) << 14;
    return u;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      sin_res   <= '0;
      cos_res   <= '0;
      sin_fx    <= '0;
      cos_fx    <= '0;
      range_err <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= c_done;
      if (c_done) begin
        sin_res   <= fx_to_unrounded(s);
        cos_res   <= fx_to_unrounded(c);
        sin_fx    <= s;
        cos_fx    <= c;
        range_err <= err_q;
      end
    end
  end

endmodule
