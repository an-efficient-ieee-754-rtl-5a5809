// post_normalization: normalises, rounds and packs an unrounded result into
// an IEEE-754 single-precision word, and detects overflow and underflow.
//
// The input is the common unrounded_t format of fpu_pkg (significand with a
// carry bit, hidden-one position, fraction, guard, round and sticky bits,
// and a signed biased exponent). A carry into bit 27 shifts the significand
// right by one; leading zeros shift it left, the exponent following the
// shift. The 24-bit mantissa is then rounded by rmode:
//   0 truncation (the design's rounding), 1 round to nearest even,
//   2 round towards +infinity, 3 round towards -infinity
// (the encodings of modes 1..3 are this implementation's choice). A carry
// out of the rounding increments the exponent.
// Overflow (biased exponent above 254) gives infinity, or the largest finite
// number where the rounding direction points away from infinity, as IEEE-754
// prescribes. Underflow (biased exponent below 1) flushes to a signed zero;
// subnormal results are not produced.
//
// Purely combinational.
module post_normalization
  import fpu_pkg::*;
(
  input  unrounded_t  u,
  input  rmode_e      rmode,
  output ieee_t       result,
  output logic        overflow,
  output logic        underflow,
  output logic        inexact
);

  logic [4:0]               lead;
  logic [SIG_W-2:0]         n;      // normalised: hidden one at bit 26
  logic signed [XEXP_W-1:0] e, e_r;
  logic [23:0]              m;
  logic                     g, rest, up;
  logic [24:0]              m_r;
  logic [22:0]              frac_r;
  logic                     to_inf;

  // leading one of the significand
  always_comb begin
    lead = '0;
    for (int i = 0; i < SIG_W; i++)
      if (u.sig[i]) lead = 5'(i);
  end

  always_comb begin
    if (u.sig[27]) begin
      n = {u.sig[27:2], u.sig[1] | u.sig[0]};
      e = u.exp + XEXP_W'(1);
    end else begin
      n = (SIG_W-1)'(u.sig << (5'd26 - lead));
      e = u.exp - XEXP_W'(5'd26 - lead);
    end
  end

  assign m    = n[26:3];
  assign g    = n[2];
  assign rest = n[1] | n[0];

  always_comb begin
    unique case (rmode)
      RM_TRUNC:   up = 1'b0;
      RM_NEAREST: up = g & (rest | m[0]);
      RM_POS_INF: up = ~u.sign & (g | rest);
      RM_NEG_INF: up =  u.sign & (g | rest);
      default:    up = 1'b0;
    endcase
  end

  assign m_r    = {1'b0, m} + 25'(up);
  assign e_r    = m_r[24] ? e + XEXP_W'(1) : e;
  assign frac_r = m_r[24] ? m_r[23:1] : m_r[22:0];

  // rounding direction that carries an overflow to infinity
  always_comb begin
    unique case (rmode)
      RM_TRUNC:   to_inf = 1'b0;
      RM_NEAREST: to_inf = 1'b1;
      RM_POS_INF: to_inf = ~u.sign;
      RM_NEG_INF: to_inf =  u.sign;
      default:    to_inf = 1'b0;
    endcase
  end

  always_comb begin
    overflow  = 1'b0;
    underflow = 1'b0;
    inexact   = 1'b0;
    result    = '{sign: u.sign, exp: '0, frac: '0};
    if (u.sig != '0) begin
      inexact = g | rest;
      if (e_r > XEXP_W'(254)) begin
        overflow = 1'b1;
        inexact  = 1'b1;
        result   = to_inf ? '{sign: u.sign, exp: 8'hFF, frac: '0}
                          : '{sign: u.sign, exp: 8'hFE, frac: '1};
      end else if (e_r < XEXP_W'(1)) begin
        underflow = 1'b1;
        inexact   = 1'b1;
      end else begin
        result = '{sign: u.sign, exp: e_r[7:0], frac: frac_r};
      end
    end
  end

endmodule
