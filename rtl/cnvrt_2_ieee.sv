// cnvrt_2_ieee: converts an effective operand (see cnvrt_2_integral) into an
// IEEE-754 single-precision word.
//
// The sign is copied. The mantissa is made of the 23 bits that follow the
// leading one of eff[30:0]; the bits below them are dropped (truncation, the
// design's rounding rule for the conversion). The exponent is the position
// of that leading one relative to the binary point, pos - lz, plus the bias
// 127, where lz counts leading zeros of eff[30:0] (lz is 0 whenever the
// integer part was non-zero). An all-zero magnitude gives a signed zero.
//
// Purely combinational.
module cnvrt_2_ieee
  import fpu_pkg::*;
(
  input  logic [31:0]       eff,
  input  logic signed [5:0] pos,
  output ieee_t             ieee
);

  logic [4:0]  lz;
  logic        nz;
  logic [22:0] mant;   // bits below the leading one after normalisation
  logic [7:0]  e;

  always_comb begin
    lz = '0;
    nz = 1'b0;
    for (int i = 0; i < 31; i++) begin
      if (eff[i]) begin
        lz = 5'(30 - i);
        nz = 1'b1;
      end
    end
  end

  assign mant = 23'((eff[30:0] << lz) >> 7);
  assign e    = 8'(pos) - 8'(lz) + 8'd127;

  always_comb begin
    ieee.sign = eff[31];
    if (nz) begin
      ieee.exp  = e;
      ieee.frac = mant;
    end else begin
      ieee.exp  = '0;
      ieee.frac = '0;
    end
  end

endmodule
