// cnvrt_2_integral: packs a number given as a 32-bit integer part and a
// 32-bit fraction part into one 32-bit "effective operand".
//
// Bit 31 of the integer part is its sign (sign-magnitude). The bits of the
// integer magnitude from its leading one down to bit 0 are placed in the
// effective operand from bit 30 downwards, and the positions left over are
// filled with the most significant bits of the fraction part. `pos` reports
// the bit position of that leading one, so the value of the effective
// operand is eff[30:0] * 2^(pos-30). When the integer magnitude is zero the
// fraction is packed the same way from its own leading one, and pos becomes
// -1 minus the number of leading zeros of the fraction (down to -32); this
// case is this implementation's extension, the packing rule itself follows
// the design.
//
// Purely combinational.
module cnvrt_2_integral (
  input  logic [31:0]       int_part,
  input  logic [31:0]       frac_part,
  output logic [31:0]       eff,
  output logic signed [5:0] pos
);

  logic [62:0] joined;
  logic [30:0] shifted;   // top 31 bits of the aligned joined word
  logic [4:0]  lead;
  logic        found;
  logic [4:0]  flz;       // leading zeros of the fraction
  logic [30:0] fnorm;     // normalised fraction without its last bit

  // leading one of the integer magnitude
  always_comb begin
    lead  = '0;
    found = 1'b0;
    for (int i = 0; i < 31; i++) begin
      if (int_part[i]) begin
        lead  = 5'(i);
        found = 1'b1;
      end
    end
  end

  always_comb begin
    flz = '0;
    for (int i = 0; i < 32; i++)
      if (frac_part[i]) flz = 5'(31 - i);
  end

  assign fnorm   = 31'((frac_part << flz) >> 1);
  assign joined  = {int_part[30:0], frac_part};
  assign shifted = 31'((joined << (5'd30 - lead)) >> 32);

  always_comb begin
    eff[31] = int_part[31];
    if (found) begin
      eff[30:0] = shifted;
      pos       = 6'(lead);
    end else begin
      eff[30:0] = fnorm;
      pos       = -6'sd1 - 6'(flz);
    end
  end

endmodule
