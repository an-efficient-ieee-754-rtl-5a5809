// barrel_shifter: 32-bit logarithmic barrel shifter (the design's shifting
// unit).
//
// Five stages shift by 16, 8, 4, 2 and 1 places, each enabled by one bit of
// shift_val, most significant first. A stage copies a whole block of bits at
// once (for example bits [15:0] to [31:16] for a left shift by 16), so any
// shift of 0..31 places takes the same single pass instead of one place per
// clock. direction = 1 shifts left, 0 shifts right; vacated bits are zero
// (logical shift).
//
// Purely combinational.
module barrel_shifter (
  input  logic [31:0] op,
  input  logic        direction,   // 1: left, 0: right
  input  logic [4:0]  shift_val,
  output logic [31:0] result
);

  logic [5:0][31:0] stage;

  assign stage[0] = op;

  for (genvar s = 0; s < 5; s++) begin : g_stage
    localparam int unsigned AMT = 1 << (4 - s);
    assign stage[s+1] = !shift_val[4-s] ? stage[s]
                      : direction       ? {stage[s][31-AMT:0], {AMT{1'b0}}}
                      :                   {{AMT{1'b0}}, stage[s][31:AMT]};
  end

  assign result = stage[5];

endmodule
