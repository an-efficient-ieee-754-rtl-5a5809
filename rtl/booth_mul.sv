// booth_mul: unsigned W x W multiplier using bit-pair recoding (radix-4
// Booth recoding).
//
// The multiplier, zero-extended by one bit so that it reads as a positive
// two's complement number, is scanned two bits at a time together with the
// bit to their right. Each triple selects 0, +-1 or +-2 times the multiplicand
// (the design's bit-pair recoding table), which halves the number of
// summands. The sign-extended summands, shifted by two places per pair, are
// added to form the product.
//
// Parameter W: operand width (default 12, the half-width used by the
// Karatsuba multiplier). Purely combinational.
module booth_mul #(
  parameter int unsigned W = 12
) (
  input  logic [W-1:0]   a,   // multiplicand
  input  logic [W-1:0]   b,   // multiplier
  output logic [2*W-1:0] p
);

  localparam int unsigned PAIRS = (W + 2) / 2;   // digits for W+1 signed bits
  localparam int unsigned PW    = 2 * W + 4;     // partial-product width

  logic [2*PAIRS:0] mr;   // multiplier with a zero below and zero-extension
  logic [PW-1:0]    acc;

  assign mr = {{(2*PAIRS-W){1'b0}}, b, 1'b0};

  always_comb begin
    logic [PW-1:0] m1, m2, pp;
    m1  = PW'(a);
    m2  = PW'(a) << 1;
    acc = '0;
    for (int i = 0; i < PAIRS; i++) begin
      unique case (mr[2*i +: 3])
        3'b000, 3'b111: pp = '0;
        3'b001, 3'b010: pp = m1;
        3'b011:         pp = m2;
        3'b100:         pp = -m2;
        3'b101, 3'b110: pp = -m1;
        default:        pp = '0;
      endcase
      acc = acc + (pp << (2 * i));
    end
  end

  assign p = acc[2*W-1:0];

endmodule
