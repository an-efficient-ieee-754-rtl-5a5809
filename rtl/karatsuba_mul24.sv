// karatsuba_mul24: 24 x 24 unsigned mantissa multiplier that combines one
// level of Karatsuba splitting with bit-pair recoding multipliers.
//
// Each operand is split into 12-bit halves, x = x1*2^12 + x0. Three
// products are formed by booth_mul: z2 = x1*y1, z0 = x0*y0 and
// (x1+x0)*(y1+y0) on 13-bit sums, from which z1 = (x1+x0)(y1+y0) - z2 - z0.
// The product is z2*2^24 + z1*2^12 + z0. Three half-size multiplies replace
// the four of a plain split, as the design proposes.
//
// Purely combinational.
module karatsuba_mul24 (
  input  logic [23:0] x,
  input  logic [23:0] y,
  output logic [47:0] p
);

  localparam int unsigned M = 12;

  logic [M-1:0]   x1, x0, y1, y0;
  logic [M:0]     xs, ys;
  logic [2*M-1:0] z2, z0;
  logic [2*M+1:0] zm;
  logic [2*M+1:0] z1;

  assign {x1, x0} = x;
  assign {y1, y0} = y;
  assign xs = {1'b0, x1} + {1'b0, x0};
  assign ys = {1'b0, y1} + {1'b0, y0};

  booth_mul #(.W(M))   u_z2 (.a(x1), .b(y1), .p(z2));
  booth_mul #(.W(M))   u_z0 (.a(x0), .b(y0), .p(z0));
  booth_mul #(.W(M+1)) u_zm (.a(xs), .b(ys), .p(zm));

  assign z1 = zm - (2*M+2)'(z2) - (2*M+2)'(z0);
  assign p  = (48'(z2) << (2*M)) + (48'(z1) << M) + 48'(z0);

endmodule
