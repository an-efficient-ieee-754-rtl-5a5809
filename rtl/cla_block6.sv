// cla_block6: 6-bit carry-look-ahead block with reduced fan-in.
//
// Generate G_i = a_i & b_i and propagate P_i = a_i ^ b_i are formed per bit.
// Instead of expanding every carry into a flat sum of products, the carries
// reuse two shared sub-terms, (G0 + P0.C0) and (G2 + P2.G1), which lowers the
// gate count and the fan-in of the wide AND terms at the cost of a little
// extra depth. The shared-term factoring follows the design; every carry
// is the complete expansion of C_i = G_{i-1} + P_{i-1}.C_{i-1} written with
// those terms. S_i = P_i ^ C_i.
//
// Purely combinational. Blocks are chained by cla_adder24.
module cla_block6 (
  input  logic [5:0] a,
  input  logic [5:0] b,
  input  logic       cin,
  output logic [5:0] sum,
  output logic       cout
);

  logic [5:0] g, p;
  logic [6:0] c;
  logic       t01, t12;   // shared sub-terms

  assign g = a & b;
  assign p = a ^ b;

  assign t01 = g[0] | (p[0] & cin);
  assign t12 = g[2] | (p[2] & g[1]);

  assign c[0] = cin;
  assign c[1] = t01;
  assign c[2] = g[1] | (p[1] & t01);
  assign c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & t01);
  assign c[4] = g[3] | (p[3] & t12) | (p[3] & p[2] & p[1] & t01);
  assign c[5] = g[4] | (p[4] & g[3]) | (p[4] & p[3] & t12)
              | (p[4] & p[3] & p[2] & p[1] & t01);
  assign c[6] = g[5] | (p[5] & g[4]) | (p[5] & p[4] & g[3])
              | (p[5] & p[4] & p[3] & t12)
              | (p[5] & p[4] & p[3] & p[2] & p[1] & t01);

  assign sum  = p ^ c[5:0];
  assign cout = c[6];

endmodule
