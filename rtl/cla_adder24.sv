// cla_adder24: 24-bit adder made of four 6-bit reduced fan-in
// carry-look-ahead blocks (cla_block6).
//
// Inside a block the carries are looked ahead; between blocks the carry
// ripples, block 0 feeding block 1 and so on, as in the design's block CLA.
// cout is C24, the carry out of the top block.
//
// Purely combinational.
module cla_adder24 (
  input  logic [23:0] a,
  input  logic [23:0] b,
  input  logic        cin,
  output logic [23:0] sum,
  output logic        cout
);

  localparam int unsigned BLOCKS  = 4;
  localparam int unsigned BLOCK_W = 6;

  logic [BLOCKS:0] bc;

  assign bc[0] = cin;

  for (genvar k = 0; k < BLOCKS; k++) begin : g_blk
    cla_block6 u_blk (
      .a   (a[k*BLOCK_W +: BLOCK_W]),
      .b   (b[k*BLOCK_W +: BLOCK_W]),
      .cin (bc[k]),
      .sum (sum[k*BLOCK_W +: BLOCK_W]),
      .cout(bc[k+1])
    );
  end

  assign cout = bc[BLOCKS];

endmodule
