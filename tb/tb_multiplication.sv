// tb_multiplication: checks sign, exponent (e1 + e2 - 127) and the
// unrounded significand of the multiply unit against a 48-bit product
// formed with the * operator, and the rounded result through
// post_normalization against double-precision multiplication. Includes the
// design's printed example 65 * 165 = 10725 (0x46279400).
module tb_multiplication;
  import fpu_pkg::*;
  import fp_ref_pkg::*;
  ieee_t a, b;
  unrounded_t res;
  ieee_t result;
  logic ovf, unf, inx;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  multiplication dut (.sa(a.sign), .sb(b.sign), .ea(a.exp), .eb(b.exp),
    .ma({a.exp != 0, a.frac}), .mb({b.exp != 0, b.frac}), .res(res));
  post_normalization u_pn (.u(res), .rmode(RM_NEAREST), .result(result), .overflow(ovf), .underflow(unf), .inexact(inx));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] x, logic [31:0] y);
    logic [47:0] p;
    logic [31:0] ew;
    logic eo, eu;
    a = x; b = y; #1;
    p = 48'({x[30:23] != 0, x[22:0]}) * 48'({y[30:23] != 0, y[22:0]});
    checks++;
    if (res.sig !== {p[47:21], |p[20:0]} || res.sign !== (x[31] ^ y[31]) ||
        res.exp !== XEXP_W'(int'(x[30:23]) + int'(y[30:23]) - 127)) begin
      failures++; $display("FAIL fields %h * %h", x, y);
    end
    ew = ieee_of_real(real_of_ieee(x) * real_of_ieee(y), 2'd1, eo, eu);
    if (x[30:23] == 0 || y[30:23] == 0) begin ew = {x[31] ^ y[31], 31'b0}; eo = 0; eu = 0; end
    checks++;
    if (result !== ew || ovf !== eo || unf !== eu) begin
      failures++; $display("FAIL %h * %h = %h exp %h", x, y, result, ew);
    end
  endtask

  initial begin
    check(32'h42820000, 32'h43250000);
    checks++;
    if (result !== 32'b0_10001100_01001111001010000000000) begin failures++; $display("FAIL example %h", result); end
    check(32'h7F000000, 32'h40000000);  // overflow
    check(32'h00800000, 32'h3F000000);  // underflow
    check(32'h0, 32'h40000000);
    for (int t = 0; t < 10000; t++) begin
      logic [31:0] x, y;
      x = $urandom; y = $urandom;
      x[30:23] = 8'(64 + $urandom % 128); y[30:23] = 8'(64 + $urandom % 128);
      check(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
