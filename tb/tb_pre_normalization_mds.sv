// tb_pre_normalization_mds: checks the operand preparation for multiply,
// divide and square root: unpacked mantissas, zero flags, the dividend
// alignment (quotient mantissa in [1,2): dividend >= divisor, below twice
// the divisor, and value preserved through the exponent) and the square
// root radicand and exponent (radicand * 2^(2*(e-127)-46) equals the operand).
module tb_pre_normalization_mds;
  import fpu_pkg::*;
  import fp_ref_pkg::*;
  ieee_t a, b;
  logic [23:0] ma, mb;
  logic a_zero, b_zero, rs;
  logic [24:0] dd;
  logic signed [XEXP_W-1:0] de, se;
  logic [47:0] rad;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  pre_normalization_mds dut (.a(a), .b(b), .ma(ma), .mb(mb), .a_zero(a_zero), .b_zero(b_zero), .res_sign(rs),
    .div_dividend(dd), .div_exp(de), .sqrt_radicand(rad), .sqrt_exp(se));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      logic [31:0] x, y;
      real va, vb, q_from_fields, r_from_fields, qv, rv;
      x = $urandom; y = $urandom;
      x[30:23] = 8'(1 + $urandom % 254); y[30:23] = 8'(1 + $urandom % 254);
      a = x; b = y; #1;
      va = real_of_ieee({1'b0, x[30:0]}); vb = real_of_ieee({1'b0, y[30:0]});
      checks++;
      if (ma !== {1'b1, x[22:0]} || mb !== {1'b1, y[22:0]} || a_zero || b_zero || rs !== (x[31] ^ y[31])) begin
        failures++; $display("FAIL unpack %h %h", x, y);
      end
      // dividend/divisor = (va/vb) * 2^(127 - de), in [1,2)
      q_from_fields = real'(dd) / real'(mb);
      qv = q_from_fields * pow2(int'(de) - 127) / (va / vb);
      checks++;
      if (dd < 25'(mb) || dd >= 25'({mb, 1'b0}) || qv > 1.000001 || qv < 0.999999) begin
        failures++; $display("FAIL div %h / %h dd=%h de=%0d", x, y, dd, de);
      end
      // sqrt: radicand / 2^46 in [1,4) and radicand/2^46 * 4^(se-127) = va
      r_from_fields = real'(rad) / pow2(46);
      rv = r_from_fields * pow2(2 * (int'(se) - 127));
      checks++;
      if (r_from_fields < 1.0 || r_from_fields >= 4.0 || rv != va) begin
        failures++; $display("FAIL sqrt %h rad=%h se=%0d", x, rad, se);
      end
    end
    a = 0; b = 0; #1;
    checks++;
    if (!a_zero || !b_zero) begin failures++; $display("FAIL zero flags"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
