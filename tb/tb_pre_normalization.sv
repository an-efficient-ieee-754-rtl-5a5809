// tb_pre_normalization: checks operand ordering and alignment for add/sub.
// For random operand pairs the expected big/small assignment comes from
// comparing real magnitudes, and the aligned mantissa, guard, round and
// sticky bits from a 128-bit shift of the smaller mantissa.
module tb_pre_normalization;
  import fpu_pkg::*;
  import fp_ref_pkg::*;
  ieee_t a, b;
  logic [23:0] big_mant, small_mant;
  logic [2:0]  small_grs;
  logic [7:0]  exp;
  logic        big_sign, small_sign, swapped;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  pre_normalization dut (.a(a), .b(b), .big_mant(big_mant), .small_mant(small_mant),
    .small_grs(small_grs), .exp(exp), .big_sign(big_sign), .small_sign(small_sign),
    .swapped(swapped));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] x, logic [31:0] y);
    logic [31:0] bg, sm;
    logic        sw;
    int          d;
    logic [127:0] wide;
    logic [23:0] e_small;
    logic [2:0]  e_grs;
    a = x; b = y; #1;
    if (real_of_ieee({1'b0, y[30:0]}) > real_of_ieee({1'b0, x[30:0]})) sw = 1; else sw = 0;
    bg = sw ? y : x; sm = sw ? x : y;
    d  = int'(bg[30:23]) - int'(sm[30:23]);
    wide = {(sm[30:23] != 0), sm[22:0], 104'b0} >> d;
    e_small = wide[127:104];
    e_grs   = {wide[103], wide[102], |wide[101:0]};
    if (d > 100) begin
      e_small = '0;
      e_grs   = {2'b00, sm[30:23] != 0};
    end
    checks++;
    if (swapped !== sw || big_mant !== {(bg[30:23] != 0), bg[22:0]} || exp !== bg[30:23] ||
        small_mant !== e_small || small_grs !== e_grs || big_sign !== bg[31] || small_sign !== sm[31]) begin
      failures++;
      $display("FAIL a=%h b=%h sw=%0d big=%h small=%h grs=%b exp=%0d (exp small %h grs %b)",
               x, y, swapped, big_mant, small_mant, small_grs, exp, e_small, e_grs);
    end
  endtask

  initial begin
    // example of the design: exponents differ by one
    check(32'h41A8D438, 32'h4128D738);
    check(32'h3F800000, 32'h0);
    check(32'h0, 32'hC0000000);
    for (int t = 0; t < 5000; t++) begin
      logic [31:0] x, y;
      x = $urandom; y = $urandom;
      x[30:23] = 8'(1 + $urandom % 254);
      y[30:23] = (t % 2) ? 8'(int'(x[30:23]) - 20 + $urandom % 40) : 8'(1 + $urandom % 254);
      if (y[30:23] == 0) y[30:23] = 1;
      if (t % 97 == 0) y = {y[31], 31'b0};
      check(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
