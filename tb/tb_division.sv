// tb_division: checks the floating-point divide unit. Operands pass through
// pre_normalization_mds, the unrounded quotient through post_normalization
// (all four rounding modes); the result must equal the double-precision
// quotient rounded to single precision. Also checks x/0 and 0/0 flags,
// the design's 50 / 5 = 10 example, and the latency from start to done
// (3*24 iteration cycles + 3 = 75 clocks counting the start clock).
module tb_division;
  import fpu_pkg::*;
  import fp_ref_pkg::*;
  logic clk = 0, rst = 1, start = 0;
  ieee_t a, b, result;
  rmode_e rm;
  logic [23:0] ma, mb;
  logic a_zero, b_zero;
  logic [24:0] dd;
  logic signed [XEXP_W-1:0] de, se;
  logic [47:0] rad;
  unrounded_t res;
  logic dz, inv, done, ovf, unf, inx;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pre_normalization_mds u_pre (.a(a), .b(b), .ma(ma), .mb(mb), .a_zero(a_zero), .b_zero(b_zero),
    .div_dividend(dd), .div_exp(de), .sqrt_radicand(rad), .sqrt_exp(se));
  division dut (.clk(clk), .rst(rst), .start(start), .sa(a.sign), .sb(b.sign), .a_zero(a_zero),
    .b_zero(b_zero), .dividend(dd), .divisor(mb), .exp_in(de), .res(res), .div_by_0(dz),
    .invalid(inv), .done(done));
  post_normalization u_pn (.u(res), .rmode(rm), .result(result), .overflow(ovf), .underflow(unf), .inexact(inx));

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [31:0] x, logic [31:0] y, logic [1:0] mode);
    int cyc;
    logic [31:0] ew;
    logic eo, eu;
    @(negedge clk);
    a = x; b = y; rm = rmode_e'(mode); start = 1;
    @(posedge clk); @(negedge clk);
    start = 0; cyc = 1;
    while (!done) begin
      @(posedge clk); @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 3 * 24 + 3) begin failures++; $display("FAIL latency %0d", cyc); end
    if (y[30:23] == 0) begin
      checks++;
      if (dz !== (x[30:23] != 0) || inv !== (x[30:23] == 0)) begin
        failures++; $display("FAIL zero divisor flags dz=%0d inv=%0d", dz, inv);
      end
    end else begin
      ew = ieee_of_real(real_of_ieee(x) / real_of_ieee(y), mode, eo, eu);
      if (x[30:23] == 0) begin ew = {x[31] ^ y[31], 31'b0}; eo = 0; eu = 0; end
      checks++;
      if (result !== ew || ovf !== eo || unf !== eu || dz || inv) begin
        failures++;
        $display("FAIL %h / %h rm%0d = %h exp %h (o%0d u%0d)", x, y, mode, result, ew, ovf, unf);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    run(32'h42480000, 32'h40A00000, 0);   // 50 / 5
    checks++;
    if (result !== 32'b0_10000010_01000000000000000000000) begin failures++; $display("FAIL example"); end
    run(32'h3F800000, 32'h40400000, 1);   // 1/3 nearest
    run(32'h3F800000, 32'h40400000, 2);
    run(32'hBF800000, 32'h40400000, 3);
    run(32'h40000000, 32'h0, 0);          // divide by zero
    run(32'h0, 32'h0, 0);                 // 0/0
    run(32'h0, 32'h40000000, 0);
    run(32'h7F000000, 32'h3E800000, 1);   // overflow
    run(32'h00800000, 32'h42000000, 1);   // underflow
    for (int t = 0; t < 400; t++) begin
      logic [31:0] x, y;
      x = $urandom; y = $urandom;
      x[30:23] = 8'(64 + $urandom % 128); y[30:23] = 8'(64 + $urandom % 128);
      run(x, y, 2'(t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
