// tb_squareroot: checks the floating-point square root unit through
// pre_normalization_mds and post_normalization in all four rounding modes
// against $sqrt in double precision rounded to single, the invalid flag for
// negative operands, zero, and the latency (3*24 + 3 = 75 clocks counting
// the start clock).
module tb_squareroot;
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
  logic inv, done, ovf, unf, inx;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pre_normalization_mds u_pre (.a(a), .b(b), .ma(ma), .mb(mb), .a_zero(a_zero), .b_zero(b_zero),
    .div_dividend(dd), .div_exp(de), .sqrt_radicand(rad), .sqrt_exp(se));
  squareroot dut (.clk(clk), .rst(rst), .start(start), .sa(a.sign), .a_zero(a_zero),
    .radicand(rad), .exp_in(se), .res(res), .invalid(inv), .done(done));
  post_normalization u_pn (.u(res), .rmode(rm), .result(result), .overflow(ovf), .underflow(unf), .inexact(inx));

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [31:0] x, logic [1:0] mode);
    int cyc;
    logic [31:0] ew;
    logic eo, eu;
    @(negedge clk);
    a = x; b = 0; rm = rmode_e'(mode); start = 1;
    @(posedge clk); @(negedge clk);
    start = 0; cyc = 1;
    while (!done) begin
      @(posedge clk); @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 3 * 24 + 3) begin failures++; $display("FAIL latency %0d", cyc); end
    checks++;
    if (x[31] && x[30:23] != 0) begin
      if (!inv) begin failures++; $display("FAIL no invalid for %h", x); end
    end else begin
      ew = (x[30:23] == 0) ? x : ieee_of_real($sqrt(real_of_ieee(x)), mode, eo, eu);
      if (result !== ew || inv) begin
        failures++; $display("FAIL sqrt(%h) rm%0d = %h exp %h", x, mode, result, ew);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    run(32'h4594C800, 0);   // 4761 -> 69
    checks++;
    if (result !== 32'h428A0000) begin failures++; $display("FAIL example %h", result); end
    run(32'h40000000, 1);   // sqrt 2
    run(32'h40800000, 0);   // 4
    run(32'hC0800000, 0);   // -4: invalid
    run(32'h0, 0);
    run(32'h80000000, 0);
    for (int t = 0; t < 400; t++) begin
      logic [31:0] x;
      x = $urandom; x[31] = 0; if (x[30:23] == 0) x[30:23] = 1;
      run(x, 2'(t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
