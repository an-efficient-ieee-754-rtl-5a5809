// tb_cla_adder24: checks the 24-bit block CLA adder against integer
// addition on random and carry-chain corner operands.
module tb_cla_adder24;
  logic [23:0] a, b, s;
  logic        cin, cout;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  cla_adder24 dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(cout));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [23:0] x, logic [23:0] y, logic c);
    logic [24:0] e;
    a = x; b = y; cin = c; #1;
    e = 25'(x) + 25'(y) + 25'(c);
    checks++;
    if ({cout, s} !== e) begin
      failures++;
      $display("FAIL %h + %h + %0d = %h exp %h", x, y, c, {cout, s}, e);
    end
  endtask

  initial begin
    check(24'hFFFFFF, 24'h000000, 1'b1);
    check(24'hFFFFFF, 24'hFFFFFF, 1'b1);
    check(24'h000FFF, 24'h000001, 1'b0);
    check(24'h03FFFF, 24'h000000, 1'b1);
    for (int t = 0; t < 20000; t++) check(24'($urandom), 24'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
