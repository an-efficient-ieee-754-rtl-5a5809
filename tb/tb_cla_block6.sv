// tb_cla_block6: exhaustive check of the 6-bit reduced fan-in CLA block
// against integer addition (all 2^13 input combinations).
module tb_cla_block6;
  logic [5:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  cla_block6 dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(cout));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 13); v++) begin
      logic [6:0] expect_s;
      {cin, a, b} = 13'(v);
      #1;
      expect_s = 7'(a) + 7'(b) + 7'(cin);
      checks++;
      if ({cout, s} !== expect_s) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d got %0d", a, b, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
