// tb_karatsuba_mul24: checks the 24 x 24 Karatsuba / bit-pair multiplier
// against the * operator, including all-ones halves (largest middle term).
module tb_karatsuba_mul24;
  logic [23:0] x, y;
  logic [47:0] p;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  karatsuba_mul24 dut (.x(x), .y(y), .p(p));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [23:0] a, logic [23:0] b);
    x = a; y = b; #1;
    checks++;
    if (p !== 48'(a) * 48'(b)) begin
      failures++; $display("FAIL %h * %h = %h", a, b, p);
    end
  endtask

  initial begin
    check(24'hFFFFFF, 24'hFFFFFF);
    check(24'h800000, 24'h800000);
    check(24'h000FFF, 24'hFFF000);
    check(24'd65 << 17, 24'd165 << 16);
    for (int t = 0; t < 20000; t++) check(24'($urandom), 24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
