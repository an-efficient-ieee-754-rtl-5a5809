// tb_booth_mul: checks the bit-pair recoding multiplier (W = 12 and the
// 13-bit instance used by the Karatsuba middle product) against the *
// operator on corner and random operands.
module tb_booth_mul;
  logic [11:0] a12, b12;
  logic [23:0] p12;
  logic [12:0] a13, b13;
  logic [25:0] p13;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  booth_mul                dut12 (.a(a12), .b(b12), .p(p12));
  booth_mul #(.W(13))      dut13 (.a(a13), .b(b13), .p(p13));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      if (t < 16) begin
        a12 = (t & 1) ? 12'hFFF : 12'h0; b12 = (t & 2) ? 12'hFFF : 12'h801;
        a13 = (t & 4) ? 13'h1FFF : 13'h1; b13 = (t & 8) ? 13'h1FFF : 13'h1555;
      end else begin
        a12 = 12'($urandom); b12 = 12'($urandom);
        a13 = 13'($urandom); b13 = 13'($urandom);
      end
      #1;
      checks += 2;
      if (p12 !== 24'(a12) * 24'(b12)) begin failures++; $display("FAIL12 %h*%h=%h", a12, b12, p12); end
      if (p13 !== 26'(a13) * 26'(b13)) begin failures++; $display("FAIL13 %h*%h=%h", a13, b13, p13); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
