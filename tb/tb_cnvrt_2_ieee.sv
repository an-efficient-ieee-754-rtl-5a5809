// tb_cnvrt_2_ieee: checks the conversion of effective operands to IEEE-754.
// Stimuli are built from two-part operands through cnvrt_2_integral; the
// expected word comes from the testbench's own 63-bit model
// (fp_ref_pkg::ieee_of_parts). Also checks the values printed in the design's
// simulations: 9 -> 0x41100000 and 195 -> 0x43430000.
module tb_cnvrt_2_ieee;
  import fpu_pkg::*;
  import fp_ref_pkg::*;
  logic [31:0] ip, fp, eff;
  logic signed [5:0] pos;
  ieee_t ieee;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  cnvrt_2_integral u_pack (.int_part(ip), .frac_part(fp), .eff(eff), .pos(pos));
  cnvrt_2_ieee     dut    (.eff(eff), .pos(pos), .ieee(ieee));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] i, logic [31:0] f, logic [31:0] expect_w);
    ip = i; fp = f; #1;
    checks++;
    if (ieee !== expect_w) begin
      failures++;
      $display("FAIL int=%h frac=%h got %h exp %h", i, f, ieee, expect_w);
    end
  endtask

  initial begin
    check(32'd9, 0, 32'b0_10000010_00100000000000000000000);
    check(32'd195, 0, 32'b0_10000110_10000110000000000000000);
    check(32'd50, 0, 32'b0_10000100_10010000000000000000000);
    check(32'h0, 32'h40000000, 32'h3E800000);   // 0.25
    check(32'h80000003, 32'h80000000, 32'hC0600000);   // -3.5
    check(32'h0, 32'h0, 32'h0);
    for (int t = 0; t < 3000; t++) begin
      logic [31:0] i, f;
      i = $urandom; f = $urandom;
      if (t % 3 == 0) i = {i[31], 31'b0};
      else if (t % 3 == 1) i = i >> ($urandom % 32);
      check(i, f, ieee_of_parts(i, f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
