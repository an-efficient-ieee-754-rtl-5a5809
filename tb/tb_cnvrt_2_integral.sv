// tb_cnvrt_2_integral: checks the two-part operand packing.
// Expected values come from a 63-bit fixed-point model: the effective
// operand must hold the 31 bits that start at the leading one of
// {integer magnitude, fraction}, and pos must place the binary point. The
// worked example of the design (integer 0x02A350E0, fraction 0xFFFC00FF)
// is checked first.
module tb_cnvrt_2_integral;
  logic [31:0] ip, fp, eff;
  logic signed [5:0] pos;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  cnvrt_2_integral dut (.int_part(ip), .frac_part(fp), .eff(eff), .pos(pos));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] i, logic [31:0] f);
    logic [62:0] n, sh;
    int lead;
    logic [31:0] exp_eff;
    int exp_pos;
    ip = i; fp = f; #1;
    n = {i[30:0], f};
    lead = -1;
    for (int k = 0; k < 63; k++) if (n[k]) lead = k;
    if (lead < 0) begin
      exp_eff = {i[31], 31'b0}; exp_pos = -32;
    end else begin
      sh = n << (62 - lead);
      exp_eff = {i[31], sh[62:32]};
      exp_pos = lead - 32;
    end
    checks++;
    if (eff !== exp_eff || (lead >= 0 && int'(pos) != exp_pos)) begin
      failures++;
      $display("FAIL int=%h frac=%h eff=%h exp %h pos=%0d exp %0d", i, f, eff, exp_eff, pos, exp_pos);
    end
  endtask

  initial begin
    check(32'b00000010101000110101000011100000, 32'b11111111111111000000000011111111);
    checks++;
    if (eff !== 32'b0_10101000110101000011100000_11111 || pos != 25) begin
      failures++; $display("FAIL worked example eff=%b pos=%0d", eff, pos);
    end
    check(32'd450, 32'hFFC78000);
    check(32'h80000005, 32'h0);
    check(32'h0, 32'h80000000);
    check(32'h0, 32'h00000001);
    check(32'h7FFFFFFF, 32'hFFFFFFFF);
    for (int t = 0; t < 3000; t++) begin
      logic [31:0] i, f;
      i = $urandom; f = $urandom;
      case (t % 4)
        0: i = i >> ($urandom % 32);
        1: i = {i[31], 31'b0};
        default: ;
      endcase
      check(i, f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
