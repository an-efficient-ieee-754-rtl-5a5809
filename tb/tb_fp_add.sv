// tb_fp_add: checks the magnitude adder: the unrounded significand must be
// {carry, big + small, guard/round/sticky of small}, exponent and sign
// passed through.
module tb_fp_add;
  import fpu_pkg::*;
  logic [23:0] bm, sm;
  logic [2:0]  grs;
  logic [7:0]  e;
  logic        s, co;
  unrounded_t  res;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  fp_add dut (.big_mant(bm), .small_mant(sm), .small_grs(grs), .exp(e), .sign(s), .res(res), .co(co));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 10000; t++) begin
      logic [24:0] sum;
      bm = {1'b1, 23'($urandom)}; sm = 24'($urandom) >> ($urandom % 24);
      grs = 3'($urandom); e = 8'($urandom); s = 1'($urandom);
      if (t == 0) begin bm = 24'hFFFFFF; sm = 24'h000001; end
      #1;
      sum = 25'(bm) + 25'(sm);
      checks++;
      if (res.sig !== {sum, grs} || co !== sum[24] || res.exp !== XEXP_W'(e) || res.sign !== s) begin
        failures++;
        $display("FAIL %h + %h grs=%b got sig %h", bm, sm, grs, res.sig);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
