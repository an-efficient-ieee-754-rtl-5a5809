// tb_fp_sub: checks the magnitude subtractor: for big >= small the
// unrounded significand must equal {big, 000} - {small, guard/round/sticky}
// as a 27-bit difference, with borrow = 1 (no borrow out of C24).
module tb_fp_sub;
  import fpu_pkg::*;
  logic [23:0] bm, sm;
  logic [2:0]  grs;
  logic [7:0]  e;
  logic        s, borrow;
  unrounded_t  res;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  fp_sub dut (.big_mant(bm), .small_mant(sm), .small_grs(grs), .exp(e), .sign(s), .res(res), .borrow(borrow));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 10000; t++) begin
      logic [26:0] d;
      bm = {1'b1, 23'($urandom)};
      sm = (t % 3 == 0) ? bm - 24'($urandom % 4) : 24'($urandom) >> ($urandom % 24);
      if (sm > bm) sm = bm;
      grs = (sm == bm) ? 3'b000 : 3'($urandom);
      e = 8'($urandom); s = 1'($urandom);
      #1;
      d = {bm, 3'b000} - {sm, grs};
      checks++;
      if (res.sig !== {1'b0, d} || borrow !== 1'b1 || res.exp !== XEXP_W'(e) || res.sign !== s) begin
        failures++;
        $display("FAIL %h - %h grs=%b got sig %h exp %h borrow %0d", bm, sm, grs, res.sig, d, borrow);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
