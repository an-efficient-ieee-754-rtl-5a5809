// tb_post_normalization: checks normalisation, the four rounding modes and
// overflow/underflow. The unrounded value sig/2^26 * 2^(exp-127) is exact
// in double precision, so fp_ref_pkg::ieee_of_real gives the expected word.
// Counts that carries, left shifts, round-ups, overflow and underflow all
// occurred.
module tb_post_normalization;
  import fpu_pkg::*;
  import fp_ref_pkg::*;
  unrounded_t u;
  rmode_e     rm;
  ieee_t      result;
  logic       ovf, unf, inx;
  int checks = 0, failures = 0;
  int n_carry = 0, n_left = 0, n_up = 0, n_ovf = 0, n_unf = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  post_normalization dut (.u(u), .rmode(rm), .result(result), .overflow(ovf), .underflow(unf), .inexact(inx));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic s, int e, logic [27:0] sig, logic [1:0] mode);
    real v;
    logic [31:0] ew;
    logic eo, eu;
    u.sign = s; u.exp = XEXP_W'(e); u.sig = sig; rm = rmode_e'(mode); #1;
    v = real'(sig) / pow2(26) * pow2(e - 127);
    if (s) v = -v;
    ew = (sig == 0) ? {s, 31'b0} : ieee_of_real(v, mode, eo, eu);
    if (sig == 0) begin eo = 0; eu = 0; end
    checks++;
    if (result !== ew || ovf !== eo || unf !== eu) begin
      failures++;
      $display("FAIL s=%0d e=%0d sig=%h rm=%0d got %h o%0d u%0d exp %h o%0d u%0d", s, e, sig, mode, result, ovf, unf, ew, eo, eu);
    end
    if (sig[27]) n_carry++;
    if (sig != 0 && !sig[27] && !sig[26]) n_left++;
    if (!eo && !eu && sig != 0 && result[22:0] != sig[25:3] && sig[27:26] == 2'b01) n_up++;
    if (eo) n_ovf++;
    if (eu) n_unf++;
  endtask

  initial begin
    check(0, 127, 28'h4000000, 0);                  // 1.0
    check(0, 127, 28'h4000004, 1);                  // exact tie, even: stays
    check(0, 127, 28'h400000C, 1);                  // tie, odd: rounds up
    check(1, 254, 28'hFFFFFFF, 0);                  // overflow, truncation
    check(1, 254, 28'hFFFFFFF, 1);                  // overflow, nearest
    check(0, 1, 28'h2000000, 2);                    // underflow
    for (int t = 0; t < 20000; t++) begin
      logic [27:0] sig;
      int e;
      sig = 28'($urandom) >> ($urandom % 27);
      e = 1 + $urandom % 260 - 3;
      check(1'($urandom), e, sig, 2'($urandom));
    end
    checks++;
    if (n_carry == 0 || n_left == 0 || n_up == 0 || n_ovf == 0 || n_unf == 0) begin
      failures++;
      $display("FAIL coverage carry=%0d left=%0d up=%0d ovf=%0d unf=%0d", n_carry, n_left, n_up, n_ovf, n_unf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
