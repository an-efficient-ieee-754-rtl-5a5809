// tb_fpu_top: end-to-end test of the FPU at its default (and only) size.
//
// Operands are given as integer/fraction word pairs. The converted IEEE
// words must match a 63-bit fixed-point model of the truncating conversion.
// Every operation is then checked against a reference:
//   add/sub   exact 128-bit fixed-point sum, rounded here by rmode
//   mul/div/sqrt  double-precision result rounded by fp_ref_pkg
//   shift     logical shift of operand 1's integer word
//   sine/cosine   within 8/2048 of $sin/$cos
//   tangent   sin_fx / cos_fx in double precision, rounded by rmode, and
//             close to $tan
// and the special cases (x/0, 0/0, sqrt of a negative, angle beyond
// +-90 degrees) must give the IEEE default result and flag. The inexact flag
// must be set exactly when the rounded result differs from the exact one
// (always for a valid sine, cosine or tangent). Start-to-done
// latency must be 2 clocks for add, subtract, multiply and shift, 77 for
// divide and square root, 16 for sine/cosine and 92 for the tangent; a start pulse while busy
// must be ignored. The worked examples of the design (conversion, 5+4,
// 195-50, 65*165, 50/5, 100>>5, sqrt(4761)) are run first. Counters record
// how often each mechanism was exercised; each must be non-zero.
module tb_fpu_top;
  import fp_ref_pkg::*;

  logic        clk = 0, rst = 1, start = 0;
  logic [31:0] op1_int, op1_frac, op2_int, op2_frac;
  logic [3:0]  fpu_op;
  logic [1:0]  rmode;
  logic        shift_dir;
  logic [4:0]  shift_val;
  logic [31:0] op1_ieee, op2_ieee, oper_result, cos_result;
  logic [15:0] sin_fx, cos_fx;
  logic        underflow, overflow, div_by_0, invalid, inexact, busy, done;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_op[8];
  int n_carry_norm, n_cancel, n_swap, n_div0, n_zero_div, n_sqrt_neg, n_range;
  int n_round_up[4], n_exact_zero, n_busy_ignored, n_zero_int, n_inexact, n_exact;

  always #5 clk = ~clk;

  fpu_top dut (
    .clk(clk), .rst(rst), .start(start),
    .op1_int(op1_int), .op1_frac(op1_frac), .op2_int(op2_int), .op2_frac(op2_frac),
    .fpu_op(fpu_op), .rmode(rmode), .shift_dir(shift_dir), .shift_val(shift_val),
    .op1_ieee(op1_ieee), .op2_ieee(op2_ieee), .oper_result(oper_result), .cos_result(cos_result),
    .sin_fx(sin_fx), .cos_fx(cos_fx), .underflow(underflow), .overflow(overflow),
    .div_by_0(div_by_0), .invalid(invalid), .inexact(inexact), .busy(busy), .done(done)
  );

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // exact value of a single-precision word times 2^64 (magnitude)
  function automatic logic [127:0] fixed_of(logic [31:0] w);
    if (w[30:23] == 0) return '0;
    return 128'({1'b1, w[22:0]}) << (int'(w[30:23]) - 127 - 23 + 64);
  endfunction

  // round a magnitude times 2^64 to single precision
  function automatic logic [31:0] round_fixed(logic s, logic [127:0] mag, logic [1:0] rm);
    int p, e;
    logic [24:0] m;
    logic g, st, up;
    logic [127:0] low;
    p = -1;
    for (int i = 0; i < 128; i++) if (mag[i]) p = i;
    if (p < 0) return {rm == 2'd3, 31'b0};
    if (p >= 23) m = 25'(mag >> (p - 23));
    else         m = 25'(mag << (23 - p));
    g = 0; st = 0;
    if (p >= 24) begin
      g   = mag[p-24];
      low = (128'd1 << (p - 24)) - 1;
      st  = |(mag & low);
    end
    case (rm)
      2'd0: up = 0;
      2'd1: up = g & (st | m[0]);
      2'd2: up = !s & (g | st);
      default: up = s & (g | st);
    endcase
    m = m + 25'(up);
    e = p - 64 + 127;
    if (m[24]) begin m = m >> 1; e++; end
    return {s, 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] rand_word_part();
    logic [31:0] v;
    v = $urandom >> ($urandom % 33);
    if ($urandom % 8 == 0) v = 0;
    return v;
  endfunction

  task automatic rand_operand(output logic [31:0] ip, output logic [31:0] fp);
    ip = {1'($urandom), 31'(rand_word_part())};
    fp = rand_word_part();
    if ($urandom % 10 == 0) fp = 0;
  endtask

  // start an operation and wait for done; returns the start-to-done clocks
  task automatic run(logic [31:0] i1, logic [31:0] f1, logic [31:0] i2, logic [31:0] f2,
                     logic [3:0] op, logic [1:0] rm, logic dir, logic [4:0] sv, output int cyc);
    @(negedge clk);
    op1_int = i1; op1_frac = f1; op2_int = i2; op2_frac = f2;
    fpu_op = op; rmode = rm; shift_dir = dir; shift_val = sv;
    start = 1;
    @(posedge clk); @(negedge clk);
    start = 0;
    cyc = 1;
    // a second start while busy must not disturb the operation
    if (op >= 3 && op != 4) begin
      op1_int = ~i1; op1_frac = ~f1;
      start = 1;
      @(posedge clk); @(negedge clk);
      start = 0;
      cyc++;
      n_busy_ignored++;
    end
    while (!done) begin
      @(posedge clk); @(negedge clk);
      cyc++;
    end
  endtask

  // the unit truncates |angle| * 2048 before its range check
  function automatic logic out_of_range(real deg);
    real m;
    m = (deg < 0.0) ? -deg : deg;
    return $floor(m * 2048.0) > 184320.0;
  endfunction

  function automatic logic near(real got, real exp_v, real tol);
    return (got - exp_v <= tol) && (exp_v - got <= tol);
  endfunction

  // run one operation and check everything about it
  task automatic op_test(logic [31:0] i1, logic [31:0] f1, logic [31:0] i2, logic [31:0] f2,
                         logic [3:0] op, logic [1:0] rm, logic dir, logic [4:0] sv);
    logic [31:0] a, b, exp_r, trunc_r;
    logic [127:0] fa, fb, mag;
    logic s, fo, fu, ex_inx;
    real ra, rb, deg;
    int cyc, exp_cyc;
    a = ieee_of_parts(i1, f1);
    b = ieee_of_parts(i2, f2);
    ra = real_of_ieee(a);
    rb = real_of_ieee(b);
    run(i1, f1, i2, f2, op, rm, dir, sv, cyc);
    n_op[op]++;
    if (i1[30:0] == 0) n_zero_int++;
    check(op1_ieee === a && op2_ieee === b,
          $sformatf("conversion %h.%h -> %h (exp %h), %h.%h -> %h (exp %h)", i1, f1, op1_ieee, a, i2, f2, op2_ieee, b));
    exp_cyc = (op == 3 || op == 5) ? 77 : (op == 6) ? 16 : (op == 7 && !out_of_range(ra)) ? 92 : (op == 7) ? 16 : 2;
    check(cyc == exp_cyc, $sformatf("op %0d latency %0d, expected %0d", op, cyc, exp_cyc));
    check(!overflow && !underflow, $sformatf("op %0d unexpected overflow/underflow", op));
    ex_inx = 1'b0;
    case (op)
      4'd0, 4'd1: begin
        logic sb;
        sb = b[31] ^ (op == 1);
        fa = fixed_of(a); fb = fixed_of(b);
        if (fb > fa) n_swap++;
        if (a[31] == sb) begin
          mag = fa + fb; s = a[31];
          if (a[30:0] != 0 && b[30:0] != 0 && (mag >> 1) >= fixed_of({1'b0, (a[30:23] > b[30:23]) ? a[30:23] : b[30:23], 23'b0}))
            n_carry_norm++;
        end else begin
          mag = (fa >= fb) ? fa - fb : fb - fa;
          s   = (fa >= fb) ? a[31] : sb;
          if (mag == 0) n_exact_zero++;
          else if (mag < fixed_of({1'b0, ((a[30:23] > b[30:23]) ? a[30:23] : b[30:23]) - 8'd1, 23'b0})) n_cancel++;
        end
        exp_r   = round_fixed(s, mag, rm);
        trunc_r = round_fixed(s, mag, 2'd0);
        if (mag == 0 && a[31] == sb) exp_r = {s, 31'b0};   // (+-0) + (+-0) of equal signs
        if (mag == 0) trunc_r = exp_r;
        ex_inx = (fixed_of(trunc_r) != mag);
        check(oper_result === exp_r && !invalid && !div_by_0,
              $sformatf("%s %h %h rm %0d: %h, expected %h", op == 0 ? "add" : "sub", a, b, rm, oper_result, exp_r));
      end
      4'd2: begin
        exp_r   = ieee_of_real(ra * rb, rm, fo, fu);
        trunc_r = ieee_of_real(ra * rb, 2'd0, fo, fu);
        if (a[30:0] == 0 || b[30:0] == 0) begin exp_r = {a[31] ^ b[31], 31'b0}; trunc_r = exp_r; end
        ex_inx = (real_of_ieee(trunc_r) != ra * rb);
        check(oper_result === exp_r && !invalid && !div_by_0,
              $sformatf("mul %h %h rm %0d: %h, expected %h", a, b, rm, oper_result, exp_r));
      end
      4'd3: begin
        if (b[30:0] == 0) begin
          if (a[30:0] == 0) begin
            n_zero_div++;
            exp_r = 32'h7FC00000;
            check(oper_result === exp_r && invalid && !div_by_0, $sformatf("0/0: %h inv %b", oper_result, invalid));
          end else begin
            n_div0++;
            exp_r = {a[31] ^ b[31], 8'hFF, 23'b0};
            check(oper_result === exp_r && div_by_0 && !invalid, $sformatf("x/0: %h dz %b", oper_result, div_by_0));
          end
          trunc_r = exp_r;
        end else begin
          exp_r   = ieee_of_real(ra / rb, rm, fo, fu);
          trunc_r = ieee_of_real(ra / rb, 2'd0, fo, fu);
          if (a[30:0] == 0) begin exp_r = {a[31] ^ b[31], 31'b0}; trunc_r = exp_r; end
          ex_inx = (real_of_ieee(trunc_r) != ra / rb);
          check(oper_result === exp_r && !invalid && !div_by_0,
                $sformatf("div %h %h rm %0d: %h, expected %h", a, b, rm, oper_result, exp_r));
        end
      end
      4'd4: begin
        exp_r   = dir ? i1 << sv : i1 >> sv;
        trunc_r = exp_r;
        check(oper_result === exp_r && !invalid && !div_by_0,
              $sformatf("shift %h dir %b by %0d: %h, expected %h", i1, dir, sv, oper_result, exp_r));
      end
      4'd5: begin
        if (a[31] && a[30:0] != 0) begin
          n_sqrt_neg++;
          exp_r = 32'h7FC00000;
          check(oper_result === exp_r && invalid, $sformatf("sqrt(neg): %h inv %b", oper_result, invalid));
          trunc_r = exp_r;
        end else if (a[30:0] == 0) begin
          exp_r = a; trunc_r = a;
          check(oper_result === exp_r && !invalid, $sformatf("sqrt(0): %h", oper_result));
        end else begin
          exp_r   = ieee_of_real($sqrt(ra), rm, fo, fu);
          trunc_r = ieee_of_real($sqrt(ra), 2'd0, fo, fu);
          ex_inx  = (real_of_ieee(trunc_r) != $sqrt(ra));
          check(oper_result === exp_r && !invalid && !div_by_0,
                $sformatf("sqrt %h rm %0d: %h, expected %h", a, rm, oper_result, exp_r));
        end
      end
      4'd7: begin
        deg = ra;
        trunc_r = oper_result;
        exp_r = oper_result;
        if (out_of_range(deg)) begin
          n_range++;
          check(invalid && oper_result === 32'h7FC00000, $sformatf("tan out of range %f: %h inv %b", deg, oper_result, invalid));
        end else if (cos_fx == 0) begin
          check(div_by_0 && oper_result[30:0] === 31'h7F800000, $sformatf("tan %f with cos 0: %h", deg, oper_result));
        end else begin
          real q, es, ec, tol;
          q = real'($signed(sin_fx)) / real'($signed(cos_fx));
          exp_r   = ieee_of_real(q, rm, fo, fu);
          trunc_r = ieee_of_real(q, 2'd0, fo, fu);
          ex_inx  = 1'b1;
          es = $sin(deg * 3.14159265358979 / 180.0);
          ec = $cos(deg * 3.14159265358979 / 180.0);
          tol = 8.0 / 2048 * (1.0 / ec + (es < 0 ? -es : es) / (ec * ec));
          check(oper_result === exp_r && !invalid && !div_by_0 && near(real_of_ieee(oper_result), es / ec, tol),
                $sformatf("tan %f rm %0d: %h, expected %h (%f)", deg, rm, oper_result, exp_r, es / ec));
        end
      end
      default: begin
        deg = ra;
        trunc_r = oper_result;
        exp_r = oper_result;
        if (out_of_range(deg)) begin
          n_range++;
          check(invalid && oper_result === 32'h7FC00000 && cos_result === 32'h7FC00000,
                $sformatf("trig out of range %f: %h %h inv %b", deg, oper_result, cos_result, invalid));
        end else begin
          real es, ec;
          es = $sin(deg * 3.14159265358979 / 180.0);
          ec = $cos(deg * 3.14159265358979 / 180.0);
          ex_inx = 1'b1;
          check(!invalid && near(real_of_ieee(oper_result), es, 8.0 / 2048) &&
                near(real_of_ieee(cos_result), ec, 8.0 / 2048) &&
                near(real'($signed(sin_fx)) / 2048.0, es, 8.0 / 2048) &&
                near(real'($signed(cos_fx)) / 2048.0, ec, 8.0 / 2048),
                $sformatf("trig %f: sin %h cos %h, expected %f %f", deg, oper_result, cos_result, es, ec));
        end
      end
    endcase
    if (exp_r != trunc_r) n_round_up[rm]++;
    check(inexact === ex_inx, $sformatf("op %0d %h %h: inexact %b, expected %b", op, a, b, inexact, ex_inx));
    if (ex_inx) n_inexact++;
    else        n_exact++;
  endtask

  initial begin
    int cyc;
    op1_int = 0; op1_frac = 0; op2_int = 0; op2_frac = 0;
    fpu_op = 0; rmode = 0; shift_dir = 0; shift_val = 0;
    repeat (3) @(posedge clk);
    rst = 0;

    // worked examples
    run(32'h02A350E0, 32'hFFFC00FF, 0, 0, 4'd0, 2'd0, 0, 0, cyc);
    check(op1_ieee === 32'h4C28D438, $sformatf("conversion example: %h", op1_ieee));
    run(5, 0, 4, 0, 4'd0, 2'd0, 0, 0, cyc);
    check(oper_result === 32'h41100000, $sformatf("5+4: %h", oper_result));
    run(195, 0, 50, 0, 4'd1, 2'd0, 0, 0, cyc);
    check(oper_result === 32'h43110000, $sformatf("195-50: %h", oper_result));
    run(65, 0, 165, 0, 4'd2, 2'd0, 0, 0, cyc);
    check(oper_result === 32'h46279400, $sformatf("65*165: %h", oper_result));
    run(50, 0, 5, 0, 4'd3, 2'd0, 0, 0, cyc);
    check(oper_result === 32'h41200000, $sformatf("50/5: %h", oper_result));
    run(100, 0, 0, 0, 4'd4, 2'd0, 0, 5, cyc);
    check(oper_result === 32'd3, $sformatf("100>>5: %h", oper_result));
    run(4761, 0, 0, 0, 4'd5, 2'd0, 0, 0, cyc);
    check(oper_result === 32'h428A0000, $sformatf("sqrt(4761): %h", oper_result));
    run(30, 0, 0, 0, 4'd6, 2'd0, 0, 0, cyc);
    check(near(real_of_ieee(oper_result), 0.5, 8.0 / 2048), $sformatf("sin 30: %h", oper_result));
    run(45, 0, 0, 0, 4'd7, 2'd0, 0, 0, cyc);
    check(near(real_of_ieee(oper_result), 1.0, 8.0 / 2048), $sformatf("tan 45: %h", oper_result));

    // directed special cases
    op_test(7, 0, 0, 0, 4'd3, 2'd0, 0, 0);                      // x/0
    op_test(32'h80000007, 0, 0, 0, 4'd3, 2'd1, 0, 0);           // -x/0
    op_test(0, 0, 0, 0, 4'd3, 2'd0, 0, 0);                      // 0/0
    op_test(32'h80000010, 0, 0, 0, 4'd5, 2'd0, 0, 0);           // sqrt(-16)
    op_test(120, 0, 0, 0, 4'd6, 2'd0, 0, 0);                    // sin 120
    op_test(32'h80000000 | 200, 0, 0, 0, 4'd6, 2'd0, 0, 0);     // sin -200
    op_test(12, 32'h80000000, 12, 32'h80000000, 4'd1, 2'd3, 0, 0); // exact zero
    op_test(32'h80000000 | 95, 0, 0, 0, 4'd7, 2'd0, 0, 0);      // tan -95
    op_test(90, 0, 0, 0, 4'd7, 2'd1, 0, 0);                     // tan 90

    // random operations
    for (int t = 0; t < 6000; t++) begin
      logic [31:0] i1, f1, i2, f2;
      logic [3:0] op;
      rand_operand(i1, f1);
      rand_operand(i2, f2);
      op = 4'($urandom % 8);
      if ((op == 3 || op == 5) && ($urandom % 4 != 0)) op = 4'($urandom % 3);
      if (op >= 6) begin
        i1 = {1'($urandom), 31'($urandom % 100)};
      end
      if (op == 5 && $urandom % 3 != 0) i1[31] = 0;
      // close operands for subtraction cancellation
      if (op <= 1 && $urandom % 4 == 0) begin i2 = i1; f2 = f1 ^ (32'($urandom) >> ($urandom % 32)); end
      op_test(i1, f1, i2, f2, op, 2'($urandom), 1'($urandom), 5'($urandom));
    end

    $display("mechanisms: add %0d sub %0d mul %0d div %0d shift %0d sqrt %0d trig %0d tan %0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6], n_op[7]);
    $display("mechanisms: carry_norm %0d cancel %0d swap %0d exact_zero %0d zero_int_part %0d",
             n_carry_norm, n_cancel, n_swap, n_exact_zero, n_zero_int);
    $display("mechanisms: div_by_0 %0d zero_div_zero %0d sqrt_neg %0d trig_range %0d busy_start_ignored %0d",
             n_div0, n_zero_div, n_sqrt_neg, n_range, n_busy_ignored);
    $display("mechanisms: round_up trunc %0d nearest %0d +inf %0d -inf %0d",
             n_round_up[0], n_round_up[1], n_round_up[2], n_round_up[3]);
    for (int k = 0; k < 8; k++) check(n_op[k] > 0, $sformatf("op %0d never exercised", k));
    check(n_carry_norm > 0 && n_cancel > 0 && n_swap > 0 && n_exact_zero > 0 && n_zero_int > 0,
          "an add/sub mechanism was never exercised");
    $display("mechanisms: inexact %0d exact %0d", n_inexact, n_exact);
    check(n_inexact > 0 && n_exact > 0, "inexact flag coverage");
    check(n_div0 > 0 && n_zero_div > 0 && n_sqrt_neg > 0 && n_range > 0 && n_busy_ignored > 0,
          "an exception mechanism was never exercised");
    check(n_round_up[1] > 0 && n_round_up[2] > 0 && n_round_up[3] > 0 && n_round_up[0] == 0,
          "rounding mechanism coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
