// tb_trig_unit: checks sine and cosine of IEEE-754 angles in degrees. The
// unit's unrounded outputs go through post_normalization; the IEEE results
// must be within 8/2048 of $sin/$cos. Angles beyond +-90 degrees must raise
// range_err. Latency: ITER + 2 = 14 clocks counting the start clock.
module tb_trig_unit;
  import fpu_pkg::*;
  import fp_ref_pkg::*;
  logic clk = 0, rst = 1, start = 0;
  ieee_t a, sin_w, cos_w;
  unrounded_t sin_res, cos_res;
  logic [15:0] sfx, cfx;
  logic err, done, o1, u1, i1, o2, u2, i2;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  trig_unit dut (.clk(clk), .rst(rst), .start(start), .a(a), .sin_res(sin_res), .cos_res(cos_res),
    .sin_fx(sfx), .cos_fx(cfx), .range_err(err), .done(done));
  post_normalization u_pn1 (.u(sin_res), .rmode(RM_TRUNC), .result(sin_w), .overflow(o1), .underflow(u1), .inexact(i1));
  post_normalization u_pn2 (.u(cos_res), .rmode(RM_TRUNC), .result(cos_w), .overflow(o2), .underflow(u2), .inexact(i2));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [31:0] x);
    int cyc;
    real deg, es, ec, gs, gc;
    @(negedge clk);
    a = x; start = 1;
    @(posedge clk); @(negedge clk);
    start = 0; cyc = 1;
    while (!done) begin
      @(posedge clk); @(negedge clk);
      cyc++;
    end
    deg = real_of_ieee(x);
    checks++;
    if (cyc != 14) begin failures++; $display("FAIL latency %0d", cyc); end
    checks++;
    if (deg > 90.0 || deg < -90.0) begin
      if (!err) begin failures++; $display("FAIL no range error for %f", deg); end
    end else begin
      es = $sin(deg * 3.14159265358979 / 180.0);
      ec = $cos(deg * 3.14159265358979 / 180.0);
      gs = real_of_ieee(sin_w); gc = real_of_ieee(cos_w);
      if (err || gs - es > 8.0/2048 || es - gs > 8.0/2048 || gc - ec > 8.0/2048 || ec - gc > 8.0/2048) begin
        failures++;
        $display("FAIL angle %f: sin %f (%f) cos %f (%f)", deg, gs, es, gc, ec);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    run(32'h41F00000);   // 30
    run(32'hC2340000);   // -45
    run(32'h42B40000);   // 90
    run(32'h42C80000);   // 100: out of range
    run(32'h0);
    run(32'h3DCCCCCD);   // 0.1
    for (int t = 0; t < 300; t++) begin
      logic [31:0] x;
      logic fo, fu;
      real d;
      d = real'($urandom % 180000) / 1000.0 - 90.0;
      x = ieee_of_real(d, 2'd0, fo, fu);
      run(x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
