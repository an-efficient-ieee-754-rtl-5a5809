// tb_cordic: checks the 12-step integer CORDIC. For angles across
// -90..+90 degrees (scaled by 2048) the outputs must be within 6/2048 of
// 2048*sin and 2048*cos computed with $sin/$cos, and done must come ITER+1
// clocks after the start clock (13, counting the start clock).
module tb_cordic;
  logic clk = 0, rst = 1, start = 0;
  logic signed [19:0] angle;
  logic signed [15:0] s, c;
  logic busy, done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cordic dut (.clk(clk), .rst(rst), .start(start), .angle(angle), .sin_out(s), .cos_out(c), .busy(busy), .done(done));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int deg2048);
    int cyc;
    real rad, es, ec;
    @(negedge clk);
    angle = 20'(deg2048); start = 1;
    @(posedge clk); @(negedge clk);
    start = 0; cyc = 1;
    while (!done) begin
      @(posedge clk); @(negedge clk);
      cyc++;
    end
    rad = real'(deg2048) / 2048.0 * 3.14159265358979 / 180.0;
    es = 2048.0 * $sin(rad);
    ec = 2048.0 * $cos(rad);
    checks++;
    if (real'(s) - es > 6.0 || es - real'(s) > 6.0 || real'(c) - ec > 6.0 || ec - real'(c) > 6.0) begin
      failures++;
      $display("FAIL angle %0d/2048: sin %0d (%f) cos %0d (%f)", deg2048, s, es, c, ec);
    end
    checks++;
    if (cyc != 13) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    run(30 * 2048);
    run(0);
    run(90 * 2048);
    run(-90 * 2048);
    run(45 * 2048);
    for (int t = 0; t < 500; t++) run(int'($urandom % (180 * 2048 + 1)) - 90 * 2048);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
