// tb_nrd_divider: checks the non-restoring divider against / and %.
// Plain 24-bit divisions (a_init = 0, including the design's 50 / 5 = 10,
// remainder 0) and 48-bit dividends with a_init < divisor are run, and the
// latency from the start clock to done is checked: 3 cycles for each of the
// 24 iterations plus the load and correction cycles (74, counting the start clock).
module tb_nrd_divider;
  logic clk = 0, rst = 1, start = 0;
  logic [23:0] a_init, q_init, divisor, quotient, remainder;
  logic busy, done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  nrd_divider dut (.clk(clk), .rst(rst), .start(start), .a_init(a_init), .q_init(q_init),
    .divisor(divisor), .quotient(quotient), .remainder(remainder), .busy(busy), .done(done));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [23:0] hi, logic [23:0] lo, logic [23:0] m);
    logic [47:0] n;
    int cyc;
    @(negedge clk);
    a_init = hi; q_init = lo; divisor = m; start = 1;
    @(posedge clk);
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(posedge clk); @(negedge clk);
      cyc++;
    end
    n = {hi, lo};
    checks++;
    if (quotient !== 24'(n / 48'(m)) || remainder !== 24'(n % 48'(m))) begin
      failures++;
      $display("FAIL %h / %h = %h r %h", n, m, quotient, remainder);
    end
    checks++;
    if (cyc != 3 * 24 + 2) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    run(24'd0, 24'd50, 24'd5);
    run(24'd0, 24'hFFFFFF, 24'd1);
    run(24'd0, 24'd7, 24'd9);
    for (int t = 0; t < 300; t++) begin
      logic [23:0] m, hi;
      m = 24'($urandom) | 24'd1;
      if (t % 2) begin
        m[23] = 1'b1;
        hi = 24'($urandom) % m;
      end else hi = 0;
      run(hi, 24'($urandom), m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
