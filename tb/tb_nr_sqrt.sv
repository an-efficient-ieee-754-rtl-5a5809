// tb_nr_sqrt: checks the non-restoring square root at its default size
// (16-bit root of a 32-bit radicand) against an integer model: root^2 <= D
// < (root+1)^2 and remainder = D - root^2. Includes the design's example
// sqrt(4761) = 69 and checks the latency: 3 cycles per root bit plus load
// and correction cycles (50, counting the start clock).
module tb_nr_sqrt;
  logic clk = 0, rst = 1, start = 0;
  logic [31:0] d;
  logic [15:0] root;
  logic [16:0] rem;
  logic busy, done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  nr_sqrt dut (.clk(clk), .rst(rst), .start(start), .radicand(d), .root(root),
    .remainder(rem), .busy(busy), .done(done));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [31:0] v);
    longint r;
    int cyc;
    @(negedge clk);
    d = v; start = 1;
    @(posedge clk); @(negedge clk);
    start = 0; cyc = 1;
    while (!done) begin
      @(posedge clk); @(negedge clk);
      cyc++;
    end
    r = longint'(root);
    checks++;
    if (r * r > longint'(v) || (r + 1) * (r + 1) <= longint'(v) || longint'(rem) != longint'(v) - r * r) begin
      failures++;
      $display("FAIL sqrt(%0d) = %0d rem %0d", v, root, rem);
    end
    checks++;
    if (cyc != 3 * 16 + 2) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    run(32'd4761);
    checks++;
    if (root !== 16'd69) begin failures++; $display("FAIL example"); end
    run(32'd0); run(32'd1); run(32'd2); run(32'hFFFFFFFF); run(32'hFFFE0001);
    for (int t = 0; t < 400; t++) run($urandom >> ($urandom % 32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
