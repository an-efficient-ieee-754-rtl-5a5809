// tb_barrel_shifter: checks all 64 shift distances and both directions on
// random words against the << and >> operators, plus the design's printed
// example (100 shifted right by 5 gives 3).
module tb_barrel_shifter;
  logic [31:0] op, result;
  logic        direction;
  logic [4:0]  shift_val;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  barrel_shifter dut (.op(op), .direction(direction), .shift_val(shift_val), .result(result));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = 32'd100; direction = 1'b0; shift_val = 5'b00101; #1;
    checks++;
    if (result !== 32'd3) begin failures++; $display("FAIL example %0d", result); end
    for (int t = 0; t < 4000; t++) begin
      logic [31:0] e;
      op = $urandom; direction = 1'($urandom); shift_val = 5'(t % 32); #1;
      e = direction ? op << shift_val : op >> shift_val;
      checks++;
      if (result !== e) begin
        failures++;
        $display("FAIL op=%h dir=%0d sh=%0d got %h exp %h", op, direction, shift_val, result, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
