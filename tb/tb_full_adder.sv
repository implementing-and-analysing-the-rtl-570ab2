// tb_full_adder: exhaustive self-check of full_adder over all eight input
// combinations against a + b + cin computed in the testbench. A free-running
// clock paces the vectors; a watchdog ends a hung run with a failure.
module tb_full_adder;
  logic clk = 1'b0;
  logic a, b, cin, sum, cout;
  int   checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      @(negedge clk);
      {a, b, cin} = v[2:0];
      @(posedge clk);
      checks++;
      if ({cout, sum} != 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b -> cout=%0b sum=%0b", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
