// tb_half_adder: exhaustive self-check of half_adder over all four input
// pairs against a + b computed in the testbench. A free-running clock paces
// the vectors; a watchdog ends the run with a failure if it hangs.
module tb_half_adder;
  logic clk = 1'b0;
  logic a, b, sum, cout;
  int   checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      @(negedge clk);
      {a, b} = v[1:0];
      @(posedge clk);
      checks++;
      if ({cout, sum} != 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> cout=%0b sum=%0b", a, b, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
