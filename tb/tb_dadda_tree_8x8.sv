// tb_dadda_tree_8x8: exhaustive self-check of the 8x8 Dadda reduction tree.
// For all 65536 operand pairs the testbench forms the partial products
// itself (pp[i][j] = a[j] & b[i]), drives the tree and checks that the two
// rows it leaves add up to a * b and that column 0 of the second row is
// empty. Clock-paced, with a watchdog.
module tb_dadda_tree_8x8;
  logic clk = 1'b0;
  logic [7:0][7:0] pp;
  logic [14:0]     row_a, row_b;
  int   checks = 0, failures = 0;

  dadda_tree_8x8 dut (.pp(pp), .row_a(row_a), .row_b(row_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] a, b;
    for (int v = 0; v < 65536; v++) begin
      {a, b} = v[15:0];
      @(negedge clk);
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) pp[i][j] = a[j] & b[i];
      @(posedge clk);
      checks++;
      if (16'(row_a) + 16'(row_b) != 16'(a) * 16'(b) || row_b[0] != 1'b0) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d: rows %0d + %0d", a, b, row_a, row_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
