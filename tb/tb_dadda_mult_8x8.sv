// tb_dadda_mult_8x8: exhaustive self-check of the 8x8 Dadda multiplier.
// First the worked example 10101011 x 01111001 = 0101000011010011, then all
// 65536 operand pairs against a * b computed in the testbench. For the
// worked example it also compares the adder outputs of every reduction stage
// (s1/c1 .. s4/c4) and the final adder's carries (c5) with the values the
// design documents for that example. Counts the
// products whose top bit comes from the final adder's carry out, and fails if
// that never happens. Clock-paced, with a watchdog.
module tb_dadda_mult_8x8;
  logic clk = 1'b0;
  logic [7:0]  a, b;
  logic [15:0] y;
  int   checks = 0, failures = 0;
  int   msb_carries = 0;

  dadda_mult_8x8 dut (.a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [7:0] x, input logic [7:0] z);
    @(negedge clk);
    a = x;
    b = z;
    @(posedge clk);
    checks++;
    if (y[15]) msb_carries++;
    if (y != 16'(x) * 16'(z)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d -> %0d", x, z, y);
    end
  endtask

  initial begin
    apply(8'b10101011, 8'b01111001);
    checks++;
    if (y != 16'b0101000011010011) begin
      failures++;
      $display("FAIL worked example: %b", y);
    end
    // Internal values printed for the worked example, index 0 first
    // (s1[0:5] = 011111 means s1[0] = 0). Stored here as [n-1:0] literals.
    checks++;
    if (dut.u_tree.s1 != 6'b111110) begin
      failures++;
      $display("FAIL example s1 = %b", dut.u_tree.s1);
    end
    checks++;
    if (dut.u_tree.c1 != 6'b000001) begin
      failures++;
      $display("FAIL example c1 = %b", dut.u_tree.c1);
    end
    checks++;
    if (dut.u_tree.s2 != 14'b10011001101000) begin
      failures++;
      $display("FAIL example s2 = %b", dut.u_tree.s2);
    end
    checks++;
    if (dut.u_tree.c2 != 14'b01000010100011) begin
      failures++;
      $display("FAIL example c2 = %b", dut.u_tree.c2);
    end
    checks++;
    if (dut.u_tree.s3 != 10'b1000110101) begin
      failures++;
      $display("FAIL example s3 = %b", dut.u_tree.s3);
    end
    checks++;
    if (dut.u_tree.c3 != 10'b0101001000) begin
      failures++;
      $display("FAIL example c3 = %b", dut.u_tree.c3);
    end
    checks++;
    if (dut.u_tree.s4 != 12'b101111100000) begin
      failures++;
      $display("FAIL example s4 = %b", dut.u_tree.s4);
    end
    checks++;
    if (dut.u_tree.c4 != 12'b010000101010) begin
      failures++;
      $display("FAIL example c4 = %b", dut.u_tree.c4);
    end
    checks++;
    if (dut.c5 != 14'b01011110000000) begin
      failures++;
      $display("FAIL example c5 = %b", dut.c5);
    end
    for (int v = 0; v < 65536; v++) apply(v[15:8], v[7:0]);
    if (msb_carries == 0) begin
      failures++;
      $display("FAIL: product bit 15 never set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
