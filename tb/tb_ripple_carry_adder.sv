// tb_ripple_carry_adder: self-check of the 14-bit ripple_carry_adder (the
// final adder of the 8x8 multiplier). Corner cases (zeros, all ones, a carry
// rippling through every position) and random pairs are compared with
// a + b computed in the testbench; the per-position carry vector is compared
// with the carry out of each prefix sum. Clock-paced, with a watchdog.
module tb_ripple_carry_adder;
  localparam int unsigned W = 14;
  logic clk = 1'b0;
  logic [W-1:0] a, b, sum, carry;
  logic         cout;
  int   checks = 0, failures = 0;
  int   full_ripples = 0;

  ripple_carry_adder #(.W(W)) dut (.a(a), .b(b), .sum(sum), .cout(cout), .carry(carry));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W:0]   ref_sum;
    logic [W-1:0] ref_carry;
    @(negedge clk);
    a = x;
    b = y;
    @(posedge clk);
    ref_sum = (W+1)'(x) + (W+1)'(y);
    for (int k = 0; k < W; k++) begin
      logic [W:0] m;
      m = ((W+1)'(1) << (k + 1)) - 1;
      ref_carry[k] = ((((W+1)'(x) & m) + ((W+1)'(y) & m)) >> (k + 1)) != 0;
    end
    if (&carry) full_ripples++;
    checks++;
    if ({cout, sum} != ref_sum || carry != ref_carry) begin
      failures++;
      if (failures < 10)
        $display("FAIL %0d + %0d -> %0d carry=%b (want %0d, %b)", x, y, {cout, sum}, carry, ref_sum, ref_carry);
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, '0);
    apply('1, '1);
    apply('1, W'(1));
    apply(W'(1), '1);
    for (int n = 0; n < 10000; n++) apply(W'($urandom), W'($urandom));
    if (full_ripples == 0) begin
      failures++;
      $display("FAIL: no carry rippled through all positions");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
