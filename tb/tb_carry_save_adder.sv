// tb_carry_save_adder: self-check of a 16-bit carry_save_adder. For corner
// and random triples it checks s == x ^ y ^ z, c == majority(x, y, z) and
// x + y + z == s + 2c, all computed in the testbench. Also replays the
// sub-product values of the 32x32 example (s_1 = 0x9605, c_1 = 0x094A from
// y11_hi = 0x1B4B, y12 = 0, y21 = 0x8D4E). Clock-paced, with a watchdog.
module tb_carry_save_adder;
  localparam int unsigned W = 16;
  logic clk = 1'b0;
  logic [W-1:0] x, y, z, s, c;
  int   checks = 0, failures = 0;

  carry_save_adder #(.W(W)) dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] p, input logic [W-1:0] q, input logic [W-1:0] r);
    @(negedge clk);
    x = p;
    y = q;
    z = r;
    @(posedge clk);
    checks++;
    if (s != (p ^ q ^ r) || c != ((p & q) | (p & r) | (q & r)) ||
        (W+2)'(s) + ((W+2)'(c) << 1) != (W+2)'(p) + (W+2)'(q) + (W+2)'(r)) begin
      failures++;
      if (failures < 10) $display("FAIL %h %h %h -> s=%h c=%h", p, q, r, s, c);
    end
  endtask

  initial begin
    apply('0, '0, '0);
    apply('1, '1, '1);
    apply('1, '0, '1);
    apply(16'h1B4B, 16'h0000, 16'h8D4E);
    checks++;
    if (s != 16'h9605 || c != 16'h094A) begin
      failures++;
      $display("FAIL example: s=%h c=%h, want 9605 094a", s, c);
    end
    for (int n = 0; n < 10000; n++) apply(W'($urandom), W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
