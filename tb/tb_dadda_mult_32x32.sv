// tb_dadda_mult_32x32: self-check of the 32x32 multiplier built from four
// 16x16 ones. Replays the design's example for this size, corner operands
// and random pairs (full-width ones and ones that fit in half the width),
// comparing y with a * b and s_1 / c_1 with the bitwise sum and majority of
// the upper half of a_lo*b_lo, a_lo*b_hi and a_hi*b_lo, all computed in the
// testbench. Counts how often the carry-save row produced a carry (c_1 != 0)
// and the ripple adder propagated one (c_2 != 0), and fails if either never
// happened. Clock-paced, with a watchdog.
module tb_dadda_mult_32x32;
  localparam int unsigned N = 32;
  localparam int unsigned H = N / 2;
  logic clk = 1'b0;
  logic [N-1:0]     a, b, s_1, c_1;
  logic [2*N-1:0]   y;
  logic [3*H-2:0]   c_2;
  int   checks = 0, failures = 0;
  int   csa_carries = 0, ripple_carries = 0;

  dadda_mult_32x32 dut (.a(a), .b(b), .y(y), .s_1(s_1), .c_1(c_1), .c_2(c_2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] x, input logic [N-1:0] z);
    logic [N-1:0] y11, y12, y21, hi;
    @(negedge clk);
    a = x;
    b = z;
    @(posedge clk);
    y11 = N'(x[H-1:0]) * N'(z[H-1:0]);
    y12 = N'(x[H-1:0]) * N'(z[N-1:H]);
    y21 = N'(x[N-1:H]) * N'(z[H-1:0]);
    hi  = N'(y11[N-1:H]);
    checks++;
    if (c_1 != '0) csa_carries++;
    if (c_2 != '0) ripple_carries++;
    if (y != (2*N)'(x) * (2*N)'(z) || s_1 != (hi ^ y12 ^ y21) ||
        c_1 != ((hi & y12) | (hi & y21) | (y12 & y21))) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h -> %h s_1=%h c_1=%h", x, z, y, s_1, c_1);
    end
  endtask

  initial begin
    // Example of the design description: 0x0003945B * 12058.
    apply(32'b00000000000000111001010001011011, 32'b00000000000000000010111100011010);
    checks++;
    if (y != 64'd2828650046 || s_1 != 32'h00009605 || c_1 != 32'h0000094A || c_2 != 47'h0B02) begin
      failures++;
      $display("FAIL 32x32 example: y=%0d s_1=%h c_1=%h c_2=%h", y, s_1, c_1, c_2);
    end
    apply('0, '0);
    apply('1, '1);
    apply('1, N'(1));
    apply(N'(1), '1);
    for (int n = 0; n < 20000; n++) begin
      apply(N'({$urandom, $urandom}), N'({$urandom, $urandom}));
      apply(N'(H'($urandom)), N'(H'($urandom)));
    end
    if (csa_carries == 0 || ripple_carries == 0) begin
      failures++;
      $display("FAIL: carry-save carries %0d, ripple carries %0d", csa_carries, ripple_carries);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
