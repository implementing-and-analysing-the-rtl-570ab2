// tb_dadda_multiplier: end-to-end self-check of the top, dadda_multiplier,
// at its default size (32 x 32). It runs the three workloads of the design:
// 8x8, 16x16 and 32x32 products (smaller operands zero-extended), each
// starting with the design's own example for that size, then corner cases and
// random pairs, all against a * b computed in the testbench.
// It counts how often each mechanism of the datapath was exercised:
//   - the 8x8 final adder's carry out sets product bit 15 of a leaf,
//   - the first carry-save row produced a carry (c_1 != 0),
//   - the final ripple adder propagated a carry (c_2 != 0),
//   - the high-by-high sub-product y22 was non-zero,
//   - the product used all 64 bits (bit 63 set),
// and counts a failure for any that never happened. Clock-paced, with a
// watchdog.
module tb_dadda_multiplier;
  logic clk = 1'b0;
  logic [31:0] a, b;
  logic [63:0] y;
  int   checks = 0, failures = 0;
  int   n_leaf_msb = 0, n_csa_carry = 0, n_ripple_carry = 0, n_y22 = 0, n_msb = 0;

  dadda_multiplier dut (.a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] x, input logic [31:0] z);
    @(negedge clk);
    a = x;
    b = z;
    @(posedge clk);
    checks++;
    if (dut.g_32.u_mult.u_m11.u_m11.y[15]) n_leaf_msb++;
    if (dut.g_32.u_mult.c_1 != '0) n_csa_carry++;
    if (dut.g_32.u_mult.c_2 != '0) n_ripple_carry++;
    if (x[31:16] != '0 && z[31:16] != '0) n_y22++;
    if (y[63]) n_msb++;
    if (y != 64'(x) * 64'(z)) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h -> %h", x, z, y);
    end
  endtask

  task automatic expect_product(input logic [63:0] want, input string what);
    checks++;
    if (y != want) begin
      failures++;
      $display("FAIL %s: got %b", what, y);
    end
  endtask

  initial begin
    // 8x8 workload.
    apply(32'b10101011, 32'b01111001);
    expect_product(64'b0101000011010011, "8x8 example");
    for (int n = 0; n < 10000; n++) apply(32'($urandom_range(255)), 32'($urandom_range(255)));
    apply(32'hFF, 32'hFF);
    // 16x16 workload.
    apply(32'b0000000001110101, 32'b0000000000010111);
    expect_product(64'd2691, "16x16 example");
    for (int n = 0; n < 10000; n++) apply(32'($urandom_range(65535)), 32'($urandom_range(65535)));
    apply(32'hFFFF, 32'hFFFF);
    // 32x32 workload.
    apply(32'h0003945B, 32'd12058);
    expect_product(64'd2828650046, "32x32 example");
    apply('0, '0);
    apply('1, '1);
    apply('1, 32'd1);
    apply(32'h8000_0000, 32'h8000_0000);
    for (int n = 0; n < 20000; n++) apply($urandom, $urandom);

    $display("mechanisms: leaf carry-out %0d, carry-save carries %0d, ripple carries %0d, y22 used %0d, bit 63 set %0d",
             n_leaf_msb, n_csa_carry, n_ripple_carry, n_y22, n_msb);
    if (n_leaf_msb == 0)     begin failures++; $display("FAIL: leaf carry-out never happened"); end
    if (n_csa_carry == 0)    begin failures++; $display("FAIL: carry-save carry never happened"); end
    if (n_ripple_carry == 0) begin failures++; $display("FAIL: ripple carry never happened"); end
    if (n_y22 == 0)          begin failures++; $display("FAIL: y22 never used"); end
    if (n_msb == 0)          begin failures++; $display("FAIL: bit 63 never set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
