// tb_dadda_combine: self-check of dadda_combine for N = 16 and N = 32. The
// testbench draws random half-width operands, computes the four sub-products
// itself, and checks the merged product against the full product and
// s_1 / c_1 against the bitwise sum and majority of y11_hi, y12 and y21.
// Also replays the sub-products of the 16x16 example (117 * 23) and of the
// 32x32 example (0x0003945B * 12058), including the documented s_1, c_1
// and ripple carries c_2 of both. Clock-paced, with a watchdog.
module tb_dadda_combine;
  logic clk = 1'b0;
  logic [15:0] p11, p12, p21, p22;
  logic [31:0] q11, q12, q21, q22;
  logic [31:0] py, ps1, pc1;
  logic [22:0] pc2;
  logic [63:0] qy;
  logic [31:0] qs1, qc1;
  logic [46:0] qc2;
  int   checks = 0, failures = 0;

  dadda_combine #(.N(16)) dut16 (.y11(p11), .y12(p12), .y21(p21), .y22(p22),
                                 .y(py), .s_1(ps1[15:0]), .c_1(pc1[15:0]), .c_2(pc2));
  dadda_combine #(.N(32)) dut32 (.y11(q11), .y12(q12), .y21(q21), .y22(q22),
                                 .y(qy), .s_1(qs1), .c_1(qc1), .c_2(qc2));
  assign ps1[31:16] = '0;
  assign pc1[31:16] = '0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // c_2[k]: carry out of position k+1 when s_1 and c_1 << 1 are added.
  function automatic logic [46:0] ripple_carries32(input logic [31:0] s, input logic [31:0] c);
    logic [46:0] r;
    for (int k = 0; k < 47; k++) begin
      logic [49:0] m;
      m = (50'(1) << (k + 2)) - 1;
      r[k] = (((50'(s) & m) + ((50'(c) << 1) & m)) >> (k + 2)) != 0;
    end
    return r;
  endfunction

  task automatic apply16(input logic [15:0] a, input logic [15:0] b);
    @(negedge clk);
    p11 = 16'(a[7:0]) * 16'(b[7:0]);
    p12 = 16'(a[7:0]) * 16'(b[15:8]);
    p21 = 16'(a[15:8]) * 16'(b[7:0]);
    p22 = 16'(a[15:8]) * 16'(b[15:8]);
    @(posedge clk);
    checks++;
    if (py != 32'(a) * 32'(b) ||
        ps1[15:0] != ({8'h0, p11[15:8]} ^ p12 ^ p21) ||
        pc1[15:0] != (({8'h0, p11[15:8]} & p12) | ({8'h0, p11[15:8]} & p21) | (p12 & p21))) begin
      failures++;
      if (failures < 10) $display("FAIL16 %0d * %0d -> %0d", a, b, py);
    end
  endtask

  task automatic apply32(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] hi;
    @(negedge clk);
    q11 = 32'(a[15:0]) * 32'(b[15:0]);
    q12 = 32'(a[15:0]) * 32'(b[31:16]);
    q21 = 32'(a[31:16]) * 32'(b[15:0]);
    q22 = 32'(a[31:16]) * 32'(b[31:16]);
    hi  = {16'h0, q11[31:16]};
    @(posedge clk);
    checks++;
    checks++;
    if (qc2 != ripple_carries32(qs1, qc1)) begin
      failures++;
      if (failures < 10) $display("FAIL32 c_2 %h", qc2);
    end
    if (qy != 64'(a) * 64'(b) || qs1 != (hi ^ q12 ^ q21) ||
        qc1 != ((hi & q12) | (hi & q21) | (q12 & q21))) begin
      failures++;
      if (failures < 10) $display("FAIL32 %0d * %0d -> %0d", a, b, qy);
    end
  endtask

  initial begin
    apply16(16'd117, 16'd23);
    checks++;
    if (p11 != 16'b0000101010000011 || ps1[15:0] != 16'b0000000000001010 || pc1[15:0] != 16'h0 || pc2 != '0) begin
      failures++;
      $display("FAIL 16x16 example: y11=%b s_1=%b c_1=%b", p11, ps1[15:0], pc1[15:0]);
    end
    apply32(32'h0003945B, 32'd12058);
    checks++;
    if (q11 != 32'b00011011010010111100011000111110 || q21 != 32'h00008D4E ||
        qs1 != 32'h00009605 || qc1 != 32'h0000094A || qc2 != 47'h0B02) begin
      failures++;
      $display("FAIL 32x32 example: y11=%h y21=%h s_1=%h c_1=%h c_2=%h", q11, q21, qs1, qc1, qc2);
    end
    apply16('1, '1);
    apply32('1, '1);
    for (int n = 0; n < 5000; n++) begin
      apply16(16'($urandom), 16'($urandom));
      apply32($urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
