// tb_partial_product_gen: checks every partial-product bit of an 8x8
// partial_product_gen, pp[i][j] == a[j] & b[i], for all 65536 operand pairs,
// and that the weighted sum of the matrix equals a * b. Clock-paced, with a
// watchdog.
module tb_partial_product_gen;
  localparam int unsigned N = 8;
  logic clk = 1'b0;
  logic [N-1:0]        a, b;
  logic [N-1:0][N-1:0] pp;
  int   checks = 0, failures = 0;

  partial_product_gen #(.N(N)) dut (.a(a), .b(b), .pp(pp));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*N-1:0] total;
    int bad;
    for (int v = 0; v < (1 << (2 * N)); v++) begin
      @(negedge clk);
      {a, b} = v[2*N-1:0];
      @(posedge clk);
      bad   = 0;
      total = '0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          if (pp[i][j] != (a[j] & b[i])) bad++;
          if (pp[i][j]) total += (2*N)'(1) << (i + j);
        end
      checks++;
      if (bad != 0 || total != (2*N)'(a) * (2*N)'(b)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d: %0d wrong bits, sum %0d", a, b, bad, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
