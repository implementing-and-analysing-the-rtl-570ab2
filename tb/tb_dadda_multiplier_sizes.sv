// tb_dadda_multiplier_sizes: checks that the top, dadda_multiplier, builds
// and multiplies correctly at its two smaller sizes, N = 8 (a single Dadda
// tree) and N = 16, against a * b computed in the testbench: exhaustive for
// N = 8, random for N = 16, with each size's example from the design.
// Clock-paced, with a watchdog.
module tb_dadda_multiplier_sizes;
  logic clk = 1'b0;
  logic [7:0]  a8, b8;
  logic [15:0] y8, a16, b16;
  logic [31:0] y16;
  int   checks = 0, failures = 0;

  dadda_multiplier #(.N(8))  dut8  (.a(a8),  .b(b8),  .y(y8));
  dadda_multiplier #(.N(16)) dut16 (.a(a16), .b(b16), .y(y16));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      @(negedge clk);
      {a8, b8} = v[15:0];
      a16 = (v == 0) ? 16'd117 : 16'($urandom);
      b16 = (v == 0) ? 16'd23  : 16'($urandom);
      @(posedge clk);
      checks += 2;
      if (y8 != 16'(a8) * 16'(b8)) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 %0d * %0d -> %0d", a8, b8, y8);
      end
      if (y16 != 32'(a16) * 32'(b16)) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 %0d * %0d -> %0d", a16, b16, y16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
