// dadda_multiplier: unsigned N x N Dadda multiplier, y = a * b, for the three
// sizes of the design: N = 8, 16 or 32 (default 32).
//
//   N = 8 : dadda_mult_8x8, a single Dadda tree (AND partial products,
//           reduction to heights 6, 4, 3, 2, ripple-carry final adder);
//   N = 16: dadda_mult_16x16, four 8x8 trees merged by a carry-save row and
//           ripple-carry adders;
//   N = 32: dadda_mult_32x32, four 16x16 multipliers merged the same way.
//
// Purely combinational: no clock, no registers; the product is valid one
// propagation delay after the operands change. Any other N fails elaboration.
module dadda_multiplier #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] y
);
  if (N == 8) begin : g_8
    dadda_mult_8x8 u_mult (.a(a), .b(b), .y(y));
  end else if (N == 16) begin : g_16
    dadda_mult_16x16 u_mult (.a(a), .b(b), .y(y), .s_1(), .c_1(), .c_2());
  end else if (N == 32) begin : g_32
    dadda_mult_32x32 u_mult (.a(a), .b(b), .y(y), .s_1(), .c_1(), .c_2());
  end else begin : g_bad_size
    $error("dadda_multiplier: N must be 8, 16 or 32");
  end
endmodule
