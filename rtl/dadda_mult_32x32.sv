// dadda_mult_32x32: unsigned 32 x 32 multiplier, y = a * b, built from four
// 16 x 16 multipliers (dadda_mult_16x16).
//
// Each operand is split into a low and a high 16-bit half. The four
// sub-products y11 = a_lo*b_lo, y12 = a_lo*b_hi, y21 = a_hi*b_lo and
// y22 = a_hi*b_hi are formed in parallel and merged by dadda_combine (a
// carry-save row and two ripple-carry adders). The signal names y11, y12, y21,
// y22, s_1, c_1 and c_2 and their widths follow the design description.
// Purely combinational; the internal signals s_1, c_1 and c_2 are brought out
// for observation.
module dadda_mult_32x32 (
  input  logic [31:0]  a,
  input  logic [31:0]  b,
  output logic [63:0]  y,
  output logic [31:0]  s_1,
  output logic [31:0]  c_1,
  output logic [46:0]  c_2
);
  logic [31:0] y11, y12, y21, y22;

  dadda_mult_16x16 u_m11 (.a(a[15:0]),  .b(b[15:0]),  .y(y11), .s_1(), .c_1(), .c_2());
  dadda_mult_16x16 u_m12 (.a(a[15:0]),  .b(b[31:16]), .y(y12), .s_1(), .c_1(), .c_2());
  dadda_mult_16x16 u_m21 (.a(a[31:16]), .b(b[15:0]),  .y(y21), .s_1(), .c_1(), .c_2());
  dadda_mult_16x16 u_m22 (.a(a[31:16]), .b(b[31:16]), .y(y22), .s_1(), .c_1(), .c_2());

  dadda_combine #(.N(32)) u_combine (
    .y11(y11), .y12(y12), .y21(y21), .y22(y22),
    .y(y), .s_1(s_1), .c_1(c_1), .c_2(c_2)
  );
endmodule
