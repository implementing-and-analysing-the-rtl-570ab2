// dadda_mult_16x16: unsigned 16 x 16 multiplier, y = a * b, built from four
// 8 x 8 multipliers (dadda_mult_8x8).
//
// Each operand is split into a low and a high 8-bit half. The four
// sub-products y11 = a_lo*b_lo, y12 = a_lo*b_hi, y21 = a_hi*b_lo and
// y22 = a_hi*b_hi are formed in parallel and merged by dadda_combine (a
// carry-save row and two ripple-carry adders). The signal names y11, y12, y21,
// y22, s_1, c_1 and c_2 and their widths follow the design description.
// Purely combinational; the internal signals s_1, c_1 and c_2 are brought out
// for observation.
module dadda_mult_16x16 (
  input  logic [15:0]  a,
  input  logic [15:0]  b,
  output logic [31:0]  y,
  output logic [15:0]  s_1,
  output logic [15:0]  c_1,
  output logic [22:0]  c_2
);
  logic [15:0] y11, y12, y21, y22;

  dadda_mult_8x8 u_m11 (.a(a[7:0]),  .b(b[7:0]),  .y(y11));
  dadda_mult_8x8 u_m12 (.a(a[7:0]),  .b(b[15:8]), .y(y12));
  dadda_mult_8x8 u_m21 (.a(a[15:8]), .b(b[7:0]),  .y(y21));
  dadda_mult_8x8 u_m22 (.a(a[15:8]), .b(b[15:8]), .y(y22));

  dadda_combine #(.N(16)) u_combine (
    .y11(y11), .y12(y12), .y21(y21), .y22(y22),
    .y(y), .s_1(s_1), .c_1(c_1), .c_2(c_2)
  );
endmodule
