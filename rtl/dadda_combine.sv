// dadda_combine: merges four H x H sub-products into the 2H x 2H product.
//
// With operands split into halves, a*b = y11 + ((y12 + y21) << H) + (y22 << 2H)
// where y11 = a_lo*b_lo, y12 = a_lo*b_hi, y21 = a_hi*b_lo, y22 = a_hi*b_hi,
// each N = 2H bits wide. The low H product bits are y11's low half. Above them
// the remaining 3H bits are  y11_hi + y12 + y21 + (y22 << H):
//   1. a carry-save row of N full adders turns y11_hi, y12 and y21 into a sum
//      word s_1 and a carry word c_1;
//   2. a ripple-carry adder over positions 1 .. 3H-1 adds s_1 and c_1 << 1
//      (position 0 holds only s_1[0]); its per-position carries are c_2
//      (3H-1 bits, c_2[k] is the carry out of position k+1);
//   3. a ripple-carry adder of N bits adds y22 at position H.
// The split into y11..y22, the carry-save row s_1 / c_1 and the ripple adder
// with its carries c_2 (width and values) follow the design description.
// Step 3 is this design's own: the description does not show how y22 is
// added. Neither adder can overflow (the 3H-bit result is below 2^(3H)), so
// their carry outs are always 0 and are left unused.
//
// Interface: N-bit sub-products in, 2N-bit product out; s_1, c_1 and c_2 are
// brought out for observation. Purely combinational; the critical path is one
// full adder, a (3H-1)-bit ripple and an N-bit ripple.
module dadda_combine #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]     y11,
  input  logic [N-1:0]     y12,
  input  logic [N-1:0]     y21,
  input  logic [N-1:0]     y22,
  output logic [2*N-1:0]   y,
  output logic [N-1:0]     s_1,
  output logic [N-1:0]     c_1,
  output logic [3*N/2-2:0] c_2
);
  localparam int unsigned H = N / 2;

  logic [3*H-2:0] rca_a, rca_b, mid;   // positions 1 .. 3H-1
  logic [N-1:0]   top, top_carry;      // positions H .. 3H-1 after adding y22
  logic           mid_cout, top_cout;

  // Carry-save row: y11_hi + y12 + y21 = s_1 + 2*c_1.
  carry_save_adder #(.W(N)) u_csa (
    .x({{H{1'b0}}, y11[N-1:H]}), .y(y12), .z(y21), .s(s_1), .c(c_1)
  );

  // s_1 + 2*c_1 over positions 1 .. 3H-1.
  assign rca_a = {{H{1'b0}}, s_1[N-1:1]};
  assign rca_b = {{(H-1){1'b0}}, c_1};
  ripple_carry_adder #(.W(3*H-1)) u_cpa (
    .a(rca_a), .b(rca_b), .sum(mid), .cout(mid_cout), .carry(c_2)
  );

  // Add y22 at position H (index H-1 of mid, which starts at position 1).
  ripple_carry_adder #(.W(N)) u_cpa_y22 (
    .a(mid[3*H-2:H-1]), .b(y22), .sum(top), .cout(top_cout), .carry(top_carry)
  );

  assign y = {top, mid[H-2:0], s_1[0], y11[H-1:0]};
endmodule
