// dadda_mult_8x8: unsigned 8 x 8 Dadda multiplier, y = a * b.
//
// Three stages, all combinational:
//   1. partial_product_gen forms the 64 AND-gate partial products;
//   2. dadda_tree_8x8 reduces the columns to heights 6, 4, 3 and finally 2
//      with 35 full and 7 half adders;
//   3. ripple_carry_adder adds the two remaining rows over columns 1..14
//      (14 adder cells: sum s5, carries c5); column 0 holds a single bit and
//      is the product's LSB, the adder's carry out is the product's MSB.
// Cell count: 64 AND + 42 + 14 adders = 120. Stage structure, target heights
// and per-stage adder counts follow the design description; the choice of a
// ripple adder for stage 3 is this design's own.
module dadda_mult_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] y
);
  logic [7:0][7:0] pp;
  logic [14:0]     row_a, row_b;
  logic [13:0]     s5, c5;

  partial_product_gen #(.N(8)) u_pp (.a(a), .b(b), .pp(pp));

  dadda_tree_8x8 u_tree (.pp(pp), .row_a(row_a), .row_b(row_b));

  ripple_carry_adder #(.W(14)) u_cpa (
    .a(row_a[14:1]), .b(row_b[14:1]), .sum(s5), .cout(y[15]), .carry(c5)
  );

  assign y[0]    = row_a[0];
  assign y[14:1] = s5;
endmodule
