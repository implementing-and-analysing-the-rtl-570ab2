// dadda_tree_8x8: stage 2 of the 8x8 Dadda multiplier, the height reduction.
//
// The 64 partial-product bits form 15 columns of heights 1,2,...,8,...,2,1.
// Four stages of half and full adders lower the tallest column to the Dadda
// heights 6, 4, 3 and 2 in turn. Within a stage, columns are visited from the
// least significant up; a column is touched only when its height (counting the
// carries that this stage already pushed into it) exceeds the target: it gets
// a half adder when one bit too tall, otherwise full adders. Every sum stays in
// its column and every carry moves one column up, into the next stage.
// The stages use 6, 14, 10 and 12 adders (35 full, 7 half); the adder outputs
// are named s1/c1 ... s4/c4 by stage, indexed in the order the adders are
// placed. Which bits of a column an adder takes does not change the product;
// the assignment used here (stages 1 and 2 take the highest rows of a column
// first, stages 3 and 4 the lowest; partial products, then carries, then sums
// in each column's order) reproduces the documented internal values
// s1..s4 / c1..c4 of the example 10101011 x 01111001.
//
// Interface: pp[i][j] = a[j] & b[i] (weight i+j). The result is two rows,
// row_a and row_b, over columns 0..14 whose sum equals the sum of all
// partial products; column 15 is empty. Purely combinational, depth of
// at most four adder levels.
module dadda_tree_8x8
  import dadda_pkg::*;
(
  input  logic [7:0][7:0] pp,
  output logic [14:0]     row_a,
  output logic [14:0]     row_b
);
  // The adder network below is written for the four targets 6, 4, 3, 2.
  if (dadda_first_height(8) != 6 || dadda_stages(8) != 4) begin : g_bad_schedule
    $error("dadda_tree_8x8: Dadda schedule for 8x8 is not 6, 4, 3, 2");
  end

  // Stage 1: reduce every column to at most 6 bits (3 full adders, 3 half adders).
  logic [5:0] s1, c1;
  half_adder u_s1_0 (.a(pp[6][0]), .b(pp[5][1]), .sum(s1[0]), .cout(c1[0]));  // column 6
  full_adder u_s1_1 (.a(pp[7][0]), .b(pp[6][1]), .cin(pp[5][2]), .sum(s1[1]), .cout(c1[1]));  // column 7
  half_adder u_s1_2 (.a(pp[4][3]), .b(pp[3][4]), .sum(s1[2]), .cout(c1[2]));  // column 7
  full_adder u_s1_3 (.a(pp[7][1]), .b(pp[6][2]), .cin(pp[5][3]), .sum(s1[3]), .cout(c1[3]));  // column 8
  half_adder u_s1_4 (.a(pp[4][4]), .b(pp[3][5]), .sum(s1[4]), .cout(c1[4]));  // column 8
  full_adder u_s1_5 (.a(pp[7][2]), .b(pp[6][3]), .cin(pp[5][4]), .sum(s1[5]), .cout(c1[5]));  // column 9

  // Stage 2: reduce every column to at most 4 bits (12 full adders, 2 half adders).
  logic [13:0] s2, c2;
  half_adder u_s2_0 (.a(pp[4][0]), .b(pp[3][1]), .sum(s2[0]), .cout(c2[0]));  // column 4
  full_adder u_s2_1 (.a(pp[5][0]), .b(pp[4][1]), .cin(pp[3][2]), .sum(s2[1]), .cout(c2[1]));  // column 5
  half_adder u_s2_2 (.a(pp[2][3]), .b(pp[1][4]), .sum(s2[2]), .cout(c2[2]));  // column 5
  full_adder u_s2_3 (.a(s1[0]), .b(pp[4][2]), .cin(pp[3][3]), .sum(s2[3]), .cout(c2[3]));  // column 6
  full_adder u_s2_4 (.a(pp[2][4]), .b(pp[1][5]), .cin(pp[0][6]), .sum(s2[4]), .cout(c2[4]));  // column 6
  full_adder u_s2_5 (.a(s1[2]), .b(s1[1]), .cin(c1[0]), .sum(s2[5]), .cout(c2[5]));  // column 7
  full_adder u_s2_6 (.a(pp[2][5]), .b(pp[1][6]), .cin(pp[0][7]), .sum(s2[6]), .cout(c2[6]));  // column 7
  full_adder u_s2_7 (.a(s1[4]), .b(s1[3]), .cin(c1[2]), .sum(s2[7]), .cout(c2[7]));  // column 8
  full_adder u_s2_8 (.a(c1[1]), .b(pp[2][6]), .cin(pp[1][7]), .sum(s2[8]), .cout(c2[8]));  // column 8
  full_adder u_s2_9 (.a(s1[5]), .b(c1[4]), .cin(c1[3]), .sum(s2[9]), .cout(c2[9]));  // column 9
  full_adder u_s2_10 (.a(pp[4][5]), .b(pp[3][6]), .cin(pp[2][7]), .sum(s2[10]), .cout(c2[10]));  // column 9
  full_adder u_s2_11 (.a(c1[5]), .b(pp[7][3]), .cin(pp[6][4]), .sum(s2[11]), .cout(c2[11]));  // column 10
  full_adder u_s2_12 (.a(pp[5][5]), .b(pp[4][6]), .cin(pp[3][7]), .sum(s2[12]), .cout(c2[12]));  // column 10
  full_adder u_s2_13 (.a(pp[7][4]), .b(pp[6][5]), .cin(pp[5][6]), .sum(s2[13]), .cout(c2[13]));  // column 11

  // Stage 3: reduce every column to at most 3 bits (9 full adders, 1 half adders).
  logic [9:0] s3, c3;
  half_adder u_s3_0 (.a(pp[0][3]), .b(pp[1][2]), .sum(s3[0]), .cout(c3[0]));  // column 3
  full_adder u_s3_1 (.a(s2[0]), .b(pp[0][4]), .cin(pp[1][3]), .sum(s3[1]), .cout(c3[1]));  // column 4
  full_adder u_s3_2 (.a(c2[0]), .b(s2[1]), .cin(s2[2]), .sum(s3[2]), .cout(c3[2]));  // column 5
  full_adder u_s3_3 (.a(c2[1]), .b(c2[2]), .cin(s2[3]), .sum(s3[3]), .cout(c3[3]));  // column 6
  full_adder u_s3_4 (.a(c2[3]), .b(c2[4]), .cin(s2[5]), .sum(s3[4]), .cout(c3[4]));  // column 7
  full_adder u_s3_5 (.a(c2[5]), .b(c2[6]), .cin(s2[7]), .sum(s3[5]), .cout(c3[5]));  // column 8
  full_adder u_s3_6 (.a(c2[7]), .b(c2[8]), .cin(s2[9]), .sum(s3[6]), .cout(c3[6]));  // column 9
  full_adder u_s3_7 (.a(c2[9]), .b(c2[10]), .cin(s2[11]), .sum(s3[7]), .cout(c3[7]));  // column 10
  full_adder u_s3_8 (.a(c2[11]), .b(c2[12]), .cin(s2[13]), .sum(s3[8]), .cout(c3[8]));  // column 11
  full_adder u_s3_9 (.a(c2[13]), .b(pp[5][7]), .cin(pp[6][6]), .sum(s3[9]), .cout(c3[9]));  // column 12

  // Stage 4: reduce every column to at most 2 bits (11 full adders, 1 half adders).
  logic [11:0] s4, c4;
  half_adder u_s4_0 (.a(pp[0][2]), .b(pp[1][1]), .sum(s4[0]), .cout(c4[0]));  // column 2
  full_adder u_s4_1 (.a(pp[2][1]), .b(pp[3][0]), .cin(s3[0]), .sum(s4[1]), .cout(c4[1]));  // column 3
  full_adder u_s4_2 (.a(pp[2][2]), .b(c3[0]), .cin(s3[1]), .sum(s4[2]), .cout(c4[2]));  // column 4
  full_adder u_s4_3 (.a(pp[0][5]), .b(c3[1]), .cin(s3[2]), .sum(s4[3]), .cout(c4[3]));  // column 5
  full_adder u_s4_4 (.a(s2[4]), .b(c3[2]), .cin(s3[3]), .sum(s4[4]), .cout(c4[4]));  // column 6
  full_adder u_s4_5 (.a(s2[6]), .b(c3[3]), .cin(s3[4]), .sum(s4[5]), .cout(c4[5]));  // column 7
  full_adder u_s4_6 (.a(s2[8]), .b(c3[4]), .cin(s3[5]), .sum(s4[6]), .cout(c4[6]));  // column 8
  full_adder u_s4_7 (.a(s2[10]), .b(c3[5]), .cin(s3[6]), .sum(s4[7]), .cout(c4[7]));  // column 9
  full_adder u_s4_8 (.a(s2[12]), .b(c3[6]), .cin(s3[7]), .sum(s4[8]), .cout(c4[8]));  // column 10
  full_adder u_s4_9 (.a(pp[4][7]), .b(c3[7]), .cin(s3[8]), .sum(s4[9]), .cout(c4[9]));  // column 11
  full_adder u_s4_10 (.a(pp[7][5]), .b(c3[8]), .cin(s3[9]), .sum(s4[10]), .cout(c4[10]));  // column 12
  full_adder u_s4_11 (.a(pp[6][7]), .b(pp[7][6]), .cin(c3[9]), .sum(s4[11]), .cout(c4[11]));  // column 13

  // The two remaining rows; an empty position is a constant 0.
  assign row_a[0] = pp[0][0];  assign row_b[0] = 1'b0;
  assign row_a[1] = pp[0][1];  assign row_b[1] = pp[1][0];
  assign row_a[2] = pp[2][0];  assign row_b[2] = s4[0];
  assign row_a[3] = c4[0];  assign row_b[3] = s4[1];
  assign row_a[4] = c4[1];  assign row_b[4] = s4[2];
  assign row_a[5] = c4[2];  assign row_b[5] = s4[3];
  assign row_a[6] = c4[3];  assign row_b[6] = s4[4];
  assign row_a[7] = c4[4];  assign row_b[7] = s4[5];
  assign row_a[8] = c4[5];  assign row_b[8] = s4[6];
  assign row_a[9] = c4[6];  assign row_b[9] = s4[7];
  assign row_a[10] = c4[7];  assign row_b[10] = s4[8];
  assign row_a[11] = c4[8];  assign row_b[11] = s4[9];
  assign row_a[12] = c4[9];  assign row_b[12] = s4[10];
  assign row_a[13] = c4[10];  assign row_b[13] = s4[11];
  assign row_a[14] = pp[7][7];  assign row_b[14] = c4[11];
endmodule
