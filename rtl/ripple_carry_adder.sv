// ripple_carry_adder: stage 3 of the Dadda multiplier, the final
// carry-propagate addition of the two rows left by the reduction tree.
//
// A chain of one half adder (position 0, no carry in) and W-1 full adders.
// carry[k] is the carry out of position k, so carry[W-1] equals cout; it is
// brought out because it is the per-position carry vector of the design
// (c5 in the 8x8 multiplier). Purely combinational; the delay grows linearly
// with W. The adder type is this design's choice: a ripple chain is the
// simplest adder that yields such a per-position carry vector.
module ripple_carry_adder #(
  parameter int unsigned W = 14
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout,
  output logic [W-1:0] carry
);
  half_adder u_ha0 (.a(a[0]), .b(b[0]), .sum(sum[0]), .cout(carry[0]));
  for (genvar k = 1; k < W; k++) begin : g_fa
    full_adder u_fa (.a(a[k]), .b(b[k]), .cin(carry[k-1]), .sum(sum[k]), .cout(carry[k]));
  end
  assign cout = carry[W-1];
endmodule
