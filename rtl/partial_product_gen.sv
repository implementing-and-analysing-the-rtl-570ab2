// partial_product_gen: stage 1 of the Dadda multiplier.
//
// Forms the N x N matrix of partial-product bits with AND gates:
// pp[i][j] = a[j] & b[i], which has weight 2^(i+j). Row i is operand A when
// bit i of B is 1 and all zeros otherwise, exactly as in pencil-and-paper
// binary multiplication. Purely combinational; N*N AND gates.
module partial_product_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  output logic [N-1:0][N-1:0]  pp   // pp[i][j]: row i (multiplier bit), column j of A
);
  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      assign pp[i][j] = a[j] & b[i];
    end
  end
endmodule
