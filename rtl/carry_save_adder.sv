// carry_save_adder: a row of W independent full adders that turns three
// W-bit words into a sum word s and a carry word c with x + y + z = s + 2*c.
// No carry travels along the row, so its delay is one full adder whatever W.
// The wide multipliers use it to merge their four sub-products (s_1, c_1).
// Purely combinational.
module carry_save_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c   // weight one position higher than s
);
  for (genvar k = 0; k < W; k++) begin : g_fa
    full_adder u_fa (.a(x[k]), .b(y[k]), .cin(z[k]), .sum(s[k]), .cout(c[k]));
  end
endmodule
