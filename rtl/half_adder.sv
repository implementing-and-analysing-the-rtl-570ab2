// half_adder: one-bit half adder, sum = a ^ b, cout = a & b.
// The basic 2:1 counter of the Dadda reduction tree; it lowers a column by
// one bit and sends a carry to the next column. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b;
  assign cout = a & b;
endmodule
