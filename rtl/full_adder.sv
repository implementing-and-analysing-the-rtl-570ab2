// full_adder: one-bit full adder (3:2 counter), sum = a ^ b ^ cin and
// cout = majority(a, b, cin). In the Dadda tree it lowers a column by two bits
// and sends one carry to the next column; it is also the cell of the
// carry-save rows and of the ripple-carry adder. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b ^ cin;
  assign cout = (a & b) | (a & cin) | (b & cin);
endmodule
