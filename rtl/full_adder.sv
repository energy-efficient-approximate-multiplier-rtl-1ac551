// full_adder: exact one-bit full adder (3:2 counter).
// sum = x1 ^ x2 ^ x3, carry = majority(x1, x2, x3). Purely combinational.
module full_adder (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  output logic sum,
  output logic carry
);
  assign sum   = x1 ^ x2 ^ x3;
  assign carry = (x1 & x2) | (x1 & x3) | (x2 & x3);
endmodule
