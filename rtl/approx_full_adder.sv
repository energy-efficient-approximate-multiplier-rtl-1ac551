// approx_full_adder: approximate full adder made of one OR and one XOR for the
// sum and one OR and one AND for the carry.
// x1 and x2 are first merged by an OR, so the cell treats them as one bit:
//   sum   = (x1 | x2) ^ x3
//   carry = (x1 | x2) & x3
// The sum is wrong for the inputs 1,1,0 and 1,1,1 and the carry for 1,1,0;
// the other six patterns are exact. Purely combinational. Both equations are those of the
// design; nothing here is a local choice.
module approx_full_adder (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  output logic sum,
  output logic carry
);
  logic x12;
  assign x12   = x1 | x2;
  assign sum   = x12 ^ x3;
  assign carry = x12 & x3;
endmodule
