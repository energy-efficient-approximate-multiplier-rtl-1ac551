// half_adder: exact one-bit half adder, sum = x1 ^ x2, carry = x1 & x2.
// Purely combinational. Used wherever the multipliers reduce two bits exactly.
module half_adder (
  input  logic x1,
  input  logic x2,
  output logic sum,
  output logic carry
);
  assign sum   = x1 ^ x2;
  assign carry = x1 & x2;
endmodule
