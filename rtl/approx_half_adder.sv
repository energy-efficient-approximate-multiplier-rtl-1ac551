// approx_half_adder: approximate half adder.
// The XOR of an exact half adder is replaced by an OR: sum = x1 | x2,
// carry = x1 & x2. Only the input 1,1 is wrong (sum 1 instead of 0, so the
// pair counts as 3 instead of 2). Purely combinational, no timing of its own.
// Both equations are those of the design; nothing here is a local choice.
module approx_half_adder (
  input  logic x1,
  input  logic x2,
  output logic sum,
  output logic carry
);
  assign sum   = x1 | x2;
  assign carry = x1 & x2;
endmodule
