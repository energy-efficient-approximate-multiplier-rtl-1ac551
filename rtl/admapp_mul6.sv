// admapp_mul6: 6x6 unsigned approximate Dadda multiplier with altered partial
// products (the ADMAPP sub-multiplier).
//
// pp[i][j] = a[i] & b[j] has weight 2^(i+j). In columns 3..7 each mirrored
// pair pp[i][j], pp[j][i] is replaced by a propagate term p = pp[i][j] | pp[j][i]
// and a generate term g = pp[i][j] & pp[j][i]; since x + y = (x | y) + (x & y)
// this alteration is exact. The approximation comes after it:
//   stage 1 - the propagate terms of columns 4..7 and the pair pp[5][3],
//             pp[3][5] of column 8 are reduced with approximate half/full
//             adders (sums S1..S5, carries C1..C5); the generate terms of each
//             column 3..7 are merged into one bit G1..G5 by an OR, dropping the
//             carries they would produce (generate terms are 1 only when both
//             bits of a pair are 1, so they are rarely set together);
//   stage 2 - exact full adders (a half adder in column 1) reduce every column
//             to two rows;
//   final   - exact 11-bit carry-propagate addition.
// The grouping of terms into adders follows the design's dot diagram. Two
// points are this implementation's reading: the generate merge is a plain OR,
// and only stage 1 uses approximate cells (the other stages exact), which is
// the combination that reproduces the design's published filter result for a
// window of all-255 pixels (mean 253).
//
// Interface: a, b (6 bits) -> p (12 bits). Purely combinational.
// Error: exact for 2256 of the 4096 input pairs; mean |error| 42.2.
module admapp_mul6 (
  input  logic [5:0]  a,
  input  logic [5:0]  b,
  output logic [11:0] p
);
  logic [5:0][5:0] pp;   // pp[i][j] = a[i] & b[j]
  always_comb
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 6; j++)
        pp[i][j] = a[i] & b[j];

  // propagate / generate of a mirrored pair (i > j)
  function automatic logic prop(input logic [5:0][5:0] t, input int i, input int j);
    return t[i][j] | t[j][i];
  endfunction
  function automatic logic gen(input logic [5:0][5:0] t, input int i, input int j);
    return t[i][j] & t[j][i];
  endfunction

  // ---- stage 1: approximate cells on propagate terms, OR-merged generates ----
  logic S1, C1, S2, C2, S3, C3, S4, C4, S5, C5;
  logic G1, G2, G3, G4, G5;
  approx_half_adder u_a1 (.x1(prop(pp,4,0)), .x2(prop(pp,3,1)),                       .sum(S1), .carry(C1)); // col 4
  approx_full_adder u_a2 (.x1(prop(pp,5,0)), .x2(prop(pp,4,1)), .x3(prop(pp,3,2)),    .sum(S2), .carry(C2)); // col 5
  approx_full_adder u_a3 (.x1(prop(pp,5,1)), .x2(prop(pp,4,2)), .x3(pp[3][3]),        .sum(S3), .carry(C3)); // col 6
  approx_half_adder u_a4 (.x1(prop(pp,5,2)), .x2(prop(pp,4,3)),                       .sum(S4), .carry(C4)); // col 7
  approx_half_adder u_a5 (.x1(pp[5][3]),     .x2(pp[3][5]),                           .sum(S5), .carry(C5)); // col 8

  assign G1 = gen(pp,3,0) | gen(pp,2,1);                  // col 3
  assign G2 = gen(pp,4,0) | gen(pp,3,1);                  // col 4
  assign G3 = gen(pp,5,0) | gen(pp,4,1) | gen(pp,3,2);    // col 5
  assign G4 = gen(pp,5,1) | gen(pp,4,2);                  // col 6
  assign G5 = gen(pp,5,2) | gen(pp,4,3);                  // col 7

  // ---- stage 2: exact cells, leaving rows X and Y ----
  logic [10:0] x_row, y_row;
  half_adder u_x1 (.x1(pp[1][0]),     .x2(pp[0][1]),                        .sum(x_row[1]), .carry(y_row[2]));
  full_adder u_x2 (.x1(pp[2][0]),     .x2(pp[0][2]),     .x3(pp[1][1]),     .sum(x_row[2]), .carry(y_row[3]));
  full_adder u_x3 (.x1(prop(pp,3,0)), .x2(prop(pp,2,1)), .x3(G1),           .sum(x_row[3]), .carry(y_row[4]));
  full_adder u_x4 (.x1(S1),           .x2(pp[2][2]),     .x3(G2),           .sum(x_row[4]), .carry(y_row[5]));
  full_adder u_x5 (.x1(S2),           .x2(G3),           .x3(C1),           .sum(x_row[5]), .carry(y_row[6]));
  full_adder u_x6 (.x1(S3),           .x2(G4),           .x3(C2),           .sum(x_row[6]), .carry(y_row[7]));
  full_adder u_x7 (.x1(S4),           .x2(G5),           .x3(C3),           .sum(x_row[7]), .carry(y_row[8]));
  full_adder u_x8 (.x1(S5),           .x2(pp[4][4]),     .x3(C4),           .sum(x_row[8]), .carry(y_row[9]));
  full_adder u_x9 (.x1(pp[5][4]),     .x2(pp[4][5]),     .x3(C5),           .sum(x_row[9]), .carry(y_row[10]));
  assign x_row[0]   = pp[0][0];
  assign x_row[10]  = pp[5][5];
  assign y_row[1:0] = '0;

  // ---- final carry-propagate adder ----
  assign p = {1'b0, x_row} + {1'b0, y_row};

endmodule
