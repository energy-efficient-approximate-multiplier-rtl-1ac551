// admaa_mul6: 6x6 unsigned approximate Dadda multiplier built from the original
// AND-array partial products and approximate adders (the ADMAA sub-multiplier).
//
// pp[i][j] = a[i] & b[j] has weight 2^(i+j). The 36 partial products are
// reduced in three Dadda stages (column heights 6 -> 4 -> 3 -> 2) and a final
// carry-propagate adder:
//   stage 1 - six approximate full adders and three approximate half adders
//             on columns 2..7 (approx_full_adder / approx_half_adder);
//   stage 2 - exact half/full adders on columns 1..8;
//   stage 3 - exact half/full adders on columns 2..9;
//   final   - exact 11-bit addition of the two remaining rows.
// The bit-to-adder assignment of every stage follows the design's dot diagram.
// Which stages use approximate cells is not spelled out by the design; making
// stage 1 approximate and the rest exact is this implementation's reading, the
// one that reproduces the design's published filter result for a window of
// all-255 pixels (mean 254).
//
// Interface: a, b (6 bits) -> p (12 bits). Purely combinational.
// Error: exact for 2670 of the 4096 input pairs; mean |error| 19.4.
module admaa_mul6 (
  input  logic [5:0]  a,
  input  logic [5:0]  b,
  output logic [11:0] p
);
  logic [5:0][5:0] pp;   // pp[i][j] = a[i] & b[j]
  always_comb
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 6; j++)
        pp[i][j] = a[i] & b[j];

  // ---- stage 1: approximate cells (f = full adder, h = half adder) ----
  logic sf1, cf1, sf2, cf2, sf3, cf3, sf4, cf4, sf5, cf5, sf6, cf6;
  logic sh1, ch1, sh2, ch2, sh3, ch3;
  approx_half_adder u_h1 (.x1(pp[2][0]), .x2(pp[0][2]),                  .sum(sh1), .carry(ch1)); // col 2
  approx_full_adder u_f1 (.x1(pp[3][0]), .x2(pp[0][3]), .x3(pp[2][1]),   .sum(sf1), .carry(cf1)); // col 3
  approx_full_adder u_f2 (.x1(pp[4][0]), .x2(pp[0][4]), .x3(pp[3][1]),   .sum(sf2), .carry(cf2)); // col 4
  approx_half_adder u_h2 (.x1(pp[1][3]), .x2(pp[2][2]),                  .sum(sh2), .carry(ch2)); // col 4
  approx_full_adder u_f3 (.x1(pp[5][0]), .x2(pp[0][5]), .x3(pp[4][1]),   .sum(sf3), .carry(cf3)); // col 5
  approx_full_adder u_f4 (.x1(pp[1][4]), .x2(pp[3][2]), .x3(pp[2][3]),   .sum(sf4), .carry(cf4)); // col 5
  approx_full_adder u_f5 (.x1(pp[5][1]), .x2(pp[1][5]), .x3(pp[4][2]),   .sum(sf5), .carry(cf5)); // col 6
  approx_half_adder u_h3 (.x1(pp[2][4]), .x2(pp[3][3]),                  .sum(sh3), .carry(ch3)); // col 6
  approx_full_adder u_f6 (.x1(pp[5][2]), .x2(pp[2][5]), .x3(pp[4][3]),   .sum(sf6), .carry(cf6)); // col 7

  // ---- stage 2: exact cells ----
  logic s1, c1, s2, c2, s3, c3, s4, c4, s5, c5, s6, c6, s7, c7, s8, c8;
  half_adder u_s1 (.x1(pp[1][0]), .x2(pp[0][1]),                .sum(s1), .carry(c1)); // col 1
  half_adder u_s2 (.x1(sh1),      .x2(pp[1][1]),                .sum(s2), .carry(c2)); // col 2
  full_adder u_s3 (.x1(sf1),      .x2(ch1),      .x3(pp[1][2]), .sum(s3), .carry(c3)); // col 3
  full_adder u_s4 (.x1(sf2),      .x2(sh2),      .x3(cf1),      .sum(s4), .carry(c4)); // col 4
  full_adder u_s5 (.x1(sf3),      .x2(sf4),      .x3(cf2),      .sum(s5), .carry(c5)); // col 5
  full_adder u_s6 (.x1(sf5),      .x2(sh3),      .x3(cf3),      .sum(s6), .carry(c6)); // col 6
  full_adder u_s7 (.x1(sf6),      .x2(cf5),      .x3(ch3),      .sum(s7), .carry(c7)); // col 7
  full_adder u_s8 (.x1(pp[5][3]), .x2(pp[3][5]), .x3(pp[4][4]), .sum(s8), .carry(c8)); // col 8

  // ---- stage 3: exact cells, leaving rows X and Y ----
  logic [10:0] x_row, y_row;
  half_adder u_x2 (.x1(s2),       .x2(c1),                 .sum(x_row[2]), .carry(y_row[3]));
  half_adder u_x3 (.x1(s3),       .x2(c2),                 .sum(x_row[3]), .carry(y_row[4]));
  half_adder u_x4 (.x1(s4),       .x2(c3),                 .sum(x_row[4]), .carry(y_row[5]));
  full_adder u_x5 (.x1(s5),       .x2(c4),       .x3(ch2), .sum(x_row[5]), .carry(y_row[6]));
  full_adder u_x6 (.x1(s6),       .x2(c5),       .x3(cf4), .sum(x_row[6]), .carry(y_row[7]));
  full_adder u_x7 (.x1(s7),       .x2(c6),       .x3(pp[3][4]), .sum(x_row[7]), .carry(y_row[8]));
  full_adder u_x8 (.x1(s8),       .x2(c7),       .x3(cf6), .sum(x_row[8]), .carry(y_row[9]));
  full_adder u_x9 (.x1(pp[5][4]), .x2(pp[4][5]), .x3(c8),  .sum(x_row[9]), .carry(y_row[10]));
  assign x_row[0]    = pp[0][0];
  assign x_row[1]    = s1;
  assign x_row[10]   = pp[5][5];
  assign y_row[2:0]  = '0;

  // ---- final carry-propagate adder ----
  assign p = {1'b0, x_row} + {1'b0, y_row};

endmodule
