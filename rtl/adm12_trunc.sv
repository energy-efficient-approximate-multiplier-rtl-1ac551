// adm12_trunc: truncated 12x12 approximate multiplier, returning product bits
// 19:12 only. It is the multiplier of the mean filter, where the product of a
// 12-bit window sum and the 12-bit fraction 1/9 is needed only above the binary
// point, and only its 8 low integer bits.
//
// The operands are split into 6-bit halves (a = {ah, al}, b = {bh, bl}) and the
// product assembled from sub-products as in a divide-and-conquer ("Vedic")
// multiplier:
//   C = ah*bh at weight 2^12, A = al*bh and B = ah*bl at weight 2^6,
//   al*bl (weight 2^0) is not generated at all.
// The three sub-products come from 6x6 approximate Dadda multipliers, chosen
// by VARIANT (admaa_mul6 or admapp_mul6). They are then merged column by column:
//   bits 9..6  : A[3:0], B[3:0] are not considered;
//   bit 10     : A[4] + B[4] (half adder), only its carry is kept;
//   bit 11     : A[5] + B[5] + that carry (full adder), only its carry is kept;
//   bits 12..17: C[k] + A[k+6] + B[k+6] (full adders, sums S0..S5, carries);
//   bits 12..18: one more half adder row adds sums and carries;
//   bits 12..19: an 8-bit carry-propagate adder gives p_hi;
//   bits 20..23: C[11:8] and every carry beyond bit 19 are omitted.
// The column grouping follows the design's dot diagram. The merge adders are
// exact: this implementation's reading, which reproduces the design's
// published filter results (all-255 window: 254 with ADMAA, 253 with ADMAPP).
// The lone "1" the diagram shows in column 12 is read as a label fragment, not
// a constant: adding it would move both results up by one.
//
// Interface: a, b (12 bits) -> p_hi (8 bits) = approx(a*b)[19:12].
// Purely combinational. Values of a*b at or above 2^20 wrap, as in the design.
module adm12_trunc
  import adm_pkg::*;
#(
  parameter mult_variant_e VARIANT = MULT_ADMAA
) (
  input  logic [11:0] a,
  input  logic [11:0] b,
  output logic [7:0]  p_hi
);
  logic [11:0] prod_c, prod_a, prod_b;   // C = ah*bh, A = al*bh, B = ah*bl

  if (VARIANT == MULT_ADMAPP) begin : g_app
    admapp_mul6 u_c (.a(a[11:6]), .b(b[11:6]), .p(prod_c));
    admapp_mul6 u_a (.a(a[5:0]),  .b(b[11:6]), .p(prod_a));
    admapp_mul6 u_b (.a(a[11:6]), .b(b[5:0]),  .p(prod_b));
  end else begin : g_aa
    admaa_mul6  u_c (.a(a[11:6]), .b(b[11:6]), .p(prod_c));
    admaa_mul6  u_a (.a(a[5:0]),  .b(b[11:6]), .p(prod_a));
    admaa_mul6  u_b (.a(a[11:6]), .b(b[5:0]),  .p(prod_b));
  end

  // ---- columns 10 and 11: only the carry into column 12 matters ----
  logic sa1, ca1, sa2, ca2;   // sa1, sa2 lie below the kept bits
  half_adder u_col10 (.x1(prod_a[4]), .x2(prod_b[4]),             .sum(sa1), .carry(ca1));
  full_adder u_col11 (.x1(prod_a[5]), .x2(prod_b[5]), .x3(ca1),   .sum(sa2), .carry(ca2));

  // ---- columns 12..17: C[k] + A[k+6] + B[k+6] ----
  logic [6:0] s_col;   // s_col[k] lies in column 12+k; s_col[6] is C[6] passed on
  logic [5:0] cb;      // cb[k] goes to column 13+k
  for (genvar k = 0; k < 6; k++) begin : g_col
    full_adder u_fa (.x1(prod_c[k]), .x2(prod_a[k+6]), .x3(prod_b[k+6]),
                     .sum(s_col[k]), .carry(cb[k]));
  end
  assign s_col[6] = prod_c[6];

  // ---- second row: columns 12..18 down to X (sums) and Y (carries) ----
  logic [7:0] x_row, y_row;   // bit i of each row has weight 2^(12+i)
  half_adder u_x1 (.x1(s_col[0]), .x2(ca2), .sum(x_row[0]), .carry(y_row[1]));
  for (genvar k = 1; k < 7; k++) begin : g_row2
    half_adder u_ha (.x1(s_col[k]), .x2(cb[k-1]), .sum(x_row[k]), .carry(y_row[k+1]));
  end
  assign x_row[7] = prod_c[7];
  assign y_row[0] = 1'b0;

  // ---- final 8-bit adder; its carry out and C[11:8] are omitted ----
  assign p_hi = x_row + y_row;

endmodule
