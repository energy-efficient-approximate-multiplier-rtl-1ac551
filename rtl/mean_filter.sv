// mean_filter: 3x3 mean filter datapath built on the truncated approximate
// 12-bit Dadda multiplier. This is the top of the design.
//
// The nine 8-bit pixels of a window, a1..a9, are summed by a chain of exact
// adders (s1 = a1 + a2, s2 = s1 + a3, ..., s8 = s7 + a9); the 12-bit sum is then
// multiplied by 455, which is 1/9 with 12 fractional bits (0.000111000111b).
// Only the integer part of the product matters, and of it only the 8 bits a
// pixel needs, so the multiplier (adm12_trunc) produces just product bits 19:12.
// Because 455/4096 is slightly below 1/9 the exact datapath already rounds
// down (a window of all 255 gives 254); the approximate multiplier adds its
// own small error on top (ADMAA: 254 for that window, ADMAPP: 253).
//
// VARIANT selects the sub-multipliers; its default, MULT_ADMAA, is the variant
// the design puts forward as the energy-efficient one.
//
// Interface: pix[0..8] = a1..a9 -> sum (12 bits, s8) and ymean (8 bits).
// Purely combinational, as in the design: the window source and any pipeline
// registers belong to the surrounding system.
module mean_filter
  import adm_pkg::*;
#(
  parameter mult_variant_e VARIANT = MULT_ADMAA
) (
  input  logic [WIN_N-1:0][PIX_W-1:0] pix,
  output logic [SUM_W-1:0]            sum,
  output logic [PIX_W-1:0]            ymean
);
  // running sums s1..s8 of the adder chain; chain[k] = a1 + ... + a(k+1)
  logic [WIN_N-1:0][SUM_W-1:0] chain;
  assign chain[0] = SUM_W'(pix[0]);
  for (genvar k = 1; k < WIN_N; k++) begin : g_chain
    assign chain[k] = chain[k-1] + SUM_W'(pix[k]);
  end
  assign sum = chain[WIN_N-1];

  adm12_trunc #(.VARIANT(VARIANT)) u_mul (
    .a    (sum),
    .b    (INV9_Q12),
    .p_hi (ymean)
  );

endmodule
