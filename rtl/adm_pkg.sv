// adm_pkg: types and constants shared by the approximate Dadda multipliers and
// the mean filter built on them.
//
// mult_variant_e picks which 6x6 approximate Dadda multiplier the 12-bit
// truncated multiplier is assembled from:
//   MULT_ADMAA  - original partial products, first reduction stage built from
//                 approximate half/full adders (the energy-efficient variant)
//   MULT_ADMAPP - partial products altered into propagate/generate terms
// INV9_Q12 is 1/9 written with 12 fractional bits: 0.000111000111b = 455.
package adm_pkg;

  typedef enum logic [0:0] {
    MULT_ADMAA  = 1'b0,
    MULT_ADMAPP = 1'b1
  } mult_variant_e;

  localparam int unsigned PIX_W    = 8;   // bits per pixel
  localparam int unsigned WIN_N    = 9;   // pixels in a 3x3 window
  localparam int unsigned SUM_W    = 12;  // width of the window sum
  localparam logic [11:0] INV9_Q12 = 12'd455;

endpackage
