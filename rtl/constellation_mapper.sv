// constellation_mapper: turns a 6-bit symbol B5..B0 into its constellation
// point (x, y).
//
// The symbol is split into its three MSBs B5 B4 B3, which drive the cosine
// (in-phase) branch, and its three LSBs B2 B1 B0, which drive the sine
// (quadrature) branch. Each half goes through a 3 to 8 level converter; B3 and
// B0 are the 180 degree shift bits. For example 101110 gives x = -0.5 V
// (B5B4 = 10, B3 = 1) and y = +0.25 V (B2B1 = 11, B0 = 0).
//
// Purely combinational. Output levels use 256 = 1 V.
module constellation_mapper
  import qam64_pkg::*;
(
  input  symbol_t symbol_i,
  output point_t  point_o
);

  level_converter u_cos_level (
    .bits_i  (symbol_i[SYMBOL_BITS-1 -: HALF_BITS]),
    .level_o (point_o.x)
  );

  level_converter u_sin_level (
    .bits_i  (symbol_i[HALF_BITS-1:0]),
    .level_o (point_o.y)
  );

endmodule
