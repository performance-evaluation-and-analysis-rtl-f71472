// mixer: multiplier of one quadrature branch. It scales the carrier sample by
// the branch's signed amplitude level.
//
// Both operands use 256 = 1 V, so the full-precision product uses
// 65536 = 1 V^2. The product is kept at full width here and scaled back once,
// after the two branches are added (summer).
//
// Purely combinational (one signed multiplier).
module mixer
  import qam64_pkg::*;
(
  input  level_t   level_i,
  input  carrier_t carrier_i,
  output product_t product_o
);

  assign product_o = product_t'(level_i) * product_t'(carrier_i);

endmodule
