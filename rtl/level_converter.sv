// level_converter: the "3 to 8 level converter" of one quadrature branch.
//
// Three bits {a1, a0, s} select one of eight signed amplitudes. The two
// amplitude bits a1 a0 choose the level: 00 -> 1 V, 01 -> 0.75 V,
// 10 -> 0.5 V, 11 -> 0.25 V. The shift bit s selects a 180 degree shifted
// wave, which for a multiplying modulator is the negated level. This mapping
// is the one of the modulator's bit table; levels are in the package's
// format (256 = 1 V), so the outputs are +-256, +-192, +-128 and +-64.
//
// Purely combinational: level_o follows bits_i in the same cycle.
module level_converter
  import qam64_pkg::*;
(
  input  half_t  bits_i,   // {amplitude[1:0], shift}
  output level_t level_o
);

  level_t magnitude;

  always_comb begin
    // (4 - a) * 0.25 V for amplitude code a
    magnitude = level_t'((4 - int'(bits_i[2:1])) * LEVEL_STEP);
    level_o   = bits_i[0] ? -magnitude : magnitude;
  end

endmodule
