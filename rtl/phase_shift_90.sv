// phase_shift_90: the 90 degree phase shifter that derives cos(wc t) from the
// carrier oscillator.
//
// With a sampled carrier a 90 degree lead is a shift of a quarter period, 64
// of the 256 samples: cos(2*pi*k/256) = sin(2*pi*(k+64)/256). The block adds
// 64 to the oscillator phase (modulo 256) and reads the shared sine table.
//
// Purely combinational: cos_o belongs to the same sample as phase_i.
module phase_shift_90
  import qam64_pkg::*;
(
  input  phase_t   phase_i,
  output carrier_t cos_o
);

  phase_t shifted;

  assign shifted = phase_i + phase_t'(QUARTER);
  assign cos_o   = SINE_TABLE[shifted];

endmodule
