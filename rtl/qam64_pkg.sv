// qam64_pkg: types and constants shared by the 64-QAM modulator.
//
// Number format: every analogue quantity of the modulator is an integer in
// which 256 stands for 1 V (the amplitude levels 0.25/0.5/0.75/1 V become
// 64/128/192/256, and the carrier swings between -256 and +256). One carrier
// period is 256 samples, addressed by an 8-bit phase. Both numbers follow the
// 2^8 resolution used for the modulator; the signed widths that hold them are
// this design's choice, since +256 does not fit in 8 bits.
//
// SINE_TABLE holds round(256 * sin(2*pi*k/256)), k = 0..255 (round half up),
// computed at elaboration time. The cosine carrier reads the same table a
// quarter period (64 entries) further on.
package qam64_pkg;

  localparam int unsigned PHASE_BITS = 8;                  // 256 samples per carrier period
  localparam int unsigned N_SAMPLES  = 1 << PHASE_BITS;
  localparam int unsigned QUARTER    = N_SAMPLES / 4;      // 90 degrees in samples
  localparam int          FULL_SCALE = 256;                // 1 V
  localparam int          LEVEL_STEP = 64;                 // 0.25 V
  localparam int unsigned SCALE_SHIFT = 8;                 // divide by FULL_SCALE

  localparam int unsigned SYMBOL_BITS = 6;                 // 2^6 = 64 symbols
  localparam int unsigned HALF_BITS   = SYMBOL_BITS / 2;   // 3 bits per quadrature branch

  typedef logic [PHASE_BITS-1:0]  phase_t;
  typedef logic [SYMBOL_BITS-1:0] symbol_t;
  typedef logic [HALF_BITS-1:0]   half_t;     // {amplitude[1:0], shift}

  typedef logic signed [9:0]  level_t;        // -256..+256
  typedef logic signed [9:0]  carrier_t;      // -256..+256
  typedef logic signed [19:0] product_t;      // level * carrier, -65536..+65536
  typedef logic signed [10:0] qam_t;          // (prod_c + prod_s) / 256, -512..+512

  // Constellation point of one symbol: cosine (in-phase, x) and sine (y) level.
  typedef struct packed {
    level_t x;
    level_t y;
  } point_t;

  typedef carrier_t sine_table_t [N_SAMPLES];

  function automatic sine_table_t build_sine_table();
    sine_table_t t;
    for (int k = 0; k < int'(N_SAMPLES); k++) begin
      t[k] = carrier_t'($rtoi($floor(real'(FULL_SCALE) *
                 $sin(2.0 * 3.14159265358979323846 * real'(k) / real'(N_SAMPLES)) + 0.5)));
    end
    return t;
  endfunction

  localparam sine_table_t SINE_TABLE = build_sine_table();

endpackage
