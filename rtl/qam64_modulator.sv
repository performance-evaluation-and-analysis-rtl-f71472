// qam64_modulator: 64-QAM modulator with a 256-sample digital carrier.
//
// A 6-bit symbol B5..B0 is split in two. B5 B4 B3 select the level of the
// cosine (in-phase) carrier and B2 B1 B0 the level of the sine (quadrature)
// carrier: the first two bits of each half pick 1, 0.75, 0.5 or 0.25 V and the
// third bit a 180 degree shift. The two scaled carriers are added:
//
//   qam(k) = ( x * cos(2*pi*k/256) + y * sin(2*pi*k/256) )      k = 0..255
//
// Datapath (all values with 256 = 1 V):
//   symbol -> constellation_mapper (two 3 to 8 level converters) -> x, y
//   carrier_oscillator -> sin;  phase_shift_90 -> cos
//   mixer (x * cos), mixer (y * sin) -> summer -> qam_o (registered)
//
// Symbol timing: one symbol lasts one carrier period, 256 enabled cycles,
// and symbols change only at period boundaries (when the phase wraps to 0).
// The symbol comes either from the internal symbol_counter (sweep_i = 1),
// which walks through 000000..111111, or from symbol_i (sweep_i = 0), which is
// sampled in the last cycle of each period. sweep_i is also sampled there, so
// a mode switch takes effect at the next period. After reset the first period
// carries symbol 0 in both modes; in sweep mode the symbols then follow
// 1, 2, 3, ... (the counter steps at every period end, in either mode).
//
// Ports:
//   en_i            sample enable; the whole design advances only when high
//   sweep_i         1: internal counter is the symbol source, 0: symbol_i
//   symbol_i        external symbol
//   symbol_o        symbol of the current sample; phase_o its carrier phase
//   point_o         constellation point (x, y) of symbol_o
//   qam_o, qam_valid_o  output sample, one cycle after the sample it belongs
//                   to (qam_o at cycle t+1 belongs to symbol_o/phase_o at t)
//   symbol_start_o  high while phase_o = 0 (first sample of a symbol)
//
// The split of the symbol, the levels and the block structure follow the
// modulator description; number widths, the table-based carrier, the symbol
// period of one carrier cycle, the enable and the source selection are this
// design's choices.
module qam64_modulator
  import qam64_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en_i,
  input  logic    sweep_i,
  input  symbol_t symbol_i,
  output symbol_t symbol_o,
  output phase_t  phase_o,
  output point_t  point_o,
  output logic    symbol_start_o,
  output qam_t    qam_o,
  output logic    qam_valid_o
);

  phase_t   phase;
  carrier_t sin_c, cos_c;
  logic     period_end;
  symbol_t  count;
  logic     count_wrap;
  symbol_t  ext_q;
  logic     sweep_q;
  symbol_t  symbol;
  point_t   point;
  product_t cos_prod, sin_prod;

  carrier_oscillator u_osc (
    .clk          (clk),
    .rst_n        (rst_n),
    .en_i         (en_i),
    .phase_o      (phase),
    .sin_o        (sin_c),
    .period_end_o (period_end)
  );

  phase_shift_90 u_shift (
    .phase_i (phase),
    .cos_o   (cos_c)
  );

  symbol_counter #(.WIDTH(SYMBOL_BITS)) u_count (
    .clk     (clk),
    .rst_n   (rst_n),
    .step_i  (period_end),
    .count_o (count),
    .wrap_o  (count_wrap)
  );

  // Symbol input register and source selection, updated at period ends.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ext_q   <= '0;
      sweep_q <= 1'b0;
    end else if (period_end) begin
      ext_q   <= symbol_i;
      sweep_q <= sweep_i;
    end
  end

  assign symbol = sweep_q ? count : ext_q;

  constellation_mapper u_map (
    .symbol_i (symbol),
    .point_o  (point)
  );

  mixer u_mix_cos (
    .level_i   (point.x),
    .carrier_i (cos_c),
    .product_o (cos_prod)
  );

  mixer u_mix_sin (
    .level_i   (point.y),
    .carrier_i (sin_c),
    .product_o (sin_prod)
  );

  summer u_sum (
    .clk        (clk),
    .rst_n      (rst_n),
    .en_i       (en_i),
    .cos_prod_i (cos_prod),
    .sin_prod_i (sin_prod),
    .qam_o      (qam_o),
    .valid_o    (qam_valid_o)
  );

  assign symbol_o       = symbol;
  assign phase_o        = phase;
  assign point_o        = point;
  assign symbol_start_o = (phase == '0);

  // count_wrap marks the end of a full constellation sweep; it is used only
  // by the assertion below.
  property p_wrap_at_period_end;
    @(posedge clk) disable iff (!rst_n) count_wrap |-> period_end;
  endproperty
  a_wrap_at_period_end: assert property (p_wrap_at_period_end);

endmodule
