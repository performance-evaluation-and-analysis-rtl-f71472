// carrier_oscillator: digital carrier oscillator producing sin(wc t).
//
// An 8-bit phase counter advances by one on every enabled clock and addresses
// a 256-entry sine table, so one carrier period spans 256 enabled cycles
// (the 256 time samples per period of the modulator). The table holds
// round(256 * sin(2*pi*k/256)) and is built at elaboration (qam64_pkg).
//
// Timing: phase_o is a register; sin_o is read combinationally from it, so
// both describe the same sample. period_end_o is high in the cycle that holds
// the last sample of a period (phase 255) while en_i is high, i.e. the next
// edge starts a new period. Reset (active-low, synchronous) sets phase 0.
// The phase counter and table are this design's choice: the modulator only
// asks for a carrier reference sampled 256 times per period.
module carrier_oscillator
  import qam64_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en_i,
  output phase_t   phase_o,
  output carrier_t sin_o,
  output logic     period_end_o
);

  phase_t phase_q;

  always_ff @(posedge clk) begin
    if (!rst_n)    phase_q <= '0;
    else if (en_i) phase_q <= phase_q + 1'b1;
  end

  assign phase_o      = phase_q;
  assign sin_o        = SINE_TABLE[phase_q];
  assign period_end_o = en_i && (phase_q == phase_t'(N_SAMPLES - 1));

endmodule
