// symbol_counter: free-running symbol source that steps through all 2^WIDTH
// symbol values (000000 to 111111 for the 64-QAM), one step per `step_i`.
//
// It lets the modulator sweep its whole constellation without external data,
// the way the board demonstration of the modulator cycles through all 64
// symbols. A plain binary up-counter that wraps from all-ones to zero; the
// count is registered and changes on the clock edge at which step_i is high.
// Reset (active-low, synchronous) clears it to zero.
//
// Ports: clk, rst_n, step_i (advance), count_o (current symbol),
//        wrap_o (high in the cycle where a step takes the count from
//        all-ones back to zero).
module symbol_counter #(
  parameter int unsigned WIDTH = qam64_pkg::SYMBOL_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step_i,
  output logic [WIDTH-1:0] count_o,
  output logic             wrap_o
);

  logic [WIDTH-1:0] count_q;

  always_ff @(posedge clk) begin
    if (!rst_n)      count_q <= '0;
    else if (step_i) count_q <= count_q + 1'b1;
  end

  assign count_o = count_q;
  assign wrap_o  = step_i && (count_q == {WIDTH{1'b1}});

endmodule
