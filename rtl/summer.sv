// summer: adds the cosine and sine branch products into the 64-QAM output
// sample and registers it.
//
// qam = (prod_cos + prod_sin) / 256, where the division is an arithmetic
// shift right by 8 (rounds towards minus infinity). The result is back in the
// 256 = 1 V format and lies between -512 and +512.
//
// Timing: one register stage. On an edge where en_i is high, qam_o takes the
// sum of the current inputs and valid_o goes high; otherwise valid_o is low
// and qam_o holds. Reset (active-low, synchronous) clears both.
module summer
  import qam64_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en_i,
  input  product_t cos_prod_i,
  input  product_t sin_prod_i,
  output qam_t     qam_o,
  output logic     valid_o
);

  logic signed [20:0] sum;
  qam_t               scaled;

  assign sum    = 21'(cos_prod_i) + 21'(sin_prod_i);
  assign scaled = qam_t'(sum >>> SCALE_SHIFT);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      qam_o   <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= en_i;
      if (en_i) qam_o <= scaled;
    end
  end

endmodule
