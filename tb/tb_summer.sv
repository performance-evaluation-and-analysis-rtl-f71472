// tb_summer: random branch products within the modulator's range. Checks that
// the registered output is floor((a + b) / 256) one cycle later, that valid
// follows the enable and that the output holds while the enable is low.
module tb_summer;
  import qam64_pkg::*;

  logic     clk = 0, rst_n = 0, en = 0;
  product_t a = '0, b = '0;
  qam_t     q;
  logic     v;
  int       checks = 0, failures = 0;
  int       expected = 0;

  summer dut (.clk(clk), .rst_n(rst_n), .en_i(en), .cos_prod_i(a), .sin_prod_i(b),
              .qam_o(q), .valid_o(v));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ai, bi;
    logic en_prev;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      ai = $urandom_range(0, 131072) - 65536;
      bi = $urandom_range(0, 131072) - 65536;
      if (c < 4) begin ai = (c[0] ? -65536 : 65536); bi = ai; end
      a  = product_t'(ai);
      b  = product_t'(bi);
      en = ($urandom_range(0, 4) != 0);
      en_prev = en;
      if (en) expected = int'($floor(real'(ai + bi) / 256.0));
      @(posedge clk);
      #1;
      checks += 2;
      if (v != en_prev) begin
        failures++;
        $display("FAIL valid=%0b en=%0b", v, en_prev);
      end
      if (int'(q) != expected) begin
        failures++;
        $display("FAIL %0d + %0d -> %0d expected %0d", ai, bi, q, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
