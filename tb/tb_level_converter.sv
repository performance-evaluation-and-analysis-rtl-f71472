// tb_level_converter: exhaustive check of the 3 to 8 level converter against
// the level table of the modulator (amplitude code 00/01/10/11 -> 1/0.75/
// 0.5/0.25 V, shift bit -> negative level), with 256 = 1 V.
module tb_level_converter;
  import qam64_pkg::*;

  half_t  bits;
  level_t level;
  int     checks = 0, failures = 0;

  // Expected levels in the order 000 .. 111 (Table of levels, 256 = 1 V)
  localparam int EXPECTED [8] = '{256, -256, 192, -192, 128, -128, 64, -64};

  level_converter dut (.bits_i(bits), .level_o(level));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 8; b++) begin
      bits = half_t'(b);
      #1;
      checks++;
      if (int'(level) != EXPECTED[b]) begin
        failures++;
        $display("FAIL bits=%03b level=%0d expected=%0d", bits, level, EXPECTED[b]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
