// tb_mixer: every amplitude level (+-64..+-256) against every carrier value
// from -256 to +256; the product must be exact.
module tb_mixer;
  import qam64_pkg::*;

  level_t   lvl;
  carrier_t car;
  product_t prod;
  int       checks = 0, failures = 0;

  mixer dut (.level_i(lvl), .carrier_i(car), .product_o(prod));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 1; m <= 4; m++) begin
      for (int sgn = 0; sgn < 2; sgn++) begin
        for (int cv = -256; cv <= 256; cv++) begin
          int l;
          l = sgn ? -64 * m : 64 * m;
          lvl = level_t'(l);
          car = carrier_t'(cv);
          #1;
          checks++;
          if (int'(prod) != l * cv) begin
            failures++;
            if (failures < 10) $display("FAIL %0d * %0d = %0d", l, cv, prod);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
