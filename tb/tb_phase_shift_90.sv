// tb_phase_shift_90: for every one of the 256 phases the output must be
// within half an LSB of 256*cos(2*pi*phase/256), the 90 degree shifted carrier.
module tb_phase_shift_90;
  import qam64_pkg::*;

  phase_t   phase;
  carrier_t c;
  int       checks = 0, failures = 0;

  phase_shift_90 dut (.phase_i(phase), .cos_o(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ideal;
    for (int k = 0; k < 256; k++) begin
      phase = phase_t'(k);
      #1;
      ideal = 256.0 * $cos(2.0 * 3.14159265358979 * real'(k) / 256.0);
      checks++;
      if (real'(c) - ideal > 0.5001 || ideal - real'(c) > 0.5001) begin
        failures++;
        $display("FAIL cos at phase %0d = %0d, ideal %f", k, c, ideal);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
