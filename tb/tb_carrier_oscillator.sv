// tb_carrier_oscillator: runs the oscillator for several periods with a
// randomly gated enable. Checks that the phase advances only when enabled,
// that each sample is within half an LSB of 256*sin(2*pi*phase/256), and that
// period_end comes exactly once every 256 enabled cycles.
module tb_carrier_oscillator;
  import qam64_pkg::*;

  logic     clk = 0, rst_n = 0, en = 0;
  phase_t   phase;
  carrier_t s;
  logic     pend;
  int       checks = 0, failures = 0;
  int       m_phase = 0, enabled_since_end = 0, periods = 0;

  carrier_oscillator dut (.clk(clk), .rst_n(rst_n), .en_i(en), .phase_o(phase),
                          .sin_o(s), .period_end_o(pend));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ideal;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 1800; c++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      #1;
      checks += 3;
      if (int'(phase) != m_phase) begin
        failures++;
        $display("FAIL phase %0d expected %0d", phase, m_phase);
      end
      ideal = 256.0 * $sin(2.0 * 3.14159265358979 * real'(m_phase) / 256.0);
      if (real'(s) - ideal > 0.5001 || ideal - real'(s) > 0.5001) begin
        failures++;
        $display("FAIL sin at phase %0d = %0d, ideal %f", m_phase, s, ideal);
      end
      if (pend != (en && m_phase == 255)) begin
        failures++;
        $display("FAIL period_end=%0b at phase %0d en=%0b", pend, m_phase, en);
      end
      if (en) begin
        enabled_since_end++;
        if (m_phase == 255) begin
          checks++;
          if (enabled_since_end != 256) begin
            failures++;
            $display("FAIL period of %0d enabled cycles", enabled_since_end);
          end
          enabled_since_end = 0;
          periods++;
        end
        m_phase = (m_phase + 1) % 256;
      end
    end
    checks++;
    if (periods < 4) begin
      failures++;
      $display("FAIL only %0d periods seen", periods);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
