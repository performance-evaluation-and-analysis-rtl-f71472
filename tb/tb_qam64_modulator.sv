// tb_qam64_modulator: end-to-end test of the 64-QAM modulator at its default
// size (256 samples per carrier period, 64 symbols).
//
// Phase 1 sweeps the internal counter through all 64 symbols and back to 0.
// Phase 2 switches (mid-period) to external symbols with symbol_i changing
// randomly every cycle, so only the value present at each period end may be
// used. Phase 3 switches back to the sweep. The enable is dropped at random
// throughout. A cycle-level reference model, written from the modulator's
// rules, predicts the symbol, phase, constellation point and output sample
// of every cycle; every output sample is also compared with the ideal
// x*cos + y*sin within 2.5/256 V. Each symbol must last exactly 256 enabled
// cycles. The test counts stalls, counter wraps, both mode switches, the two
// 180 degree shifts and the symbols covered, and fails if any never occurred.
module tb_qam64_modulator;
  import qam64_pkg::*;

  logic    clk = 0, rst_n = 0, en = 0, sweep = 1;
  symbol_t sym_in = '0;
  symbol_t sym_out;
  phase_t  phase;
  point_t  point;
  logic    sstart;
  qam_t    qam;
  logic    qvalid;

  int checks = 0, failures = 0;

  // mechanisms
  int n_stall = 0, n_wrap = 0, n_to_ext = 0, n_to_sweep = 0, n_neg_cos = 0, n_neg_sin = 0;
  bit seen [64];

  qam64_modulator dut (
    .clk(clk), .rst_n(rst_n), .en_i(en), .sweep_i(sweep), .symbol_i(sym_in),
    .symbol_o(sym_out), .phase_o(phase), .point_o(point), .symbol_start_o(sstart),
    .qam_o(qam), .qam_valid_o(qvalid)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model ----
  int m_phase = 0, m_count = 0, m_ext = 0, m_sweep = 0;
  int m_qam = 0, m_valid = 0, run_len = 0;
  real m_ideal = 0.0;
  bit  run_first = 1;

  function automatic int level_of(int three);
    case (three)
      0: return 256;   1: return -256;
      2: return 192;   3: return -192;
      4: return 128;   5: return -128;
      6: return 64;    default: return -64;
    endcase
  endfunction

  function automatic int carrier(int k, bit cosine);
    real a = 2.0 * 3.14159265358979 * real'(k) / 256.0;
    real v = 256.0 * (cosine ? $cos(a) : $sin(a));
    return $rtoi($floor(v + 0.5));
  endfunction

  function automatic int cur_sym();
    return m_sweep ? m_count : m_ext;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  // One clock: inputs are set at the negedge before; compare the model of
  // the current cycle, then advance model and design together.
  task automatic cycle(input bit en_v, input bit sweep_v, input int sym_v);
    int s, x, y, next_qam;
    @(negedge clk);
    en = en_v; sweep = sweep_v; sym_in = symbol_t'(sym_v);
    #1;
    s = cur_sym();
    x = level_of(s >> 3);
    y = level_of(s & 7);
    check(int'(sym_out) == s, $sformatf("symbol %0d expected %0d", sym_out, s));
    check(int'(phase) == m_phase, $sformatf("phase %0d expected %0d", phase, m_phase));
    check(int'(point.x) == x && int'(point.y) == y,
          $sformatf("point (%0d,%0d) expected (%0d,%0d)", point.x, point.y, x, y));
    check(sstart == (m_phase == 0), "symbol_start");
    check(qvalid == m_valid[0], $sformatf("valid %0b expected %0d", qvalid, m_valid));
    if (m_valid != 0) begin
      check(int'(qam) == m_qam, $sformatf("qam %0d expected %0d", qam, m_qam));
      check(real'(qam) - m_ideal < 2.5 && m_ideal - real'(qam) < 2.5,
            $sformatf("qam %0d far from ideal %f", qam, m_ideal));
    end
    if (!en_v) n_stall++;
    if (x < 0) n_neg_cos++;
    if (y < 0) n_neg_sin++;
    // model update at the coming edge
    m_valid = en_v;
    if (en_v) begin
      real a = 2.0 * 3.14159265358979 * real'(m_phase) / 256.0;
      next_qam = $rtoi($floor(real'(x * carrier(m_phase, 1) + y * carrier(m_phase, 0)) / 256.0));
      m_qam    = next_qam;
      m_ideal  = real'(x) * $cos(a) + real'(y) * $sin(a);
      run_len++;
      if (m_phase == 255) begin
        if (m_sweep != 0) seen[s] = 1;
        if (!run_first) check(run_len == 256, $sformatf("symbol lasted %0d samples", run_len));
        run_first = 0;
        run_len   = 0;
        if (m_count == 63) n_wrap++;
        if (m_sweep != 0 && !sweep_v) n_to_ext++;
        if (m_sweep == 0 && sweep_v)  n_to_sweep++;
        m_count = (m_count + 1) % 64;
        m_ext   = sym_v;
        m_sweep = sweep_v;
      end
      m_phase = (m_phase + 1) % 256;
    end
  endtask

  initial begin
    int covered;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // Phase 1: sweep all symbols (period 0 carries symbol 0, then 1..63, 0)
    while (n_wrap == 0 || m_phase < 100)
      cycle($urandom_range(0, 9) != 0, 1'b1, int'($urandom_range(0, 63)));
    // Phase 2: external symbols, switched mid-period
    repeat (20 * 256)
      cycle($urandom_range(0, 9) != 0, 1'b0, int'($urandom_range(0, 63)));
    // Phase 3: back to the sweep
    repeat (3 * 256)
      cycle($urandom_range(0, 9) != 0, 1'b1, int'($urandom_range(0, 63)));
    repeat (2) cycle(1'b0, 1'b1, 0);

    covered = 0;
    foreach (seen[i]) covered += seen[i];
    $display("mechanisms: stalls=%0d counter_wraps=%0d sweep->ext=%0d ext->sweep=%0d neg_cos=%0d neg_sin=%0d symbols_swept=%0d",
             n_stall, n_wrap, n_to_ext, n_to_sweep, n_neg_cos, n_neg_sin, covered);
    check(n_stall > 0,    "no enable stall happened");
    check(n_wrap > 0,     "symbol counter never wrapped");
    check(n_to_ext > 0,   "no switch to external symbols");
    check(n_to_sweep > 0, "no switch back to the sweep");
    check(n_neg_cos > 0,  "no 180 degree cosine shift");
    check(n_neg_sin > 0,  "no 180 degree sine shift");
    check(covered == 64,  $sformatf("sweep covered only %0d symbols", covered));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
