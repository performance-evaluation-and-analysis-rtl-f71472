// tb_constellation_mapper: all 64 symbols. Each (x, y) point is compared
// exactly with the level rule (MSB half -> x, LSB half -> y) and also with the
// published constellation coordinates, given below in thousandths of a volt,
// within 3/256 V (those coordinates were computed from rounded angles).
module tb_constellation_mapper;
  import qam64_pkg::*;

  symbol_t sym;
  point_t  pt;
  int      checks = 0, failures = 0;

  // Published x = r cos(theta), y = r sin(theta) for symbols 0..63, in mV.
  localparam int XT [64] = '{
     1000,  1000,   998,   998,   996,   996,  1000,  1000,
    -1000, -1000,  -998,  -998,  -996,  -996, -1000, -1000,
      752,   752,   750,   750,   747,   747,   752,   752,
     -752,  -752,  -750,  -750,  -747,  -747,  -752,  -752,
      508,   508,   504,   504,   500,   500,   498,   498,
     -508,  -508,  -504,  -504,  -500,  -500,  -498,  -498,
      249,   249,   244,   244,   254,   254,   250,   250,
     -249,  -249,  -244,  -244,  -254,  -254,  -250,  -250};
  localparam int YT [64] = '{
     1000, -1000,   752,  -752,   508,  -508,   249,  -249,
     1000, -1000,   752,  -752,   508,  -508,   249,  -249,
      998,  -998,   750,  -750,   504,  -504,   244,  -244,
      998,  -998,   750,  -750,   504,  -504,   244,  -244,
      996,  -996,   747,  -747,   500,  -500,   254,  -254,
      996,  -996,   747,  -747,   500,  -500,   254,  -254,
     1000, -1000,   752,  -752,   498,  -498,   250,  -250,
     1000, -1000,   752,  -752,   498,  -498,   250,  -250};

  constellation_mapper dut (.symbol_i(sym), .point_o(pt));

  function automatic int level_of(int three);
    int mag = 256 - 64 * (three >> 1);
    return (three & 1) ? -mag : mag;
  endfunction

  task automatic near(input int got, input int mv, input string what, input int s);
    real diff = real'(got) - real'(mv) * 256.0 / 1000.0;
    checks++;
    if (diff > 3.0 || diff < -3.0) begin
      failures++;
      $display("FAIL symbol %0d %s=%0d, published %0d mV", s, what, got, mv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 64; s++) begin
      sym = symbol_t'(s);
      #1;
      checks += 2;
      if (int'(pt.x) != level_of(s >> 3)) begin
        failures++;
        $display("FAIL symbol %06b x=%0d expected %0d", sym, pt.x, level_of(s >> 3));
      end
      if (int'(pt.y) != level_of(s & 7)) begin
        failures++;
        $display("FAIL symbol %06b y=%0d expected %0d", sym, pt.y, level_of(s & 7));
      end
      near(int'(pt.x), XT[s], "x", s);
      near(int'(pt.y), YT[s], "y", s);
    end
    // Worked example: 101110 -> cosine -0.5 V, sine +0.25 V
    sym = 6'b101110;
    #1;
    checks++;
    if (pt.x != -10'sd128 || pt.y != 10'sd64) begin
      failures++;
      $display("FAIL example 101110: x=%0d y=%0d", pt.x, pt.y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
