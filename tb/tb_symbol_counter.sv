// tb_symbol_counter: random stepping. Checks the count after every edge, that
// all 64 symbols are visited in order and that wrap marks the 63 -> 0 step.
module tb_symbol_counter;
  import qam64_pkg::*;

  logic    clk = 0, rst_n = 0, step = 0;
  symbol_t count;
  logic    wrap;
  int      checks = 0, failures = 0;
  int      model = 0, wraps = 0;

  symbol_counter dut (.clk(clk), .rst_n(rst_n), .step_i(step), .count_o(count), .wrap_o(wrap));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (count != 0) begin failures++; $display("FAIL reset count %0d", count); end
    rst_n = 1;
    for (int c = 0; c < 600; c++) begin
      @(negedge clk);
      step = ($urandom_range(0, 2) != 0);
      #1;
      checks++;
      if (wrap != (step && model == 63)) begin
        failures++;
        $display("FAIL wrap=%0b at count %0d", wrap, model);
      end
      if (wrap) wraps++;
      @(posedge clk);
      if (step) model = (model + 1) % 64;
      #1;
      checks++;
      if (int'(count) != model) begin
        failures++;
        $display("FAIL count %0d expected %0d", count, model);
      end
    end
    checks++;
    if (wraps < 2) begin failures++; $display("FAIL only %0d wraps", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
