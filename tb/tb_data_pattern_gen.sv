// tb_data_pattern_gen: self-checking testbench of the test symbol source.
//
// Clocks the default generator (8 prescaler bits, 3 symbol bits) and a
// small one (2 prescaler bits, 2 symbol bits) with a square-wave carrier.
// A reference count of falling carrier edges predicts the symbol, which must
// be (edges / 2**DIV_BITS) mod M, i.e. step by one every 2**DIV_BITS carrier
// periods and wrap after M symbols; symbol_step must be high exactly in the
// carrier period that follows each step. Runs past one full wrap of the
// default generator.
module tb_data_pattern_gen;
  logic carrier = 1'b1;
  logic rst_n = 1'b1;
  always #5 carrier = ~carrier;

  logic [2:0] sym_d;
  logic       step_d;
  logic [1:0] sym_s;
  logic       step_s;

  data_pattern_gen u_default (.carrier_clk(carrier), .rst_n, .symbol(sym_d), .symbol_step(step_d));
  data_pattern_gen #(.K(2), .DIV_BITS(2)) u_small (.carrier_clk(carrier), .rst_n, .symbol(sym_s), .symbol_step(step_s));

  int checks = 0;
  int failures = 0;
  int edges = 0;
  int steps_d = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL after %0d edges: %s", edges, what);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #1;
    check(sym_d == 0 && !step_d && sym_s == 0 && !step_s, "cleared state");
    #1 rst_n = 1'b1;
    // Run 2.5 wraps of the default generator: 2.5 * 8 * 256 carrier periods.
    repeat (5120) begin
      @(negedge carrier);
      edges++;
      #2;
      check(sym_d == 3'((edges / 256) % 8), $sformatf("default symbol %0d", sym_d));
      check(step_d == (edges % 256 == 0), "default symbol_step");
      check(sym_s == 2'((edges / 4) % 4), $sformatf("small symbol %0d", sym_s));
      check(step_s == (edges % 4 == 0), "small symbol_step");
      if (step_d) steps_d++;
    end
    check(steps_d == 20, $sformatf("default generator stepped %0d times, expected 20", steps_d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
