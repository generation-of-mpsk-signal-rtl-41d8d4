// tb_mpsk_orders: the transmitter built for other modulation orders.
//
// The default build is 8-PSK; the same RTL with K = 1, 2 and 4 gives BPSK,
// QPSK and 16-PSK. This testbench builds all three, runs each in test
// pattern mode with a short prescaler (4 carrier periods per symbol), and
// in every symbol period measures the phase of mpsk_out against carrier[0]
// with the phase_meter model. The phase must be symbol * 360/M degrees and
// the carrier cycle must be M input clock periods (20 samples each). Every
// symbol of every order must be seen.
module tb_mpsk_orders;
  logic clk_in = 1'b1;
  logic samp_clk = 1'b0;
  logic rst_n = 1'b1;
  always #100 clk_in = ~clk_in;
  initial begin
    #2.5;
    forever #5 samp_clk = ~samp_clk;
  end

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // One transmitter of order 2**KK with its own meter and checking process.
  for (genvar g = 0; g < 3; g++) begin : g_order
    localparam int KK = (g == 0) ? 1 : (g == 1) ? 2 : 4;
    localparam int MM = 1 << KK;

    logic          out, out_n, load, step;
    logic [MM-1:0] carrier;
    logic [KK-1:0] symbol;
    logic          start = 1'b0;
    logic          done;
    int            cyc, shift, phase;
    int            seen [MM];
    logic          finished = 1'b0;

    mpsk_transmitter #(.K(KK), .DATA_DIV_BITS(2)) dut (
      .clk_in, .rst_n, .data_src(1'b1), .bit_clk(1'b0), .serial_in(1'b0),
      .mpsk_out(out), .mpsk_out_n(out_n), .carrier, .symbol,
      .symbol_load(load), .pattern_step(step)
    );

    phase_meter u_meter (
      .samp_clk, .start, .sig_first(out), .sig_second(carrier[0]),
      .done, .cycle_samples(cyc), .shift_samples(shift), .phase_mdeg(phase)
    );

    initial begin
      logic [KK-1:0] s;
      foreach (seen[i]) seen[i] = 0;
      @(posedge rst_n);
      // Two passes through all symbols.
      repeat (2 * MM) begin
        @(posedge step);
        #1;
        s = symbol;
        @(posedge samp_clk);
        start = 1'b1;
        @(posedge done);
        start = 1'b0;
        check(cyc == 20 * MM, $sformatf("M=%0d: cycle %0d samples", MM, cyc));
        check(phase == int'(s) * 360000 / MM,
              $sformatf("M=%0d symbol %0d: phase %0d mdeg", MM, s, phase));
        check(symbol == s, $sformatf("M=%0d: symbol changed while measuring", MM));
        seen[s]++;
      end
      foreach (seen[i]) check(seen[i] == 2, $sformatf("M=%0d: symbol %0d seen %0d times", MM, i, seen[i]));
      finished = 1'b1;
    end
  end

  initial begin
    #1 rst_n = 1'b0;
    #150 rst_n = 1'b1;
    wait (g_order[0].finished && g_order[1].finished && g_order[2].finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
