// tb_mpsk_transmitter: end-to-end testbench of the MPSK transmitter at its
// default parameters (8-PSK, test pattern stepping every 256 carrier
// periods).
//
// The input clock f0 has a 200 ns period, so the carriers run at f0/8 and a
// sample clock of 10 ns gives 160 samples per carrier cycle (20 samples per
// 1/8 cycle, the resolution used for the bench measurement). The run:
//   1. test-pattern mode through all eight symbols and past the wrap from
//      symbol 7 back to 0;
//   2. serial mode: bits on bit_clk (one bit per 4 carrier periods), first
//      the eight symbols in order, then random ones;
//   3. back to test-pattern mode.
// Throughout, every sample checks that mpsk_out equals the carrier the
// expected symbol selects and that mpsk_out_n is its complement; the
// expected symbol is computed by the testbench from its own count of
// carrier edges (pattern mode) or from the bits it sent (serial mode).
// In each symbol period the phase_meter model measures the phase of
// mpsk_out against carrier[0] and compares it with symbol * 45 degrees; the
// per-phase RMS error is printed as a table. Counted mechanisms, each of
// which must occur: every phase in each mode, serial symbol loads, pattern
// steps, a pattern wrap, mode switches and a clear.
module tb_mpsk_transmitter;
  localparam int M = 8;
  localparam int CLK_HALF = 100;          // f0 period 200 ns
  localparam int SAMP_HALF = 5;           // 10 ns sample period
  localparam int CARRIER_SAMPLES = 160;   // samples per carrier cycle
  localparam int TOL_MDEG = 2250;         // one sample = 2.25 degrees

  logic clk_in = 1'b1;
  logic samp_clk = 1'b0;
  logic rst_n = 1'b1;
  logic data_src = 1'b1;
  logic bit_clk = 1'b0;
  logic serial_in = 1'b0;

  logic         mpsk_out, mpsk_out_n;
  logic [M-1:0] carrier;
  logic [2:0]   symbol;
  logic         symbol_load, pattern_step;

  always #CLK_HALF clk_in = ~clk_in;
  initial begin
    #2.5;
    forever #SAMP_HALF samp_clk = ~samp_clk;
  end

  mpsk_transmitter dut (
    .clk_in, .rst_n, .data_src, .bit_clk, .serial_in,
    .mpsk_out, .mpsk_out_n, .carrier, .symbol, .symbol_load, .pattern_step
  );

  logic meter_start = 1'b0;
  logic meter_done;
  int   meter_cycle, meter_shift, meter_phase;

  phase_meter u_meter (
    .samp_clk, .start(meter_start), .sig_first(mpsk_out), .sig_second(carrier[0]),
    .done(meter_done), .cycle_samples(meter_cycle), .shift_samples(meter_shift),
    .phase_mdeg(meter_phase)
  );

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // ---- Independent expectation of the symbol in use -------------------
  int   carrier_falls = 0;            // falling edges of carrier[0] since clear
  logic [2:0] serial_expect = '0;     // last complete group of bits sent
  logic [2:0] expect_sym;
  logic       checking = 1'b0;

  always @(negedge carrier[0]) if (rst_n) carrier_falls++;
  always @(posedge rst_n) carrier_falls = 0;

  assign expect_sym = data_src ? 3'((carrier_falls / 256) % M) : serial_expect;

  // Sample-by-sample output check.
  always @(posedge samp_clk) if (checking) begin
    check(symbol == expect_sym, $sformatf("symbol %0d, expected %0d", symbol, expect_sym));
    check(mpsk_out == carrier[expect_sym], "mpsk_out is not the selected carrier");
    check(mpsk_out_n == !mpsk_out, "mpsk_out_n is not the complement");
  end

  // ---- Mechanism counters ------------------------------------------------
  int phase_seen [2][M];
  int loads = 0, steps = 0, wraps = 0, switches = 0, clears = 0;
  longint err_sq [M];
  int     err_n [M];
  logic [2:0] prev_pattern = '0;

  always @(posedge symbol_load) loads++;
  always @(posedge pattern_step) begin
    steps++;
    if (data_src && symbol == 3'd0) wraps++;
  end

  // Measure the output phase once and compare it with symbol * 45 degrees.
  task automatic measure();
    int expected, err;
    logic [2:0] s;
    s = expect_sym;
    @(posedge samp_clk);
    meter_start = 1'b1;
    @(posedge meter_done);
    meter_start = 1'b0;
    expected = int'(s) * 45000;
    err = meter_phase - expected;
    check(meter_cycle == CARRIER_SAMPLES, $sformatf("carrier cycle %0d samples", meter_cycle));
    check(err <= TOL_MDEG && err >= -TOL_MDEG,
          $sformatf("symbol %0d: phase %0d mdeg, expected %0d", s, meter_phase, expected));
    check(expect_sym == s, "symbol changed during the measurement");
    phase_seen[data_src][s]++;
    err_sq[s] += longint'(err) * err;
    err_n[s]++;
  endtask

  // Serial source: one bit per 4 carrier periods (32 f0 periods). Bits are
  // changed on the falling edge of bit_clk, sampled on its rising edge.
  task automatic send_symbol(input logic [2:0] s);
    for (int b = 2; b >= 0; b--) begin
      @(negedge bit_clk);
      serial_in = s[b];
      @(posedge bit_clk);
      if (b == 0) serial_expect = s;
    end
  endtask

  initial begin
    bit_clk = 1'b0;
    forever begin
      repeat (16) @(posedge clk_in);
      bit_clk = ~bit_clk;
    end
  end

  // Serial-mode measurements run beside send_symbol, once per symbol.
  // The converter groups bits counted from the clear, so the first bit is
  // sent right after it has completed a group.
  task automatic serial_run(input int count);
    @(posedge symbol_load);
    fork
      begin
        for (int i = 0; i < count; i++) send_symbol(i < M ? 3'(i) : 3'($urandom));
      end
      begin
        for (int i = 0; i < count; i++) begin
          @(posedge symbol_load);
          #1;
          measure();
        end
      end
    join
  endtask

  initial begin
    foreach (err_sq[i]) begin err_sq[i] = 0; err_n[i] = 0; end
    foreach (phase_seen[i, j]) phase_seen[i][j] = 0;

    // Clear (a falling edge of rst_n) and release between clock edges.
    #1 rst_n = 1'b0;
    clears++;
    #150;
    check(carrier == 8'hF0, $sformatf("carriers after clear %b", carrier));
    check(symbol == 3'd0 && mpsk_out == 1'b0, "output after clear");
    rst_n = 1'b1;
    @(posedge samp_clk);
    checking = 1'b1;

    // 1. Test pattern mode: measure in every symbol period, through a wrap.
    for (int p = 0; p < M + 1; p++) begin
      measure();
      @(posedge pattern_step);
      #1;
    end

    // 2. Serial mode. Switch just after a pattern step, then feed symbols.
    data_src = 1'b0;
    switches++;
    serial_run(40);

    // 3. Back to the test pattern.
    @(negedge bit_clk);
    data_src = 1'b1;
    switches++;
    @(posedge pattern_step);
    #1;
    measure();
    checking = 1'b0;

    // Table of measured phase errors, one row per ideal phase.
    for (int s = 0; s < M; s++) begin
      real rms;
      rms = (err_n[s] > 0) ? $sqrt(real'(err_sq[s]) / err_n[s]) / 1000.0 : -1.0;
      $display("phase %3d deg: %0d measurements, RMS error %0.2f deg", s * 45, err_n[s], rms);
    end

    for (int src = 0; src < 2; src++)
      for (int s = 0; s < M; s++)
        check(phase_seen[src][s] > 0, $sformatf("phase %0d never measured in %s mode",
              s * 45, (src != 0) ? "pattern" : "serial"));
    check(loads >= 40, $sformatf("serial symbol loads: %0d", loads));
    check(steps >= M, $sformatf("pattern steps: %0d", steps));
    check(wraps >= 1, "pattern never wrapped from symbol 7 to 0");
    check(switches == 2 && clears == 1, "mode switches / clear");
    $display("mechanisms: loads=%0d pattern_steps=%0d wraps=%0d switches=%0d clears=%0d",
             loads, steps, wraps, switches, clears);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
