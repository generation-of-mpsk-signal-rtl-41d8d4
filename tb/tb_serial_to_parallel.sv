// tb_serial_to_parallel: self-checking testbench of the serial-to-parallel
// converter.
//
// Sends random bits into the default 3-bit converter and into a 2-bit one.
// After every group of K bits it checks that the symbol equals the group
// with its first bit as MSB, that symbol_load is high for exactly that one
// bit period, and that the symbol stays unchanged in between, so a new
// symbol appears once every K bit clocks.
module tb_serial_to_parallel;
  logic bit_clk = 1'b0;
  logic rst_n = 1'b1;
  logic serial_in = 1'b0;
  always #5 bit_clk = ~bit_clk;

  logic [2:0] sym3;
  logic       load3;
  logic [1:0] sym2;
  logic       load2;

  serial_to_parallel u_k3 (.bit_clk, .rst_n, .serial_in, .symbol(sym3), .symbol_load(load3));
  serial_to_parallel #(.K(2)) u_k2 (.bit_clk, .rst_n, .serial_in, .symbol(sym2), .symbol_load(load2));

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  logic [2:0] group3, last3;
  logic [1:0] group2, last2;
  int loads3, loads2;

  initial begin
    #1 rst_n = 1'b0;
    #3;
    check(sym3 == 3'd0 && !load3 && sym2 == 2'd0 && !load2, "cleared state");
    @(posedge bit_clk);
    #1 rst_n = 1'b1;
    last3 = '0; last2 = '0; group3 = '0; group2 = '0;
    loads3 = 0; loads2 = 0;
    for (int b = 0; b < 240; b++) begin
      // Drive the bit half a period before the rising edge that samples it.
      @(negedge bit_clk);
      serial_in = 1'($urandom);
      group3 = {group3[1:0], serial_in};
      group2 = {group2[0], serial_in};
      @(posedge bit_clk);
      #1;
      if (b % 3 == 2) begin
        check(load3 && sym3 == group3, $sformatf("K=3 symbol %b expected %b", sym3, group3));
        last3 = group3;
        loads3++;
      end else begin
        check(!load3 && sym3 == last3, "K=3 symbol held between loads");
      end
      if (b % 2 == 1) begin
        check(load2 && sym2 == group2, $sformatf("K=2 symbol %b expected %b", sym2, group2));
        last2 = group2;
        loads2++;
      end else begin
        check(!load2 && sym2 == last2, "K=2 symbol held between loads");
      end
    end
    check(loads3 == 80 && loads2 == 120, "symbol rate: one symbol per K bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
