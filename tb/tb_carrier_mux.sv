// tb_carrier_mux: self-checking testbench of the M-to-1 carrier multiplexer.
//
// Applies every select value with random carrier patterns to the default
// 8-way multiplexer, and to a 16-way one, and checks that z equals the
// selected carrier bit and z_n its complement. Expected values come from
// shifting the carrier word, not from indexing it as the design does.
module tb_carrier_mux;
  logic [7:0]  carrier8;
  logic [2:0]  sel8;
  logic        z8, z8_n;
  logic [15:0] carrier16;
  logic [3:0]  sel16;
  logic        z16, z16_n;

  int checks = 0;
  int failures = 0;

  carrier_mux u_mux8 (.carrier(carrier8), .sel(sel8), .z(z8), .z_n(z8_n));
  carrier_mux #(.K(4)) u_mux16 (.carrier(carrier16), .sel(sel16), .z(z16), .z_n(z16_n));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int round = 0; round < 50; round++) begin
      carrier8  = 8'($urandom);
      carrier16 = 16'($urandom);
      // One-hot patterns in the first rounds make a wrong index visible.
      if (round < 8)       carrier8  = 8'(1) << round;
      if (round < 16)      carrier16 = 16'(1) << round;
      for (int s = 0; s < 16; s++) begin
        sel8  = 3'(s);
        sel16 = 4'(s);
        #1;
        if (s < 8) begin
          check(z8 == ((carrier8 >> s) & 8'd1), $sformatf("8-way z, sel=%0d pattern=%b", s, carrier8));
          check(z8_n == !z8, "8-way z_n");
        end
        check(z16 == ((carrier16 >> s) & 16'd1), $sformatf("16-way z, sel=%0d pattern=%b", s, carrier16));
        check(z16_n == !z16, "16-way z_n");
      end
    end
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
