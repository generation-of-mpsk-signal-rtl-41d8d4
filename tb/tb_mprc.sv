// tb_mprc: self-checking testbench of the multi-phase ripple counter.
//
// Runs trees of 1, 2, 3 (the 8-PSK default) and 4 stages side by side on one
// clock, each watched by mprc_checker, which checks the clear state, the
// carrier frequency f0/M with 50 % duty cycle and the m*360/M phase lead of
// carrier[m] over carrier[0]. A second clear in the middle of the run checks
// that the tree restarts in the same phase order. A watchdog ends the run
// with a failure if it does not finish in time.
module tb_mprc;
  logic clk = 1'b1;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  int c1, f1, c2, f2, c3, f3, c4, f4, cd, fd;

  mprc_checker #(.K(1), .SAMPLES(40)) u_k1 (.clk, .rst_n, .checks(c1), .failures(f1));
  mprc_checker #(.K(2), .SAMPLES(40)) u_k2 (.clk, .rst_n, .checks(c2), .failures(f2));
  mprc_checker #(.K(3), .SAMPLES(80)) u_k3 (.clk, .rst_n, .checks(c3), .failures(f3));
  mprc_checker #(.K(4), .SAMPLES(80)) u_k4 (.clk, .rst_n, .checks(c4), .failures(f4));

  // Default-parameter instance, checked directly: stage-3 tree, 8 carriers.
  logic [7:0] carrier_d;
  logic [7:0] hist_d [64];
  int nd = 0;
  mprc u_default (.clk_in(clk), .rst_n(rst_n), .carrier(carrier_d));

  always @(posedge clk) if (rst_n && nd < 64) begin
    hist_d[nd] = carrier_d;
    if (nd >= 8) begin
      for (int m = 0; m < 8; m++) begin
        cd++;
        // carrier[m] leads carrier[0] by m clock periods.
        if (hist_d[nd][0] != hist_d[nd-m][m]) begin
          fd++;
          $display("FAIL default instance: carrier[%0d] phase at sample %0d", m, nd);
        end
      end
    end
    nd++;
  end

  int checks, failures;

  initial begin
    cd = 0; fd = 0;
    #1 rst_n = 1'b0;  // a falling edge, so the asynchronous clear acts
    repeat (2) @(negedge clk);
    #2 rst_n = 1'b1;
    repeat (90) @(posedge clk);
    // Clear again and let the checkers see the start state once more.
    #2 rst_n = 1'b0;
    @(posedge clk);
    @(posedge clk);
    #2;
    checks = c1 + c2 + c3 + c4 + cd;
    failures = f1 + f2 + f3 + f4 + fd;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c3 + c4 + cd, f1 + f2 + f3 + f4 + fd + 1);
    $finish;
  end
endmodule
