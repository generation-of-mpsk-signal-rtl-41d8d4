// mprc_checker: drives nothing, watches one multi-phase ripple counter.
//
// Instantiates mprc with K stages on the shared clock and checks, from the
// outside only, what the carrier set must look like:
//   * right after the clear, carrier[m] is 0 for m < M/2 (Q outputs of
//     cleared flip-flops) and 1 for m >= M/2 (their Q' outputs);
//   * every carrier repeats after M input clock periods and is inverted
//     after M/2 periods (frequency f0/M, 50 % duty cycle);
//   * carrier[m] leads carrier[0] by exactly m input clock periods, i.e. by
//     m*360/M degrees.
// The carriers are sampled on the rising clock edge, half a period after the
// falling edge on which the tree moves. checks/failures are running counts.
module mprc_checker #(
  parameter int unsigned K = 3,
  parameter int unsigned SAMPLES = 64
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures
);
  localparam int unsigned M = 1 << K;

  logic [M-1:0] carrier;
  logic [M-1:0] hist [SAMPLES];
  int n;

  mprc #(.K(K)) dut (.clk_in(clk), .rst_n(rst_n), .carrier(carrier));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL K=%0d sample %0d: %s", K, n, what);
    end
  endtask

  initial begin
    checks = 0;
    failures = 0;
    n = 0;
  end

  // Start state, checked while the clear is held.
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int m = 0; m < int'(M); m++)
        check(carrier[m] == (m >= int'(M) / 2), $sformatf("cleared value of carrier[%0d]", m));
    end else if (n < int'(SAMPLES)) begin
      hist[n] = carrier;
      if (n >= int'(M)) begin
        for (int m = 0; m < int'(M); m++) begin
          check(hist[n][m] == hist[n-M][m], $sformatf("period of carrier[%0d]", m));
          check(hist[n][m] != hist[n-M/2][m], $sformatf("half-period inversion of carrier[%0d]", m));
        end
      end
      // carrier[m] at sample j equals carrier[0] at sample j+m.
      for (int m = 1; m < int'(M); m++)
        if (n >= m)
          check(hist[n-m][m] == hist[n][0], $sformatf("phase lead of carrier[%0d]", m));
      n++;
    end
  end
endmodule
