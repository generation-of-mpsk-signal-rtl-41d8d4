// mprc: Multi-Phase Ripple Counter.
//
// Generates M = 2**K square-wave carriers of frequency f0/M whose phases are
// spaced by 360/M degrees, from one clock of frequency f0. It is a binary
// tree of toggle flip-flops (JK flip-flops with J = K = 1), all triggered on
// the falling edge of their own clock:
//
//   stage 0 : one flip-flop FF01 clocked by the input clock (node Q01); its
//             Q and Q' outputs are the stage-1 nodes Q11 and Q12.
//   stage s : flip-flop FF(s)(i) is clocked by node Q(s)(i), i = 1 .. 2**s.
//             Its Q output is node Q(s+1)(i) and its Q' output is node
//             Q(s+1)(i + 2**s).
//
// Each stage halves both the frequency and the phase of the nodes that clock
// it, so after K stages the 2**K nodes Q(K)(m) all run at f0/2**K and node
// Q(K)(m) leads Q(K)(1) by (m-1) periods of the input clock, i.e. by
// (m-1)*360/M degrees. The tree has 2**K - 1 flip-flops (7 for 8-PSK).
//
// The structure, the node numbering and the falling-edge triggering follow
// the published circuit. The asynchronous active-low clear that puts every
// flip-flop at 0 is this design's choice; it gives the start state the
// circuit description assumes ("all flip-flops initially low"), from which
// the phase numbering above holds.
//
// Interface: clk_in is the high-frequency clock f0, rst_n clears all
// flip-flops while low. carrier[m] is node Q(K)(m+1), so carrier[m] has
// phase m*360/M. The carriers ripple through the tree: in this RTL all
// nodes settle within the same time step as the clock edge; in hardware the
// K flip-flop delays on each path are the source of the residual phase error.
module mprc #(
  parameter int unsigned K = mpsk_pkg::K_DEFAULT,
  localparam int unsigned M = 1 << K
) (
  input  logic         clk_in,
  input  logic         rst_n,
  output logic [M-1:0] carrier
);

  // Node tree, heap order: node (s, i) with i = 1 .. 2**s sits at index
  // (2**s - 1) + (i - 1). Node 0 is the input clock Q01; the 2**K nodes of
  // stage K are the carriers.
  localparam int unsigned NODES = 2 * M - 1;
  logic node [NODES];

  assign node[0] = clk_in;

  for (genvar s = 0; s < K; s++) begin : g_stage
    for (genvar i = 0; i < (1 << s); i++) begin : g_ff
      localparam int unsigned CLK_NODE = (1 << s) - 1 + i;
      localparam int unsigned Q_NODE   = (2 << s) - 1 + i;
      localparam int unsigned QN_NODE  = Q_NODE + (1 << s);

      logic q;

      // Toggle flip-flop, falling-edge triggered, cleared by rst_n.
      always_ff @(negedge node[CLK_NODE] or negedge rst_n) begin
        if (!rst_n) q <= 1'b0;
        else        q <= ~q;
      end

      assign node[Q_NODE]  = q;
      assign node[QN_NODE] = ~q;
    end
  end

  for (genvar m = 0; m < M; m++) begin : g_out
    assign carrier[m] = node[M - 1 + m];
  end

endmodule
