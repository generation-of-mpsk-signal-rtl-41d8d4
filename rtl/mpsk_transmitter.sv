// mpsk_transmitter: M-PSK modulator built from logic circuits only.
//
// A high-frequency clock f0 drives the multi-phase ripple counter (mprc),
// which produces M = 2**K square-wave carriers at f0/M, carrier m having
// phase m*360/M. The M-to-1 carrier multiplexer passes the carrier chosen by
// the current K-bit symbol, so the output jumps between phases exactly as an
// M-PSK signal does, with a constant amplitude and without the I/Q weighting
// and summing whose analog errors distort a conventional I/Q modulator.
// Band-pass filtering of the square wave into a sinusoid, an optional mixer
// stage to move the carrier frequency, and the class-D power stage follow
// outside this block, on mpsk_out.
//
// The symbol comes from one of two sources, chosen by data_src:
//   data_src = 0: serial data (serial_in, clocked by bit_clk) grouped into
//                 K-bit symbols by serial_to_parallel, as in the transmitter
//                 block diagram;
//   data_src = 1: the test pattern of data_pattern_gen, a counter clocked by
//                 carrier[DATA_CARRIER] that steps through all M symbols, as
//                 in the 8-PSK test circuit.
// The two-way choice between these sources is this design's own addition; it
// lets one netlist serve both as transmitter and as test circuit.
//
// Interface: clk_in is f0 and rst_n an active-low asynchronous clear of all
// flip-flops. mpsk_out / mpsk_out_n are the modulated square wave and its
// complement. carrier[M-1:0] brings out the carriers, of which carrier[0]
// serves as the phase reference when measuring the output. symbol is the
// select value in use; symbol_load pulses when serial_to_parallel delivers a
// new symbol and pattern_step when the test pattern steps.
// Timing: the carriers move on falling edges of clk_in; mpsk_out follows the
// carriers and the symbol combinationally.
module mpsk_transmitter #(
  parameter int unsigned K            = mpsk_pkg::K_DEFAULT,
  parameter int unsigned DATA_DIV_BITS = mpsk_pkg::DATA_DIV_BITS_DEFAULT,
  parameter int unsigned DATA_CARRIER = 0,
  localparam int unsigned M = 1 << K
) (
  input  logic         clk_in,
  input  logic         rst_n,
  input  logic         data_src,
  input  logic         bit_clk,
  input  logic         serial_in,
  output logic         mpsk_out,
  output logic         mpsk_out_n,
  output logic [M-1:0] carrier,
  output logic [K-1:0] symbol,
  output logic         symbol_load,
  output logic         pattern_step
);

  logic [K-1:0] serial_symbol;
  logic [K-1:0] pattern_symbol;

  mprc #(.K(K)) u_mprc (
    .clk_in  (clk_in),
    .rst_n   (rst_n),
    .carrier (carrier)
  );

  serial_to_parallel #(.K(K)) u_s2p (
    .bit_clk     (bit_clk),
    .rst_n       (rst_n),
    .serial_in   (serial_in),
    .symbol      (serial_symbol),
    .symbol_load (symbol_load)
  );

  data_pattern_gen #(.K(K), .DIV_BITS(DATA_DIV_BITS)) u_pattern (
    .carrier_clk (carrier[DATA_CARRIER]),
    .rst_n       (rst_n),
    .symbol      (pattern_symbol),
    .symbol_step (pattern_step)
  );

  assign symbol = data_src ? pattern_symbol : serial_symbol;

  carrier_mux #(.K(K)) u_mux (
    .carrier (carrier),
    .sel     (symbol),
    .z       (mpsk_out),
    .z_n     (mpsk_out_n)
  );

endmodule
