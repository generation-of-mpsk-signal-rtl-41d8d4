// data_pattern_gen: test symbol source of the MPSK transmitter.
//
// For measurement, the data are not an independent stream but are made from
// one of the carriers, so that the carrier frequency is an exact integer
// multiple of the symbol rate. A binary counter clocked by that carrier
// divides it by 2**DIV_BITS and its next K bits count through all M symbols
// in turn: symbol 0, 1, 2, ... M-1, 0, ... each held for 2**DIV_BITS
// carrier periods. With the defaults (DIV_BITS = 8, K = 3) this is the chain
// of three 4-bit binary counters of the published 8-PSK test circuit: two
// divide the carrier by 256 and the third supplies the three select bits.
//
// The published counters are ripple counters with grounded resets; this
// block is one synchronous counter that steps on the falling carrier edge,
// as the ripple chain does once it has settled, and it has an active-low
// asynchronous clear so that a simulation starts from symbol 0. Both are
// this design's choices.
//
// Interface: carrier_clk is the carrier that sets the data rate, rst_n
// clears the counter. symbol[K-1:0] changes on a falling edge of
// carrier_clk, once every 2**DIV_BITS carrier periods; symbol_step is high
// during the carrier period that follows such a change.
module data_pattern_gen #(
  parameter int unsigned K        = mpsk_pkg::K_DEFAULT,
  parameter int unsigned DIV_BITS = mpsk_pkg::DATA_DIV_BITS_DEFAULT
) (
  input  logic         carrier_clk,
  input  logic         rst_n,
  output logic [K-1:0] symbol,
  output logic         symbol_step
);

  logic [DIV_BITS+K-1:0] count_q;
  logic                  step_q;

  always_ff @(negedge carrier_clk or negedge rst_n) begin
    if (!rst_n) begin
      count_q <= '0;
      step_q  <= 1'b0;
    end else begin
      count_q <= count_q + 1'b1;
      // The prescaler wraps on this edge, so the symbol bits step.
      step_q  <= &count_q[DIV_BITS-1:0];
    end
  end

  assign symbol = count_q[DIV_BITS+K-1:DIV_BITS];
  assign symbol_step = step_q;

endmodule
