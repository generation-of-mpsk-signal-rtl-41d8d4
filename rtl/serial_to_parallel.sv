// serial_to_parallel: groups a serial bit stream into K-bit PSK symbols.
//
// The modulator's multiplexer needs log2(M) = K select lines, while the data
// arrive one bit at a time. This block shifts the serial bits into a K-bit
// register and, once K bits have arrived, copies them to the symbol output,
// where they stay for the next K bit periods. The first bit of a group
// becomes the most significant bit of the symbol.
//
// Only the block's place in the transmitter (serial data in, log2 M select
// lines out) comes from the published block diagram. The bit order, the
// rising-edge bit clock, the holding register and the active-low
// asynchronous clear are this design's choices.
//
// Interface: bit_clk is the data bit clock; serial_in is sampled on its
// rising edge. symbol[K-1:0] changes on the rising edge that samples the
// last bit of a group, and symbol_load is high for the bit period that
// follows such an edge. rst_n clears the bit count and the symbol to 0.
module serial_to_parallel #(
  parameter int unsigned K = mpsk_pkg::K_DEFAULT
) (
  input  logic         bit_clk,
  input  logic         rst_n,
  input  logic         serial_in,
  output logic [K-1:0] symbol,
  output logic         symbol_load
);

  localparam int unsigned CW = (K > 1) ? $clog2(K) : 1;

  logic [K-1:0]  shift_q;
  logic [CW-1:0] count_q;
  logic [K-1:0]  shifted;

  // Register contents after one more bit, oldest bit dropped.
  assign shifted = K'({shift_q, serial_in});

  always_ff @(posedge bit_clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_q     <= '0;
      count_q     <= '0;
      symbol      <= '0;
      symbol_load <= 1'b0;
    end else begin
      shift_q <= shifted;
      if (count_q == CW'(K - 1)) begin
        count_q     <= '0;
        symbol      <= shifted;
        symbol_load <= 1'b1;
      end else begin
        count_q     <= count_q + 1'b1;
        symbol_load <= 1'b0;
      end
    end
  end

endmodule
