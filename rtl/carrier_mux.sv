// carrier_mux: M-to-1 carrier multiplexer of the MPSK transmitter.
//
// Puts on its output the one carrier, out of the M phase-shifted carriers of
// the ripple counter, that the current data symbol selects: symbol m passes
// carrier[m], whose phase is m*360/M, so the output is the M-PSK signal in
// square-wave form. Because the output is always one full-swing logic
// signal, every symbol has the same amplitude; no analog weighting or
// summing is involved.
//
// Interface: carrier[M-1:0] from the ripple counter, sel[K-1:0] the symbol
// (select lines A, B, C for 8-PSK, A being the least significant), z the
// selected carrier and z_n its complement, like the two outputs of a 74151
// 8-to-1 multiplexer. Purely combinational; the select lines should change
// only while they are held steady for a symbol period by the data source.
// The 74151 strobe input is not modelled: the published test circuit ties
// it to its active level, so the multiplexer is always enabled.
module carrier_mux #(
  parameter int unsigned K = mpsk_pkg::K_DEFAULT,
  localparam int unsigned M = 1 << K
) (
  input  logic [M-1:0] carrier,
  input  logic [K-1:0] sel,
  output logic         z,
  output logic         z_n
);

  always_comb begin
    z   = carrier[sel];
    z_n = ~z;
  end

endmodule
