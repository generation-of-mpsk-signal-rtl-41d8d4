// mpsk_pkg: constants shared by the MPSK transmitter modules.
//
// The transmitter builds an M-ary PSK signal (M = 2**K) without any analog
// arithmetic: a tree of toggle flip-flops makes M square-wave carriers whose
// phases are spaced by 360/M degrees, and a multiplexer picks one of them per
// data symbol. The 8-PSK configuration (K = 3) is the one the design was
// built and measured in, so it is the default here.
//
// DATA_DIV_BITS_DEFAULT is the width of the carrier prescaler in the test
// pattern generator: two 4-bit binary counters (8 bits) divide a carrier by
// 256 before a third counter steps the test symbol.
package mpsk_pkg;

  // Number of flip-flop stages of the multi-phase ripple counter; M = 2**K.
  localparam int unsigned K_DEFAULT = 3;

  // Prescaler width of the test pattern generator (two 4-bit counters).
  localparam int unsigned DATA_DIV_BITS_DEFAULT = 8;

endpackage
