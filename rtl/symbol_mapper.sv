// Symbol mapping: one Gray-coded QPSK point per pair of interleaved bits.
// Bit 0 selects the sign of I, bit 1 the sign of Q; amplitude 1/sqrt(2) in
// Q1.14. Purely combinational. The modulation is this design's choice.
`timescale 1ns/1ps
module symbol_mapper
  import moonrake_pkg::*;
(
  input  logic [1:0] bits,
  output cplx_t      sym
);
  assign sym = qpsk(bits);
endmodule
