// Shared types and constants of the GALS OFDM baseband transmitter.
// A complex sample is two signed 16-bit words (Q1.14 in the frequency domain).
// The subcarrier plan is this design's choice: 256 subcarriers, DC and the
// guard band k = 105..151 empty, the remaining 208 used subcarriers carry
// data except every 13th, which carries a pilot (16 pilots, 192 data).
// With QPSK that is 384 coded bits, 192 information bits, 24 input bytes per
// OFDM symbol.
`timescale 1ns/1ps
package moonrake_pkg;
  localparam int NFFT          = 256;   // IFFT size
  localparam int NSUB          = 64;    // size of each first-stage IFFT
  localparam int NCP           = 64;    // cyclic prefix length
  localparam int BYTES_PER_SYM = 24;    // information bytes per symbol
  localparam int WORDS_PER_SYM = 24;    // 16-bit coded words per symbol
  localparam int N_IL          = 6;     // interleavers
  localparam logic signed [15:0] AMP = 16'sd11585;  // 1/sqrt(2) in Q1.14

  typedef struct packed {
    logic signed [15:0] re;
    logic signed [15:0] im;
  } cplx_t;

  typedef enum logic [1:0] {SC_NULL = 2'd0, SC_DATA = 2'd1, SC_PILOT = 2'd2} sc_kind_e;

  function automatic sc_kind_e sc_kind(input logic [7:0] k);
    int u;
    if (k == 8'd0 || (k >= 8'd105 && k <= 8'd151)) return SC_NULL;
    u = (k <= 8'd104) ? int'(k) - 1 : int'(k) - 48;
    return (u % 13 == 6) ? SC_PILOT : SC_DATA;
  endfunction

  // Gray-coded QPSK: bit 0 selects the sign of I, bit 1 the sign of Q.
  function automatic cplx_t qpsk(input logic [1:0] b);
    cplx_t c;
    c.re = b[0] ? -AMP : AMP;
    c.im = b[1] ? -AMP : AMP;
    return c;
  endfunction

  function automatic logic signed [15:0] sat16(input logic signed [39:0] v);
    if (v > 40'sd32767)  return 16'sd32767;
    if (v < -40'sd32768) return -16'sd32768;
    return v[15:0];
  endfunction
endpackage
