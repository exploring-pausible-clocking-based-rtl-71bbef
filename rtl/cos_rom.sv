// Cosine table, 256 entries, cos(2*pi*k/256) in Q1.14 (entry 0 clipped to
// 16383). The sine is read from the same table as sin(x) = cos(x - pi/2), i.e.
// index k - 64. Asynchronous read; two read ports so one instance gives both
// parts of a twiddle factor exp(j*2*pi*k/256).
`timescale 1ns/1ps
module cos_rom (
  input  logic [7:0]         k,
  output logic signed [15:0] cos_o,
  output logic signed [15:0] sin_o
);
  logic [15:0] rom [256];
  initial $readmemh("rtl/cos256.mem", rom);
  logic [7:0] ks;
  assign ks    = k - 8'd64;
  assign cos_o = rom[k];
  assign sin_o = rom[ks];
endmodule
