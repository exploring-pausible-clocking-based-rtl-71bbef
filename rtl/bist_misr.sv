// BIST multiple-input signature register: 32-bit MISR, sig <= shl(sig) with
// polynomial feedback (POLY, default the CRC-32 polynomial 0x04C11DB7) XOR
// the 32-bit input word, on every rising clk edge with en high. clear
// returns the signature to zero.
`timescale 1ns/1ps
module bist_misr #(
  parameter logic [31:0] POLY = 32'h04C1_1DB7
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        en,
  input  logic [31:0] in_data,
  output logic [31:0] sig
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     sig <= '0;
    else if (clear) sig <= '0;
    else if (en)    sig <= ({sig[30:0], 1'b0} ^ (sig[31] ? POLY : 32'h0)) ^ in_data;
endmodule
