// BIST pseudo-random byte source: a 32-bit Galois LFSR (polynomial given by
// POLY, default x^32 + x^22 + x^2 + x + 1) stepped eight times per byte
// taken. out_data is the low byte of the state; it advances at a rising clk
// edge when take is high. Reset loads SEED (must be non-zero).
`timescale 1ns/1ps
module bist_prng #(
  parameter logic [31:0] POLY = 32'h8020_0003,
  parameter logic [31:0] SEED = 32'h1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       take,
  output logic [7:0] out_data
);
  logic [31:0] st, st_n;

  always_comb begin
    st_n = st;
    for (int i = 0; i < 8; i++)
      st_n = st_n[0] ? ((st_n >> 1) ^ POLY) : (st_n >> 1);
  end

  assign out_data = st[7:0];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    st <= SEED;
    else if (take) st <= st_n;
endmodule
