// Block interleaver for one OFDM symbol: ROWS x COLS coded bits. Words of
// ROWS bits are written in order, filling the block row by row (input bit i
// lands in row i / COLS, column i % COLS). Reading word c returns column c,
// bit r of it being input bit r*COLS + c, so adjacent coded bits end up ROWS
// words apart. The block is held in flip-flops; write is synchronous, read is
// combinational. Block size and permutation are this design's choice.
`timescale 1ns/1ps
module interleaver #(
  parameter int ROWS = 16,
  parameter int COLS = 24
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(COLS)-1:0]  wr_idx,
  input  logic [ROWS-1:0]          wr_word,
  input  logic [$clog2(COLS)-1:0]  rd_idx,
  output logic [ROWS-1:0]          rd_word
);
  logic [ROWS*COLS-1:0] blk;

  always_ff @(posedge clk)
    if (wr_en) blk[int'(wr_idx)*ROWS +: ROWS] <= wr_word;

  always_comb
    for (int r = 0; r < ROWS; r++) rd_word[r] = blk[r*COLS + int'(rd_idx)];
endmodule
