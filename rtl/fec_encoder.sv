// FEC encoder: rate-1/2 convolutional code, constraint length K, generator
// polynomials G0/G1 (default 133/171 octal). Eight input bits (bit 0 first)
// are encoded per clock into one 16-bit coded word: bits 2i and 2i+1 are the
// G0 and G1 outputs for input bit i. The encoder memory is cleared on a byte
// flagged in_sof (start of frame) and otherwise runs on across symbols; no
// tail bits are added. Code choice and byte-parallel form are this design's.
`timescale 1ns/1ps
module fec_encoder #(
  parameter int         K  = 7,
  parameter logic [6:0] G0 = 7'o133,
  parameter logic [6:0] G1 = 7'o171
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [7:0]   in_data,
  input  logic         in_sof,
  output logic         in_ready,
  output logic         out_valid,
  output logic [15:0]  out_data,
  input  logic         out_ready
);
  // sr[0] is the current bit, sr[K-1] the oldest
  logic [K-2:0]  mem_q, mem_n;
  logic [15:0]   cw;

  // Generator bit K-1 taps the newest bit; sr[0] holds it, so reverse.
  function automatic logic [K-1:0] rev(input logic [6:0] g);
    for (int j = 0; j < K; j++) rev[j] = g[K-1-j];
  endfunction
  localparam logic [K-1:0] M0 = rev(G0);
  localparam logic [K-1:0] M1 = rev(G1);

  always_comb begin
    logic [K-1:0] sr;
    mem_n = in_sof ? '0 : mem_q;
    for (int i = 0; i < 8; i++) begin
      sr          = {mem_n, in_data[i]};
      cw[2*i]     = ^(sr & M0);
      cw[2*i + 1] = ^(sr & M1);
      mem_n       = sr[K-2:0];
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      mem_q     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        mem_q    <= mem_n;
        out_data <= cw;
      end
    end
endmodule
