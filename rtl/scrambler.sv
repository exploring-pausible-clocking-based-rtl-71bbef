// Scrambler: whitens a byte stream with an LFSR sequence, eight sequence bits
// per byte in one clock (bit 0 of the byte first). Per bit the feedback is the
// XOR of the state bits selected by TAPS, the output bit is data ^ feedback,
// and the state shifts left taking the feedback in. The default TAPS gives
// x^7 + x^4 + 1. The state is reloaded from seed on a byte flagged in_sof.
// Polynomial, seed and byte-parallel form are this design's choice; TAPS is a
// parameter so other polynomials can be used. One register stage, valid/ready.
`timescale 1ns/1ps
module scrambler #(
  parameter int         LEN  = 7,
  parameter logic [6:0] TAPS = 7'b1001000
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [LEN-1:0] seed,
  input  logic           in_valid,
  input  logic [7:0]     in_data,
  input  logic           in_sof,
  output logic           in_ready,
  output logic           out_valid,
  output logic [7:0]     out_data,
  output logic           out_sof,
  input  logic           out_ready
);
  logic [LEN-1:0] st, st_n;
  logic [7:0]     sd;

  always_comb begin
    logic fb;
    st_n = in_sof ? seed : st;
    for (int i = 0; i < 8; i++) begin
      fb    = ^(st_n & TAPS[LEN-1:0]);
      sd[i] = in_data[i] ^ fb;
      st_n  = {st_n[LEN-2:0], fb};
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st        <= '1;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sof   <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        st       <= st_n;
        out_data <= sd;
        out_sof  <= in_sof;
      end
    end
endmodule
