// Input controller: admits input bytes one OFDM symbol (BYTES_PER_SYM bytes)
// at a time. A symbol may start only while a credit is held; the island starts
// with CREDITS credits and gets one back with every symbol-done token that the
// output stage returns over its channel. This bounds the number of symbols in
// flight in the pipeline. The first byte of every frame (frame_len symbols)
// is flagged with out_sof so the scrambler and encoder restart there.
// The credit scheme and its sizes are this design's choice.
`timescale 1ns/1ps
module input_control #(
  parameter int BYTES_PER_SYM = 24,
  parameter int CREDITS       = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] frame_len,
  input  logic        tok_valid,
  output logic        tok_take,
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  output logic        in_ready,
  output logic        out_valid,
  output logic [7:0]  out_data,
  output logic        out_sof,
  input  logic        out_ready
);
  logic [7:0]  left;      // bytes left in the current symbol
  logic [7:0]  credits;
  logic [15:0] sym;       // symbol number within the frame
  logic        start, fire;

  assign start     = (left == 8'd0) && (credits != 8'd0);
  assign out_valid = in_valid && ((left != 8'd0) || start);
  assign in_ready  = out_ready && ((left != 8'd0) || start);
  assign out_data  = in_data;
  assign out_sof   = (left == 8'd0) && (sym == 16'd0);
  assign fire      = out_valid && out_ready;
  assign tok_take  = tok_valid;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      left    <= '0;
      credits <= 8'(CREDITS);
      sym     <= '0;
    end else begin
      credits <= credits - ((fire && left == 8'd0) ? 8'd1 : 8'd0) + (tok_valid ? 8'd1 : 8'd0);
      if (fire) begin
        if (left == 8'd0) left <= 8'(BYTES_PER_SYM - 1);
        else              left <= left - 1'b1;
        if (left == 8'd1 || (left == 8'd0 && BYTES_PER_SYM == 1))
          sym <= (sym + 1'b1 >= frame_len) ? 16'd0 : sym + 1'b1;
      end
    end
endmodule
