// Output stage: holds one time-domain OFDM symbol (256 samples in four banks
// of 64, bank q holding x[n + 64q], written four at a time by the IFFT 4p
// stage) and plays it out with a cyclic prefix: the last NCP samples, then all
// 256, one sample per clock with out_valid. start (with the symbol's control
// word) begins playback; out_sos marks the first sample, out_eof the last
// sample of the last symbol of a frame; done pulses when playback ends.
// The cyclic prefix and its length are this design's choice.
`timescale 1ns/1ps
module output_stage
  import moonrake_pkg::*;
#(
  parameter int NCP_P = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,
  input  logic [5:0] wr_n,
  input  cplx_t      wr_x [4],
  input  logic       start,
  input  logic       last,
  output logic       busy,
  output logic       done,
  output logic       out_valid,
  output cplx_t      out_data,
  output logic       out_sos,
  output logic       out_eof
);
  cplx_t bank [4][64];
  logic [8:0] pos;        // 0 .. NCP+255
  logic [7:0] t;
  logic       last_q;

  assign t         = 8'(int'(pos) + NFFT - NCP_P);
  assign out_valid = busy;
  assign out_data  = bank[t[7:6]][t[5:0]];
  assign out_sos   = busy && pos == 9'd0;
  assign out_eof   = busy && last_q && int'(pos) == NCP_P + NFFT - 1;

  always_ff @(posedge clk)
    if (wr_en) for (int q = 0; q < 4; q++) bank[q][wr_n] <= wr_x[q];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      pos    <= '0;
      last_q <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        pos    <= '0;
        last_q <= last;
      end else if (busy) begin
        pos <= pos + 1'b1;
        if (int'(pos) == NCP_P + NFFT - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
endmodule
