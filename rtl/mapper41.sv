// Mapper [4:1]: splits a 256-subcarrier vector into the four decimated groups
// handled by the four 64-point IFFTs. It collects a whole symbol in natural
// order (k), then sends it in group-major order: output j carries subcarrier
// k = 4*(j % 64) + j / 64, so group r = j / 64 holds X[4m + r], m = 0..63.
// Single buffer: collecting and sending alternate.
`timescale 1ns/1ps
module mapper41
  import moonrake_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  in_ready,
  output logic  out_valid,
  output cplx_t out_data,
  input  logic  out_ready
);
  cplx_t      buf_q [NFFT];
  logic [7:0] wi, ri, rk;
  logic       sending;

  assign in_ready  = !sending;
  assign out_valid = sending;
  assign rk        = {ri[5:0], ri[7:6]};
  assign out_data  = buf_q[rk];

  always_ff @(posedge clk)
    if (in_valid && in_ready) buf_q[wi] <= in_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wi      <= '0;
      ri      <= '0;
      sending <= 1'b0;
    end else begin
      if (in_valid && in_ready) begin
        wi <= wi + 1'b1;
        if (wi == 8'd255) sending <= 1'b1;
      end
      if (out_valid && out_ready) begin
        ri <= ri + 1'b1;
        if (ri == 8'd255) sending <= 1'b0;
      end
    end
endmodule
