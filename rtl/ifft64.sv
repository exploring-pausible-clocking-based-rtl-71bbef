// 64-point inverse DFT, one of the four first-stage units of the 256-point
// IFFT. Y[n] = (1/16) * sum_m X[m] * exp(+j*2*pi*m*n/64), n, m = 0..63.
// Operation: load 64 samples (valid/ready), compute, then hold the results
// for random-access reading until release is pulsed. The computation is a
// direct DFT with a single complex multiply-accumulate: 64 x 64 = 4096
// cycles per transform. Twiddles come from the 256-entry cosine table at
// index 4*m*n mod 256; products are Q1.14, the sum is rounded and saturated
// to 16 bits. This serial structure and the 1/16 scaling are this design's
// choice; it trades the throughput of a pipelined FFT for size and clarity.
`timescale 1ns/1ps
module ifft64
  import moonrake_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  cplx_t      in_data,
  output logic       in_ready,
  output logic       done,
  input  logic [5:0] rd_idx,
  output cplx_t      rd_data,
  input  logic       release_i
);
  typedef enum logic [1:0] {S_LOAD, S_CALC, S_DONE} state_e;
  state_e st;
  cplx_t  x [64];
  cplx_t  y [64];
  logic [5:0] li, n, m;
  logic signed [39:0] acc_re, acc_im, sum_re, sum_im;
  logic signed [15:0] c, s;
  logic [7:0] ti;
  cplx_t xm;

  assign ti = 8'({m, 2'b00} * n);
  cos_rom u_rom (.k(ti), .cos_o(c), .sin_o(s));
  assign xm = x[m];

  always_comb begin
    sum_re = acc_re + 40'(xm.re * c) - 40'(xm.im * s);
    sum_im = acc_im + 40'(xm.re * s) + 40'(xm.im * c);
  end

  assign in_ready = (st == S_LOAD);
  assign done     = (st == S_DONE);
  assign rd_data  = y[rd_idx];

  always_ff @(posedge clk) begin
    if (st == S_LOAD && in_valid) x[li] <= in_data;
    if (st == S_CALC && m == 6'd63) begin
      y[n].re <= sat16((sum_re + 40'sd131072) >>> 18);
      y[n].im <= sat16((sum_im + 40'sd131072) >>> 18);
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st     <= S_LOAD;
      li     <= '0;
      n      <= '0;
      m      <= '0;
      acc_re <= '0;
      acc_im <= '0;
    end else begin
      case (st)
        S_LOAD: if (in_valid) begin
          li <= li + 1'b1;
          if (li == 6'd63) begin
            st     <= S_CALC;
            n      <= '0;
            m      <= '0;
            acc_re <= '0;
            acc_im <= '0;
          end
        end
        S_CALC: begin
          m <= m + 1'b1;
          if (m == 6'd63) begin
            acc_re <= '0;
            acc_im <= '0;
            n      <= n + 1'b1;
            if (n == 6'd63) st <= S_DONE;
          end else begin
            acc_re <= sum_re;
            acc_im <= sum_im;
          end
        end
        default: if (release_i) st <= S_LOAD;
      endcase
    end
endmodule
