// Unit test of the 64-point IFFT unit: three transforms of random complex
// inputs (one a single tone) against a floating-point inverse DFT scaled by
// 1/16, within +-2 LSB. Also checks the transform takes 64 x 64 cycles after
// loading and that results hold until release.
`timescale 1ns/1ps
module tb_ifft64;
  import moonrake_pkg::*;
  localparam real PI = 3.14159265358979;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic in_valid = 1'b0, in_ready, done, release_i = 1'b0;
  cplx_t in_data = '0, rd_data;
  logic [5:0] rd_idx = '0;
  always #5 clk = ~clk;

  ifft64 dut (.clk, .rst_n, .in_valid, .in_data, .in_ready, .done, .rd_idx, .rd_data, .release_i);

  cplx_t x [64];
  initial begin
    #1 rst_n = 1'b0;
    #12 rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++) begin
      int cyc;
      for (int m = 0; m < 64; m++) begin
        if (rep == 1) x[m] = (m == 5) ? '{re: 16'sd8000, im: -16'sd3000} : '0;
        else begin
          x[m].re = 16'($urandom_range(0, 16000)) - 16'sd8000;
          x[m].im = 16'($urandom_range(0, 16000)) - 16'sd8000;
        end
      end
      for (int m = 0; m < 64; m++) begin
        @(negedge clk);
        in_valid = 1'b1; in_data = x[m];
        checks++;
        if (!in_ready) failures++;
      end
      @(negedge clk) in_valid = 1'b0;
      cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc < 4096 || cyc > 4100) begin failures++; $display("took %0d cycles", cyc); end
      repeat (20) @(negedge clk);
      for (int n = 0; n < 64; n++) begin
        real sr, si, er, ei;
        sr = 0; si = 0;
        for (int m = 0; m < 64; m++) begin
          real ph;
          ph = 2.0 * PI * real'((m * n) % 64) / 64.0;
          sr += real'(x[m].re) * $cos(ph) - real'(x[m].im) * $sin(ph);
          si += real'(x[m].re) * $sin(ph) + real'(x[m].im) * $cos(ph);
        end
        sr /= 16.0; si /= 16.0;
        if (sr > 32767) sr = 32767; if (sr < -32768) sr = -32768;
        if (si > 32767) si = 32767; if (si < -32768) si = -32768;
        rd_idx = 6'(n);
        #1;
        er = real'(rd_data.re) - sr; ei = real'(rd_data.im) - si;
        checks++;
        if (er > 2 || er < -2 || ei > 2 || ei < -2) begin
          failures++; $display("rep %0d n %0d: (%0d,%0d) vs (%f,%f)", rep, n, rd_data.re, rd_data.im, sr, si);
        end
      end
      @(negedge clk) release_i = 1'b1;
      @(negedge clk) release_i = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
