// Unit test of the radix-4 output stage of the IFFT: random Y_r for every
// n = 0..63 against x[n + 64q] = (1/4) sum_r Y_r exp(j 2 pi r n / 256) j^(rq)
// computed in floating point, within +-2 LSB; one cycle latency.
`timescale 1ns/1ps
module tb_ifft4;
  import moonrake_pkg::*;
  localparam real PI = 3.14159265358979;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, in_valid = 1'b0, out_valid;
  logic [5:0] in_n = '0, out_n;
  cplx_t in_y [4], out_x [4];
  always #5 clk = ~clk;

  ifft4 dut (.clk, .rst_n, .in_valid, .in_n, .in_y, .out_valid, .out_n, .out_x);

  initial begin
    for (int r = 0; r < 4; r++) in_y[r] = '0;
    #1 rst_n = 1'b0;
    #12 rst_n = 1'b1;
    for (int rep = 0; rep < 2; rep++)
      for (int n = 0; n < 64; n++) begin
        real er [4], ei [4];
        @(negedge clk);
        in_valid = 1'b1; in_n = 6'(n);
        for (int r = 0; r < 4; r++) begin
          in_y[r].re = 16'($urandom_range(0, 24000)) - 16'sd12000;
          in_y[r].im = 16'($urandom_range(0, 24000)) - 16'sd12000;
        end
        for (int q = 0; q < 4; q++) begin
          er[q] = 0; ei[q] = 0;
          for (int r = 0; r < 4; r++) begin
            real ph;
            ph = 2.0 * PI * real'(r * n) / 256.0 + PI / 2.0 * real'((r * q) % 4);
            er[q] += real'(in_y[r].re) * $cos(ph) - real'(in_y[r].im) * $sin(ph);
            ei[q] += real'(in_y[r].re) * $sin(ph) + real'(in_y[r].im) * $cos(ph);
          end
          er[q] /= 4.0; ei[q] /= 4.0;
        end
        @(posedge clk); #1;
        checks++;
        if (!out_valid || out_n != 6'(n)) failures++;
        for (int q = 0; q < 4; q++) begin
          real dr, di;
          dr = real'(out_x[q].re) - er[q]; di = real'(out_x[q].im) - ei[q];
          checks++;
          if (dr > 2 || dr < -2 || di > 2 || di < -2) begin
            failures++; $display("n %0d q %0d: (%0d,%0d) vs (%f,%f)", n, q, out_x[q].re, out_x[q].im, er[q], ei[q]);
          end
        end
      end
    @(negedge clk) in_valid = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (out_valid) failures++;
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
