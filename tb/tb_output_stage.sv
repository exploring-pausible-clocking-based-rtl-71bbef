// Unit test of the output stage: a symbol written as 64 groups of four
// samples is played out as x[192..255] followed by x[0..255], 320 samples on
// consecutive clocks, with out_sos on the first, out_eof on the last only for
// a symbol started with last set, and done one clock after the last sample.
`timescale 1ns/1ps
module tb_output_stage;
  import moonrake_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, wr_en = 1'b0, start = 1'b0, last = 1'b0;
  logic busy, done, out_valid, out_sos, out_eof;
  logic [5:0] wr_n = '0;
  cplx_t wr_x [4], out_data;
  always #5 clk = ~clk;

  output_stage #(.NCP_P(64)) dut (.clk, .rst_n, .wr_en, .wr_n, .wr_x, .start, .last, .busy, .done,
                                  .out_valid, .out_data, .out_sos, .out_eof);
  cplx_t x [256];
  initial begin
    for (int q = 0; q < 4; q++) wr_x[q] = '0;
    #1 rst_n = 1'b0;
    #12 rst_n = 1'b1;
    for (int rep = 0; rep < 2; rep++) begin
      foreach (x[t]) x[t] = cplx_t'($urandom);
      for (int n = 0; n < 64; n++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_n = 6'(n);
        for (int q = 0; q < 4; q++) wr_x[q] = x[n + 64*q];
      end
      @(negedge clk) wr_en = 1'b0;
      start = 1'b1; last = 1'(rep);
      @(negedge clk) start = 1'b0;
      for (int p = 0; p < 320; p++) begin
        int t;
        t = (p < 64) ? p + 192 : p - 64;
        checks++;
        if (!out_valid || out_data != x[t] || out_sos != (p == 0) || out_eof != (rep == 1 && p == 319)) begin
          failures++; $display("rep %0d p %0d", rep, p);
        end
        @(negedge clk);
      end
      checks++;
      if (out_valid || !done) failures++;
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
