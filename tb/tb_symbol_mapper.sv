// Unit test of the QPSK symbol mapper: all four bit pairs.
`timescale 1ns/1ps
module tb_symbol_mapper;
  import moonrake_pkg::*;
  int checks = 0, failures = 0;
  logic [1:0] bits;
  cplx_t sym;
  symbol_mapper dut (.bits, .sym);
  initial begin
    for (int b = 0; b < 4; b++) begin
      bits = 2'(b);
      #1;
      checks++;
      if (sym.re != (b[0] ? -16'sd11585 : 16'sd11585) || sym.im != (b[1] ? -16'sd11585 : 16'sd11585)) begin
        failures++; $display("bits %0d -> %0d %0d", b, sym.re, sym.im);
      end
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
