// Unit test of the MISR against a model: sig = (sig << 1) ^ (msb ? 0x04C11DB7
// : 0) ^ word for every enabled cycle; clear returns it to zero.
`timescale 1ns/1ps
module tb_bist_misr;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, clear = 1'b0, en = 1'b0;
  logic [31:0] in_data = '0, sig;
  always #5 clk = ~clk;
  bist_misr dut (.clk, .rst_n, .clear, .en, .in_data, .sig);
  logic [31:0] m = '0;
  initial begin
    #1 rst_n = 1'b0;
    #12 rst_n = 1'b1;
    repeat (500) begin
      @(negedge clk);
      checks++;
      if (sig != m) begin failures++; $display("%h vs %h", sig, m); end
      en = $urandom_range(0, 2) != 0;
      clear = $urandom_range(0, 60) == 0;
      in_data = $urandom;
      @(posedge clk);
      if (clear) m = '0;
      else if (en) m = ({m[30:0], 1'b0} ^ (m[31] ? 32'h04C1_1DB7 : 32'h0)) ^ in_data;
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
