// Unit test of the BIST PRNG against a bit-serial Galois LFSR model
// (right shift, XOR 0x80200003 when the bit shifted out is 1, 8 steps per
// byte); the state must hold while take is low.
`timescale 1ns/1ps
module tb_bist_prng;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, take = 1'b0;
  logic [7:0] out_data;
  always #5 clk = ~clk;
  bist_prng dut (.clk, .rst_n, .take, .out_data);
  logic [31:0] m = 32'h1;
  initial begin
    #1 rst_n = 1'b0;
    #12 rst_n = 1'b1;
    repeat (500) begin
      @(negedge clk);
      checks++;
      if (out_data != m[7:0]) begin failures++; $display("%h vs %h", out_data, m[7:0]); end
      take = $urandom_range(0, 2) != 0;
      @(posedge clk);
      if (take) for (int i = 0; i < 8; i++) m = m[0] ? ((m >> 1) ^ 32'h8020_0003) : (m >> 1);
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
