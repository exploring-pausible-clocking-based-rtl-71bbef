// Unit test of the 4:1 mapper: three symbols of random subcarriers; output j
// must carry input k = 4*(j % 64) + j / 64; random output stalls; input is
// held off while a symbol is being sent.
`timescale 1ns/1ps
module tb_mapper41;
  import moonrake_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  cplx_t in_data = '0, out_data;
  always #5 clk = ~clk;

  mapper41 dut (.clk, .rst_n, .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_ready);

  cplx_t sent [$];
  int n_out = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int s, j, k;
    s = n_out / 256; j = n_out % 256; k = 4 * (j % 64) + j / 64;
    checks++;
    if (out_data != sent[s*256 + k]) begin failures++; $display("sym %0d out %0d", s, j); end
    n_out++;
  end

  initial begin
    #1 rst_n = 1'b0;
    #12 rst_n = 1'b1;
    fork
      while (sent.size() < 768) begin
        @(negedge clk);
        in_valid = $urandom_range(0, 4) != 0;
        in_data  = cplx_t'($urandom);
        @(posedge clk);
        if (in_valid && in_ready) sent.push_back(in_data);
      end
      forever begin @(negedge clk) out_ready = $urandom_range(0, 4) != 0; end
    join_any
    @(negedge clk) in_valid = 1'b0;
    wait (n_out == 768);
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
