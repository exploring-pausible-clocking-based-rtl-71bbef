// Unit test of the FEC encoder against a bit-serial model of the K = 7,
// (133, 171) octal convolutional code: A = u ^ u[-2] ^ u[-3] ^ u[-5] ^ u[-6],
// B = u ^ u[-1] ^ u[-2] ^ u[-3] ^ u[-6], coded word bits 2i/2i+1 = A/B of
// input bit i; memory cleared on flagged bytes; random stalls.
`timescale 1ns/1ps
module tb_fec_encoder;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic in_valid = 1'b0, in_sof = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [7:0] in_data = '0;
  logic [15:0] out_data;
  always #5 clk = ~clk;

  fec_encoder dut (.clk, .rst_n, .in_valid, .in_data, .in_sof, .in_ready,
                   .out_valid, .out_data, .out_ready);

  logic [15:0] expq [$];
  logic [5:0] h = '0;    // h[0] = previous bit
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      logic [15:0] e;
      if (in_sof) h = '0;
      for (int i = 0; i < 8; i++) begin
        logic u;
        u = in_data[i];
        e[2*i]   = u ^ h[1] ^ h[2] ^ h[4] ^ h[5];
        e[2*i+1] = u ^ h[0] ^ h[1] ^ h[2] ^ h[5];
        h = {h[4:0], u};
      end
      expq.push_back(e);
    end
    if (out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0 || out_data != expq[0]) begin failures++; $display("mismatch %h", out_data); end
      if (expq.size() != 0) void'(expq.pop_front());
    end
  end

  initial begin
    #1 rst_n = 1'b0;
    #12 rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      if (!in_valid || in_ready) begin
        in_valid = $urandom_range(0, 3) != 0;
        in_data  = 8'($urandom);
        in_sof   = ($urandom_range(0, 40) == 0);
      end
      out_ready = $urandom_range(0, 3) != 0;
    end
    in_valid = 1'b0;
    out_ready = 1'b1;
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0) failures++;
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
