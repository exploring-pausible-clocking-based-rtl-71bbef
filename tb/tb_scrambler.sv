// Unit test of the scrambler against a bit-serial model of x^7 + x^4 + 1
// (feedback = s6 ^ s3, output = data ^ feedback, state shifts left), with a
// seed reload on flagged bytes and random stalls on both sides.
`timescale 1ns/1ps
module tb_scrambler;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic in_valid = 1'b0, in_sof = 1'b0, in_ready, out_valid, out_sof, out_ready = 1'b0;
  logic [7:0] in_data = '0, out_data;
  always #5 clk = ~clk;

  scrambler dut (.clk, .rst_n, .seed(7'h5d), .in_valid, .in_data, .in_sof, .in_ready,
                 .out_valid, .out_data, .out_sof, .out_ready);

  logic [7:0] expq [$];
  logic [6:0] s = 7'h7f;   // state after reset
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      logic [7:0] e;
      if (in_sof) s = 7'h5d;
      for (int i = 0; i < 8; i++) begin
        logic fb;
        fb = s[6] ^ s[3];
        e[i] = in_data[i] ^ fb;
        s = {s[5:0], fb};
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
        in_sof   = (i == 0) || ($urandom_range(0, 40) == 0);
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
