// Unit test of the interleaver interface: 10 symbols of coded words. Symbol s
// must go, word for word, to island (s mod 6) / 2 tagged with member s mod 2.
// The 7th symbol must wait until its interleaver has been freed; free tokens
// are returned by the test some time after each symbol is complete.
`timescale 1ns/1ps
module tb_il_interface;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic in_valid = 1'b0, in_ready;
  logic [15:0] in_data = '0;
  logic [2:0] wr_valid, wr_ready = '0, free_valid = '0, free_data = '0, free_take;
  logic [16:0] wr_data;
  always #5 clk = ~clk;

  il_interface #(.N_ISL(3), .WORDS_PER_SYM(24)) dut (
    .clk, .rst_n, .in_valid, .in_data, .in_ready, .wr_valid, .wr_data, .wr_ready,
    .free_valid, .free_data, .free_take);

  int n_acc = 0, n_out = 0, n_wait_free = 0;
  bit freed [6];
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) n_acc++;
    if (wr_valid & wr_ready) begin
      int s, t;
      s = n_out / 24; t = s % 6;
      checks++;
      if (wr_valid != 3'(1 << (t / 2)) || wr_data != {1'(t % 2), 16'(n_out)}) begin
        failures++; $display("word %0d: valid %b data %h", n_out, wr_valid, wr_data);
      end
      if (s >= 6) begin
        checks++;
        if (!freed[t]) begin failures++; $display("symbol %0d sent before interleaver %0d freed", s, t); end
      end
      n_out++;
    end
    if (in_valid && !in_ready && n_out % 24 == 0 && n_out >= 144 && wr_ready != 0) n_wait_free++;
  end
  always @(posedge clk) if (in_valid && in_ready) in_data <= in_data + 1'b1;

  initial begin
    #1 rst_n = 1'b0;
    #12 rst_n = 1'b1;
    fork
      begin
        @(negedge clk) in_valid = 1'b1;
        wait (n_acc == 240);
        @(negedge clk) in_valid = 1'b0;
      end
      forever begin @(negedge clk) wr_ready = 3'($urandom); end
      begin
        // free interleaver t once its symbol (t) is fully written, after a delay
        for (int s = 0; s < 4; s++) begin
          wait (n_out >= (s + 1) * 24);
          repeat (100) @(posedge clk);
          @(negedge clk);
          free_valid[(s % 6) / 2] = 1'b1;
          free_data[(s % 6) / 2]  = 1'((s % 6) % 2);
          freed[s % 6] = 1'b1;
          @(negedge clk) free_valid = '0;
        end
      end
    join_any
    wait (n_out == 240);
    checks++;
    if (n_wait_free == 0) begin failures++; $display("never waited for a free interleaver"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms;
    $display("watchdog %0d", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
