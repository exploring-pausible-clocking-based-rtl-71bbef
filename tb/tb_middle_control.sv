// Unit test of the middle controller: each accepted symbol start yields one
// control word {last, number}; numbers count 0..frame_len-1 and last marks the
// final one; no new start is accepted while a word waits (ready low).
`timescale 1ns/1ps
module tb_middle_control;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic sym_start = 1'b0, ready, ctl_valid, ctl_ready = 1'b0;
  logic [16:0] ctl_data;
  always #5 clk = ~clk;

  middle_control dut (.clk, .rst_n, .frame_len(16'd5), .sym_start, .ready, .ctl_valid, .ctl_data, .ctl_ready);

  int n_start = 0, n_word = 0;
  always @(posedge clk) if (rst_n) begin
    if (sym_start && ready) n_start++;
    if (ctl_valid && ctl_ready) begin
      checks++;
      if (ctl_data != {(n_word % 5) == 4, 16'(n_word % 5)}) begin
        failures++; $display("word %0d = %h", n_word, ctl_data);
      end
      n_word++;
    end
  end

  initial begin
    #1 rst_n = 1'b0;
    #12 rst_n = 1'b1;
    repeat (400) begin
      @(negedge clk);
      sym_start = $urandom_range(0, 3) == 0;
      ctl_ready = $urandom_range(0, 2) == 0;
    end
    @(negedge clk) sym_start = 1'b0; ctl_ready = 1'b1;
    repeat (3) @(posedge clk);
    checks++;
    if (n_word != n_start || n_word < 20) begin failures++; $display("%0d starts %0d words", n_start, n_word); end
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
