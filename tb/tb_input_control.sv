// Unit test of the input controller: with CREDITS = 2 and 24-byte symbols
// exactly 48 bytes pass before the stream stalls; each token admits one more
// symbol. Bytes pass unchanged and in order; out_sof marks the first byte of
// each frame (frame_len = 3 symbols).
`timescale 1ns/1ps
module tb_input_control;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic tok_valid = 1'b0, tok_take;
  logic in_valid = 1'b1, in_ready, out_valid, out_sof, out_ready = 1'b1;
  logic [7:0] in_data = '0, out_data;
  always #5 clk = ~clk;

  input_control #(.BYTES_PER_SYM(24), .CREDITS(2)) dut (
    .clk, .rst_n, .frame_len(16'd3), .tok_valid, .tok_take, .in_valid, .in_data, .in_ready,
    .out_valid, .out_data, .out_sof, .out_ready);

  int n_out = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (out_data != 8'(n_out)) begin failures++; $display("byte %0d is %0d", n_out, out_data); end
    checks++;
    if (out_sof != ((n_out % 72) == 0)) begin failures++; $display("sof wrong at byte %0d", n_out); end
    n_out++;
  end
  always @(posedge clk) if (rst_n && in_valid && in_ready) in_data <= in_data + 1'b1;

  task automatic expect_count(int n);
    repeat (60) @(posedge clk);
    checks++;
    if (n_out != n) begin failures++; $display("expected %0d bytes, got %0d", n, n_out); end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #12 rst_n = 1'b1;
    expect_count(48);
    for (int s = 0; s < 5; s++) begin
      @(negedge clk) tok_valid = 1'b1;
      @(negedge clk) tok_valid = 1'b0;
      // random output stalls inside the symbol
      fork
        repeat (40) begin @(negedge clk) out_ready = $urandom_range(0, 1); end
      join
      out_ready = 1'b1;
      expect_count(48 + 24 * (s + 1));
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
