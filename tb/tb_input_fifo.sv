// Unit test of the input FIFO against a queue model with random pushes and
// pops, including runs that fill it (wr_ready low at DEPTH words) and drain it.
`timescale 1ns/1ps
module tb_input_fifo;
  localparam int DEPTH = 64;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic wr_valid = 1'b0, wr_ready, rd_valid, rd_ready = 1'b0;
  logic [7:0] wr_data = '0, rd_data;
  always #5 clk = ~clk;

  input_fifo #(.W(8), .DEPTH(DEPTH)) dut (.clk, .rst_n, .wr_valid, .wr_data, .wr_ready,
                                          .rd_valid, .rd_data, .rd_ready);
  logic [7:0] model [$];
  int n_full = 0;

  initial begin
    #1 rst_n = 1'b0;
    #12 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      int phase;
      phase = (i / 300) % 3;      // fill-biased, drain-biased, balanced
      @(negedge clk);
      wr_valid = $urandom_range(0, 9) < (phase == 0 ? 9 : phase == 1 ? 2 : 5);
      wr_data  = 8'($urandom);
      rd_ready = $urandom_range(0, 9) < (phase == 0 ? 2 : phase == 1 ? 9 : 5);
      checks++;
      if (wr_ready != (model.size() < DEPTH) || rd_valid != (model.size() > 0)) begin
        failures++; $display("flags wrong at size %0d", model.size());
      end
      if (rd_valid) begin
        checks++;
        if (rd_data != model[0]) begin failures++; $display("data %h vs %h", rd_data, model[0]); end
      end
      if (!wr_ready) n_full++;
      @(posedge clk);
      if (rd_valid && rd_ready) void'(model.pop_front());
      if (wr_valid && wr_ready) model.push_back(wr_data);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("never full"); end
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
