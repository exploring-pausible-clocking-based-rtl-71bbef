// Unit test of the block interleaver: 24 random 16-bit words written, every
// column read back and compared bit by bit with input bit r*24 + c.
`timescale 1ns/1ps
module tb_interleaver;
  int checks = 0, failures = 0;
  logic clk = 1'b0, wr_en = 1'b0;
  logic [4:0] wr_idx = '0, rd_idx = '0;
  logic [15:0] wr_word = '0, rd_word;
  always #5 clk = ~clk;

  interleaver #(.ROWS(16), .COLS(24)) dut (.clk, .wr_en, .wr_idx, .wr_word, .rd_idx, .rd_word);

  bit in_bits [384];
  initial begin
    for (int rep = 0; rep < 3; rep++) begin
      for (int w = 0; w < 24; w++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_idx = 5'(w); wr_word = 16'($urandom);
        for (int b = 0; b < 16; b++) in_bits[w*16 + b] = wr_word[b];
      end
      @(negedge clk) wr_en = 1'b0;
      for (int c = 0; c < 24; c++) begin
        rd_idx = 5'(c);
        #1;
        for (int r = 0; r < 16; r++) begin
          checks++;
          if (rd_word[r] != in_bits[r*24 + c]) begin failures++; $display("col %0d row %0d", c, r); end
        end
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
