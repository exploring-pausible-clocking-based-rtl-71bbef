// Unit test of the channel input data register: words strobed in with cap
// must appear on q with full set, stay until taken on clk, and full must clear
// exactly when taken.
`timescale 1ns/1ps
module tb_input_data_reg;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, cap = 1'b0, take = 1'b0, full;
  logic [15:0] d = '0, q;
  always #5 clk = ~clk;

  input_data_reg #(.W(16)) dut (.clk, .rst_n, .cap, .d, .take, .full, .q);

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #12 rst_n = 1'b1;
    chk(!full, "empty after reset");
    for (int i = 0; i < 20; i++) begin
      logic [15:0] w;
      int hold;
      w = 16'($urandom);
      @(negedge clk);
      d = w;
      #1 cap = 1'b1;
      #1 cap = 1'b0;
      d = ~w;                      // data may change after capture
      chk(full, "full after capture");
      hold = $urandom_range(0, 3);
      repeat (hold) begin
        @(posedge clk); #1;
        chk(full && q == w, "word held until taken");
      end
      @(negedge clk) take = 1'b1;
      @(posedge clk); #1 take = 1'b0;
      chk(!full, "empty after take");
      chk(q == w, "q keeps last word");
    end
    // take while empty must not change state
    @(negedge clk) take = 1'b1;
    @(posedge clk); #1 take = 1'b0;
    chk(!full, "take on empty register ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
