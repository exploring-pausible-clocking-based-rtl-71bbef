// Unit test of the pausible clock generator: the free-running period follows
// the programmed half period, a request raised while the clock runs is
// granted only with the clock low, and no rising edge occurs until the
// granted request is withdrawn; the count of stretched cycles is checked.
`timescale 1ns/1ps
module tb_pclk_gen;
  int checks = 0, failures = 0;
  logic rst_n = 1'b1, clk;
  logic [15:0] hp = 16'd1000;
  logic [1:0] req = '0, gnt;

  pclk_gen #(.NPORT(2)) dut (.rst_n, .half_period(hp), .pause_req(req), .pause_gnt(gnt), .clk);

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  realtime t0, t1;
  int edges_during_pause = 0;
  bit holding = 0;
  always @(posedge clk) if (holding) edges_during_pause++;

  initial begin
    #0.2 rst_n = 1'b0;
    #5 rst_n = 1'b1;
    foreach (hp_list[i]) begin
      hp = hp_list[i];
      repeat (3) @(posedge clk);
      t0 = $realtime;
      repeat (10) @(posedge clk);
      t1 = $realtime;
      chk((t1 - t0) > 19.99 * hp / 1000.0 && (t1 - t0) < 20.01 * hp / 1000.0, "period = 2 x half period");
    end
    hp = 16'd1000;
    for (int i = 0; i < 10; i++) begin
      int p;
      p = i % 2;
      #($urandom_range(1, 30) * 0.1);
      req[p] = 1'b1;
      wait (gnt[p]);
      chk(clk == 1'b0, "grant only while clock low");
      holding = 1;
      #($urandom_range(5, 50) * 0.1);
      chk(clk == 1'b0, "clock held low during pause");
      holding = 0;
      req[p] = 1'b0;
      @(posedge clk);
      chk(gnt == '0, "grant dropped before edge");
    end
    chk(edges_during_pause == 0, "no edge while paused");
    chk(dut.n_pauses == 10, "ten stretched cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [15:0] hp_list [3] = '{16'd1000, 16'd2500, 16'd700};

  initial begin
    #100us;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
