// Unit test of the input port controller: a channel sender pushes random
// words; the test stands in for the input data register (set full on cap,
// emptied by the island logic at random clock edges). Checks every word is
// captured once, in order, only while the island clock is paused and low,
// and that no acknowledge is given while the register is still full.
`timescale 1ns/1ps
module tb_ipc;
  localparam int N = 50;
  int checks = 0, failures = 0;
  logic rst_n = 1'b1, clk;
  logic preq, pgnt, cap;
  logic ch_req, ch_ack;
  logic [15:0] ch_data;
  logic reg_full = 1'b0;
  logic [15:0] reg_q;

  pclk_gen #(.NPORT(1)) u_clk (.rst_n, .half_period(16'd1000), .pause_req(preq), .pause_gnt(pgnt), .clk);
  ipc dut (.rst_n, .ch_req, .ch_ack, .reg_full, .pause_req(preq), .pause_gnt(pgnt), .cap);
  ch_sender #(.W(16)) u_tx (.req(ch_req), .ack(ch_ack), .data(ch_data));

  logic [15:0] sent [$], got [$];

  always @(posedge cap) begin
    checks++;
    if (reg_full || clk || !pgnt) begin failures++; $display("bad capture at %0t", $time); end
    reg_q    = ch_data;
    reg_full = 1'b1;
  end
  always @(posedge clk)
    if (reg_full && $urandom_range(0, 3) == 0) begin
      got.push_back(reg_q);
      reg_full <= 1'b0;
    end
  always @(posedge ch_ack) begin
    checks++;
    if (!reg_full) begin failures++; $display("ack without capture"); end
  end

  initial begin
    #0.2 rst_n = 1'b0;
    #5 rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      logic [15:0] w;
      w = 16'($urandom);
      sent.push_back(w);
      u_tx.send(w);
      #($urandom_range(0, 30) * 0.1);
    end
    wait (got.size() == N);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (got[i] != sent[i]) begin failures++; $display("word %0d: %h vs %h", i, got[i], sent[i]); end
    end
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
