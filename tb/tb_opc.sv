// Unit test of the output port controller in a paused-clock island: island
// logic offers random words at random times; a channel receiver with random
// acknowledge delays collects them. Checks the words arrive in order and
// intact, one word at a time (tx_ready low while a word is in flight), and
// that the controller paused its clock once per word.
`timescale 1ns/1ps
module tb_opc;
  localparam int N = 60;
  int checks = 0, failures = 0;
  logic rst_n = 1'b1, clk;
  logic preq, pgnt;
  logic tx_valid = 1'b0, tx_ready;
  logic [15:0] tx_data = '0;
  logic ch_req, ch_ack;
  logic [15:0] ch_data;

  pclk_gen #(.NPORT(1)) u_clk (.rst_n, .half_period(16'd1000), .pause_req(preq), .pause_gnt(pgnt), .clk);
  opc #(.W(16)) dut (.clk, .rst_n, .tx_valid, .tx_data, .tx_ready, .pause_req(preq), .pause_gnt(pgnt),
                     .ch_req, .ch_ack, .ch_data);
  ch_receiver #(.W(16)) u_rx (.req(ch_req), .ack(ch_ack), .data(ch_data));

  logic [15:0] sent [$];
  int in_flight = 0;

  initial begin
    #0.2 rst_n = 1'b0;
    #5 rst_n = 1'b1;
    while (sent.size() < N) begin
      @(negedge clk);
      if (!tx_valid && $urandom_range(0, 2) == 0) begin
        tx_valid = 1'b1;
        tx_data  = 16'($urandom);
      end
      @(posedge clk);
      if (tx_valid && tx_ready) begin
        sent.push_back(tx_data);
        #0.01 tx_valid = 1'b0;
      end
    end
    wait (u_rx.q.size() == N && dut.n_words == N);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (u_rx.q[i] != sent[i]) begin failures++; $display("word %0d: %h vs %h", i, u_rx.q[i], sent[i]); end
    end
    checks++;
    if (dut.n_words != N) failures++;
    checks++;
    if (u_clk.n_pauses != N) begin failures++; $display("pauses %0d", u_clk.n_pauses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // tx_ready must stay low from acceptance until the handshake finished
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (tx_ready && (ch_req || ch_ack)) begin failures++; $display("ready during handshake"); end
  end

  initial begin
    #100us;
    $display("watchdog %0d %0d %0d", sent.size(), u_rx.q.size(), dut.n_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
