// Test of one interleaver island through its four asynchronous channels,
// with the island clock at its own period. Four symbols are written
// alternately to members 0 and 1; read requests are issued, the first before
// its block is complete. Each read must return the 24 columns of the
// interleaved block, and a free token for the right member must follow.
`timescale 1ns/1ps
module tb_gals_block_il;
  int checks = 0, failures = 0;
  logic rst_n = 1'b1, clk;
  logic wr_req, wr_ack, fr_req, fr_ack, fr_data, rq_req, rq_ack, rq_data, rd_req, rd_ack;
  logic [16:0] wr_data;
  logic [15:0] rd_data;

  gals_block_il dut (.rst_n, .cfg_half_period(16'd1270), .clk,
    .wr_req, .wr_ack, .wr_data, .fr_req, .fr_ack, .fr_data,
    .rq_req, .rq_ack, .rq_data, .rd_req, .rd_ack, .rd_data);

  ch_sender   #(.W(17)) u_wr (.req(wr_req), .ack(wr_ack), .data(wr_data));
  ch_receiver #(.W(1))  u_fr (.req(fr_req), .ack(fr_ack), .data(fr_data));
  ch_sender   #(.W(1))  u_rq (.req(rq_req), .ack(rq_ack), .data(rq_data));
  ch_receiver #(.W(16)) u_rd (.req(rd_req), .ack(rd_ack), .data(rd_data));

  logic [15:0] words [4][24];

  task automatic check_read(int s);
    bit b [384];
    wait (u_rd.q.size() == 24 * (s + 1));
    for (int w = 0; w < 24; w++) for (int i = 0; i < 16; i++) b[w*16 + i] = words[s][w][i];
    for (int c = 0; c < 24; c++) begin
      logic [15:0] e;
      for (int r = 0; r < 16; r++) e[r] = b[r*24 + c];
      checks++;
      if (u_rd.q[s*24 + c] != e) begin failures++; $display("sym %0d col %0d", s, c); end
    end
    wait (u_fr.q.size() == s + 1);
    checks++;
    if (u_fr.q[s] != 1'(s % 2)) begin failures++; $display("free token %0d wrong", s); end
  endtask

  initial begin
    foreach (words[s, w]) words[s][w] = 16'($urandom);
    #0.2 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    fork
      for (int s = 0; s < 4; s++) begin
        if (s >= 2) wait (u_fr.q.size() >= s - 1);     // member free again
        for (int w = 0; w < 24; w++) u_wr.send({1'(s % 2), words[s][w]});
      end
      for (int s = 0; s < 4; s++) begin
        if (s == 0) #20; else wait (u_wr.n_sent >= 24 * (s + 1));
        u_rq.send(1'(s % 2));
        check_read(s);
      end
    join
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
