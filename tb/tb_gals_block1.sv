// Test of the front-end island through its 15 channels. The test plays the
// other islands: each interleaver island stores the words it is sent per
// member and, on a read request, returns them unchanged (no permutation)
// followed by a free token; island 5 collects subcarriers; island 6 collects
// control words and returns a symbol-done token per symbol. For 8 symbols of
// random input bytes the subcarriers must equal a reference built here
// (scrambler, convolutional code, QPSK, subcarrier plan, group-major order),
// and the control words must number the symbols of 3-symbol frames.
`timescale 1ns/1ps
module tb_gals_block1;
  import moonrake_pkg::*;
  localparam int NS = 8, FLEN = 3, A = 11585;
  int checks = 0, failures = 0;
  logic rst_n = 1'b1, clk;
  logic in_valid = 1'b0, in_ready;
  logic [7:0] in_data = '0;
  logic wr_req [3], wr_ack [3], fr_req [3], fr_ack [3], fr_data [3];
  logic rq_req [3], rq_ack [3], rq_data [3], rd_req [3], rd_ack [3];
  logic [16:0] wr_data [3];
  logic [15:0] rd_data [3];
  logic sc_req, sc_ack, ct_req, ct_ack, tk_req, tk_ack, tk_data;
  logic [31:0] sc_data;
  logic [16:0] ct_data;

  gals_block1 dut (.rst_n, .cfg_half_period(16'd1000), .cfg_frame_len(16'(FLEN)), .cfg_scr_seed(7'h2b),
    .clk, .in_valid, .in_data, .in_ready,
    .wr_req, .wr_ack, .wr_data, .fr_req, .fr_ack, .fr_data, .rq_req, .rq_ack, .rq_data,
    .rd_req, .rd_ack, .rd_data, .sc_req, .sc_ack, .sc_data, .ct_req, .ct_ack, .ct_data,
    .tk_req, .tk_ack, .tk_data);

  ch_receiver #(.W(32)) u_sc (.req(sc_req), .ack(sc_ack), .data(sc_data));
  ch_receiver #(.W(17)) u_ct (.req(ct_req), .ack(ct_ack), .data(ct_data));
  ch_sender   #(.W(1))  u_tk (.req(tk_req), .ack(tk_ack), .data(tk_data));

  for (genvar i = 0; i < 3; i++) begin : g_isl
    ch_receiver #(.W(17)) u_wr (.req(wr_req[i]), .ack(wr_ack[i]), .data(wr_data[i]));
    ch_sender   #(.W(1))  u_fr (.req(fr_req[i]), .ack(fr_ack[i]), .data(fr_data[i]));
    ch_receiver #(.W(1))  u_rq (.req(rq_req[i]), .ack(rq_ack[i]), .data(rq_data[i]));
    ch_sender   #(.W(16)) u_rd (.req(rd_req[i]), .ack(rd_ack[i]), .data(rd_data[i]));
    // interleaver island stand-in: identity "interleaver"
    initial begin
      int nrq, taken [2];
      nrq = 0; taken[0] = 0; taken[1] = 0;
      forever begin
        logic mbr;
        int have;
        wait (u_rq.q.size() > nrq);
        mbr = u_rq.q[nrq];
        nrq++;
        do begin
          have = 0;
          foreach (u_wr.q[j]) if (u_wr.q[j][16] == mbr) have++;
          if (have < taken[mbr] + 24) #5;
        end while (have < taken[mbr] + 24);
        begin
          int cnt;
          cnt = 0;
          foreach (u_wr.q[j]) if (u_wr.q[j][16] == mbr) begin
            if (cnt >= taken[mbr] && cnt < taken[mbr] + 24) u_rd.send(u_wr.q[j][15:0]);
            cnt++;
          end
        end
        taken[mbr] += 24;
        u_fr.send(mbr);
      end
    end
  end

  byte unsigned bytes [NS*24];
  cplx_t ref_sc [NS][256];

  task automatic build_ref();
    bit [6:0] scr;
    bit [5:0] h;
    for (int s = 0; s < NS; s++) begin
      bit c [384];
      int d;
      if (s % FLEN == 0) begin scr = 7'h2b; h = '0; end
      for (int b = 0; b < 24; b++)
        for (int i = 0; i < 8; i++) begin
          bit fb, u;
          fb = scr[6] ^ scr[3];
          u = bytes[s*24 + b][i] ^ fb;
          scr = {scr[5:0], fb};
          c[(b*8 + i)*2]     = u ^ h[1] ^ h[2] ^ h[4] ^ h[5];
          c[(b*8 + i)*2 + 1] = u ^ h[0] ^ h[1] ^ h[2] ^ h[5];
          h = {h[4:0], u};
        end
      d = 0;
      for (int k = 0; k < 256; k++) begin
        int u;
        cplx_t e;
        u = (k <= 104) ? k - 1 : k - 48;
        if (k == 0 || (k >= 105 && k <= 151)) e = '0;
        else if (u % 13 == 6) e = '{re: 16'(A), im: 16'(A)};
        else begin
          e.re = c[2*d] ? -16'(A) : 16'(A);
          e.im = c[2*d + 1] ? -16'(A) : 16'(A);
          d++;
        end
        ref_sc[s][k] = e;
      end
    end
  endtask

  initial begin
    foreach (bytes[i]) bytes[i] = 8'($urandom);
    build_ref();
    #0.2 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    fork
      for (int i = 0; i < NS * 24; i++) begin
        @(negedge clk);
        in_valid = 1'b1; in_data = bytes[i];
        do @(posedge clk); while (!in_ready);
        #0.01 in_valid = 1'b0;
      end
      for (int s = 0; s < NS; s++) begin
        wait (u_sc.q.size() == 256 * (s + 1));
        u_tk.send(1'b1);
      end
    join
    for (int s = 0; s < NS; s++) begin
      for (int j = 0; j < 256; j++) begin
        int k;
        k = 4 * (j % 64) + j / 64;
        checks++;
        if (u_sc.q[256*s + j] != ref_sc[s][k]) begin
          failures++; if (failures < 5) $display("sym %0d word %0d (k %0d)", s, j, k);
        end
      end
      checks++;
      if (u_ct.q[s] != {(s % FLEN) == FLEN - 1, 16'(s % FLEN)}) begin failures++; $display("ctl %0d = %h", s, u_ct.q[s]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2ms;
    $display("watchdog %0d", u_sc.q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
