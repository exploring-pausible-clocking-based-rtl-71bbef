// Unit test of the pilot inserter: for 7 symbols it must request interleaver
// s mod 6 (island (s mod 6)/2, member s mod 2), then emit 256 subcarriers:
// zero on k = 0 and 105..151, (A, A) on every 13th used subcarrier starting
// with the 7th, and QPSK of successive bit pairs of the returned words on
// the rest. Words are supplied with random delays, output stalls randomly.
`timescale 1ns/1ps
module tb_pilot_inserter;
  import moonrake_pkg::*;
  localparam int NS = 7;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [2:0] rreq_valid, rreq_ready = '1, rd_valid = '0, rd_take;
  logic rreq_data, mc_ready = 1'b1, sym_start, out_valid, out_ready = 1'b1;
  logic [15:0] rd_data [3];
  cplx_t out_data;
  always #5 clk = ~clk;

  pilot_inserter #(.N_ISL(3)) dut (.clk, .rst_n, .rreq_valid, .rreq_data, .rreq_ready,
    .rd_valid, .rd_data, .rd_take, .mc_ready, .sym_start, .out_valid, .out_data, .out_ready);

  logic [15:0] words [NS][24];
  int n_req = 0, n_out = 0, n_start = 0;
  int cur_isl = -1, widx = 0;

  always @(posedge clk) if (rst_n) begin
    if (sym_start) n_start++;
    if (|(rreq_valid & rreq_ready)) begin
      checks++;
      if (rreq_valid != 3'(1 << ((n_req % 6) / 2)) || rreq_data != 1'((n_req % 6) % 2) || !sym_start) begin
        failures++; $display("request %0d: %b %b", n_req, rreq_valid, rreq_data);
      end
      n_req++;
    end
    if (|(rd_valid & rd_take)) widx++;
    if (out_valid && out_ready) begin
      int s, k, u, d;
      cplx_t e;
      s = n_out / 256; k = n_out % 256;
      if (k == 0 || (k >= 105 && k <= 151)) e = '0;
      else begin
        u = (k <= 104) ? k - 1 : k - 48;
        if (u % 13 == 6) e = '{re: 16'sd11585, im: 16'sd11585};
        else begin
          logic [1:0] b;
          d = u - (u + 7) / 13;          // data index: used index minus pilots so far
          b = words[s][d / 8][2*(d % 8) +: 2];
          e.re = b[0] ? -16'sd11585 : 16'sd11585;
          e.im = b[1] ? -16'sd11585 : 16'sd11585;
        end
      end
      checks++;
      if (out_data != e) begin failures++; if (failures < 5) $display("sym %0d k %0d", s, k); end
      n_out++;
    end
  end

  // word supply for the requested island
  initial begin
    foreach (words[s, w]) words[s][w] = 16'($urandom);
    rd_data[0] = '0; rd_data[1] = '0; rd_data[2] = '0;
    #1 rst_n = 1'b0;
    #12 rst_n = 1'b1;
    for (int s = 0; s < NS; s++) begin
      wait (n_req > s);
      for (int w = 0; w < 24; w++) begin
        repeat ($urandom_range(0, 6)) @(negedge clk);
        @(negedge clk);
        rd_valid = 3'(1 << ((s % 6) / 2));
        rd_data[(s % 6) / 2] = words[s][w];
        wait (widx == s * 24 + w + 1);
        @(negedge clk) rd_valid = '0;
      end
    end
  end
  initial forever begin @(negedge clk); out_ready = $urandom_range(0, 4) != 0; mc_ready = $urandom_range(0, 3) != 0; end

  initial begin
    wait (n_out == NS * 256);
    checks++;
    if (n_start != NS) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms;
    $display("watchdog %0d", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
