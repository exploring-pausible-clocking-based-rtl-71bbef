// Test of the IFFT island through its channels: two symbols of 256 random
// subcarriers (group-major: word 64r + m is input m of unit r) are sent; the
// 256 results must come back n-major (word 4n + r = Y_r[n]) and match a
// floating-point 64-point inverse DFT scaled by 1/16 within +-2 LSB.
`timescale 1ns/1ps
module tb_gals_block5;
  import moonrake_pkg::*;
  localparam real PI = 3.14159265358979;
  int checks = 0, failures = 0;
  logic rst_n = 1'b1, clk;
  logic sc_req, sc_ack, y_req, y_ack;
  logic [31:0] sc_data, y_data;

  gals_block5 dut (.rst_n, .cfg_half_period(16'd900), .clk, .sc_req, .sc_ack, .sc_data,
                   .y_req, .y_ack, .y_data);
  ch_sender   #(.W(32)) u_tx (.req(sc_req), .ack(sc_ack), .data(sc_data));
  ch_receiver #(.W(32)) u_rx (.req(y_req), .ack(y_ack), .data(y_data));

  cplx_t x [2][256];
  initial begin
    foreach (x[s, j]) begin
      x[s][j].re = 16'($urandom_range(0, 16000)) - 16'sd8000;
      x[s][j].im = 16'($urandom_range(0, 16000)) - 16'sd8000;
    end
    #0.2 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    fork
      for (int s = 0; s < 2; s++) for (int j = 0; j < 256; j++) u_tx.send(x[s][j]);
    join_none
    for (int s = 0; s < 2; s++) begin
      wait (u_rx.q.size() == 256 * (s + 1));
      for (int n = 0; n < 64; n++)
        for (int r = 0; r < 4; r++) begin
          real sr, si, er, ei;
          cplx_t g;
          sr = 0; si = 0;
          for (int m = 0; m < 64; m++) begin
            real ph;
            ph = 2.0 * PI * real'((m * n) % 64) / 64.0;
            sr += real'(x[s][64*r + m].re) * $cos(ph) - real'(x[s][64*r + m].im) * $sin(ph);
            si += real'(x[s][64*r + m].re) * $sin(ph) + real'(x[s][64*r + m].im) * $cos(ph);
          end
          sr /= 16.0; si /= 16.0;
          g = u_rx.q[256*s + 4*n + r];
          er = real'(g.re) - sr; ei = real'(g.im) - si;
          checks++;
          if (er > 2 || er < -2 || ei > 2 || ei < -2) begin
            failures++; if (failures < 5) $display("s %0d n %0d r %0d", s, n, r);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2ms;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
