// Test of the output island through its channels: for two symbols, 256
// random first-stage results (n-major) and a control word are sent; the
// island must play out 320 samples (cyclic prefix of 64, then 256) matching
// x[n + 64q] = (1/4) sum_r Y_r[n] exp(j 2 pi r n / 256) j^(rq) within
// +-2 LSB, flag start of symbol and end of frame (second symbol is last),
// and return one symbol-done token per symbol.
`timescale 1ns/1ps
module tb_gals_block6;
  import moonrake_pkg::*;
  localparam real PI = 3.14159265358979;
  int checks = 0, failures = 0;
  logic rst_n = 1'b1, clk;
  logic y_req, y_ack, ct_req, ct_ack, tk_req, tk_ack, tk_data, out_valid, out_sos, out_eof;
  logic [31:0] y_data;
  logic [16:0] ct_data;
  cplx_t out_data;

  gals_block6 dut (.rst_n, .cfg_half_period(16'd1050), .clk, .y_req, .y_ack, .y_data,
                   .ct_req, .ct_ack, .ct_data, .tk_req, .tk_ack, .tk_data,
                   .out_valid, .out_data, .out_sos, .out_eof);
  ch_sender   #(.W(32)) u_y  (.req(y_req), .ack(y_ack), .data(y_data));
  ch_sender   #(.W(17)) u_ct (.req(ct_req), .ack(ct_ack), .data(ct_data));
  ch_receiver #(.W(1))  u_tk (.req(tk_req), .ack(tk_ack), .data(tk_data));

  cplx_t y [2][256];
  real xr [2][256], xi [2][256];
  int n_out = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    int s, p, t;
    real dr, di;
    s = n_out / 320; p = n_out % 320; t = (p < 64) ? p + 192 : p - 64;
    dr = real'(out_data.re) - xr[s][t]; di = real'(out_data.im) - xi[s][t];
    checks++;
    if (dr > 2 || dr < -2 || di > 2 || di < -2 || out_sos != (p == 0) || out_eof != (s == 1 && p == 319)) begin
      failures++; if (failures < 5) $display("s %0d p %0d: (%0d,%0d) vs (%f,%f)", s, p, out_data.re, out_data.im, xr[s][t], xi[s][t]);
    end
    n_out++;
  end

  initial begin
    foreach (y[s, j]) begin
      y[s][j].re = 16'($urandom_range(0, 16000)) - 16'sd8000;
      y[s][j].im = 16'($urandom_range(0, 16000)) - 16'sd8000;
    end
    foreach (xr[s, t]) begin
      int n, q;
      n = t % 64; q = t / 64;
      xr[s][t] = 0; xi[s][t] = 0;
      for (int r = 0; r < 4; r++) begin
        real ph;
        ph = 2.0 * PI * real'(r * n) / 256.0 + PI / 2.0 * real'((r * q) % 4);
        xr[s][t] += real'(y[s][4*n + r].re) * $cos(ph) - real'(y[s][4*n + r].im) * $sin(ph);
        xi[s][t] += real'(y[s][4*n + r].re) * $sin(ph) + real'(y[s][4*n + r].im) * $cos(ph);
      end
      xr[s][t] /= 4.0; xi[s][t] /= 4.0;
    end
    #0.2 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    fork
      for (int s = 0; s < 2; s++) for (int j = 0; j < 256; j++) u_y.send(y[s][j]);
      for (int s = 0; s < 2; s++) u_ct.send({1'(s), 16'(s)});
    join
    wait (u_tk.q.size() == 2);
    checks++;
    if (n_out != 640) begin failures++; $display("%0d samples", n_out); end
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
