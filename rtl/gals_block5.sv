// GALS island 5: the four 64-point IFFT units of the 256-point IFFT.
// Subcarriers arrive in group-major order (group r = X[4m + r]); the first 64
// words load unit 0, the next 64 unit 1, and so on, each unit starting its
// transform as soon as it is loaded. When all four are done the island sends
// the 256 results to island 6 in n-major order, word 4n + r carrying Y_r[n],
// so the final radix-4 stage can work on one n at a time; then it releases
// the units for the next symbol. One IPC in, one OPC out.
`timescale 1ns/1ps
module gals_block5
  import moonrake_pkg::*;
(
  input  logic        rst_n,
  input  logic [15:0] cfg_half_period,
  output logic        clk,
  input  logic        sc_req,
  output logic        sc_ack,
  input  logic [31:0] sc_data,
  output logic        y_req,
  input  logic        y_ack,
  output logic [31:0] y_data
);
  logic [1:0] preq, pgnt;
  pclk_gen #(.NPORT(2)) u_clk (.rst_n, .half_period(cfg_half_period),
                               .pause_req(preq), .pause_gnt(pgnt), .clk);

  logic        i_valid, i_take;
  logic [31:0] i_data;
  logic        o_valid, o_ready;
  cplx_t       o_data;
  gals_in_port #(.W(32)) u_in (.clk, .rst_n, .ch_req(sc_req), .ch_ack(sc_ack), .ch_data(sc_data),
                               .pause_req(preq[0]), .pause_gnt(pgnt[0]),
                               .rx_valid(i_valid), .rx_data(i_data), .rx_ready(i_take));
  opc #(.W(32)) u_out (.clk, .rst_n, .tx_valid(o_valid), .tx_data(o_data), .tx_ready(o_ready),
                       .pause_req(preq[1]), .pause_gnt(pgnt[1]),
                       .ch_req(y_req), .ch_ack(y_ack), .ch_data(y_data));

  logic [7:0] li, oi;
  logic [3:0] u_ready, u_done;
  cplx_t      u_rd [4];
  logic       rel;

  for (genvar r = 0; r < 4; r++) begin : g_fft
    ifft64 u_fft (.clk, .rst_n, .in_valid(i_valid && li[7:6] == 2'(r)), .in_data(i_data),
                  .in_ready(u_ready[r]), .done(u_done[r]), .rd_idx(oi[7:2]), .rd_data(u_rd[r]),
                  .release_i(rel));
  end

  assign i_take  = i_valid && u_ready[li[7:6]];
  assign o_valid = &u_done && !rel;
  assign o_data  = u_rd[oi[1:0]];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      li  <= '0;
      oi  <= '0;
      rel <= 1'b0;
    end else begin
      rel <= 1'b0;
      if (i_take) li <= li + 1'b1;
      if (o_valid && o_ready) begin
        oi <= oi + 1'b1;
        if (oi == 8'd255) rel <= 1'b1;
      end
    end
endmodule
