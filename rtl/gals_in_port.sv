// Receiving end of a GALS channel: input port controller plus input data
// register. To the island logic it is a valid/ready source: rx_valid is high
// while a word waits in the register, and the word is taken at a rising clk
// edge with rx_ready high.
`timescale 1ns/1ps
module gals_in_port #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ch_req,
  output logic         ch_ack,
  input  logic [W-1:0] ch_data,
  output logic         pause_req,
  input  logic         pause_gnt,
  output logic         rx_valid,
  output logic [W-1:0] rx_data,
  input  logic         rx_ready
);
  logic cap, full;

  ipc u_ipc (.rst_n, .ch_req, .ch_ack, .reg_full(full), .pause_req, .pause_gnt, .cap);
  input_data_reg #(.W(W)) u_reg (.clk, .rst_n, .cap, .d(ch_data), .take(rx_ready), .full, .q(rx_data));

  assign rx_valid = full;
endmodule
