// Output port controller (behavioural model of the asynchronous controller,
// which is a transistor-level hard macro; the word register and toggle flop
// on the synchronous side are ordinary logic).
// Synchronous side: the island offers a word with tx_valid; it is taken at a
// rising clk edge when tx_ready is high, latched into the bundled-data
// register ch_data and a send toggle flips. The asynchronous side then runs a
// four-phase bundled-data handshake: ch_req rises a bundling delay after the
// data settle, the receiver answers ch_ack, ch_req falls, ch_ack falls. To
// report completion the controller pauses its own island clock, flips the
// done toggle while the clock is held low, and releases it; tx_ready (send ==
// done) therefore only changes while the clock is stopped. One word in
// flight per channel. The handshake process starts with the first reset;
// reset is meant to be applied once at power-up.
`timescale 1ns/1ps
module opc #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tx_valid,
  input  logic [W-1:0] tx_data,
  output logic         tx_ready,
  output logic         pause_req,
  input  logic         pause_gnt,
  output logic         ch_req,
  input  logic         ch_ack,
  output logic [W-1:0] ch_data
);
  logic send_t, done_t;
  int unsigned n_words;
  bit armed;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      send_t  <= 1'b0;
      ch_data <= '0;
    end else if (tx_valid && tx_ready) begin
      send_t  <= ~send_t;
      ch_data <= tx_data;
    end

  assign tx_ready = (send_t == done_t);

  initial begin
    done_t    = 1'b0;
    ch_req    = 1'b0;
    pause_req = 1'b0;
    n_words   = 0;
    armed     = 1'b0;
    wait (!rst_n);            // nothing moves before the first reset
    armed     = 1'b1;
    forever begin
      wait (rst_n && (send_t != done_t));
      #0.05 ch_req = 1'b1;          // bundling delay
      wait (ch_ack);
      ch_req = 1'b0;
      wait (!ch_ack);
      pause_req = 1'b1;
      wait (pause_gnt);
      done_t  = ~done_t;
      n_words = n_words + 1;
      #0.02 pause_req = 1'b0;
    end
  end

  // Four-phase rules: data stable while req is high; req never rises before
  // the previous ack has fallen.
  always @(ch_data) if (armed && rst_n) assert (!ch_req) else $error("bundled data changed during request");
  always @(posedge ch_req) if (armed) assert (!ch_ack) else $error("request raised before acknowledge fell");
endmodule
