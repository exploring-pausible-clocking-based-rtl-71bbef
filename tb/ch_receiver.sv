// Test helper: receiving end of a four-phase bundled-data channel. Each
// request is acknowledged after a random delay (up to max_delay ns) while
// enabled; the word is pushed into q.
`timescale 1ns/1ps
module ch_receiver #(
  parameter int W = 16
) (
  input  logic         req,
  output logic         ack,
  input  logic [W-1:0] data
);
  logic [W-1:0] q [$];
  int  max_delay = 3;
  bit  enable    = 1'b1;
  initial begin
    ack = 1'b0;
    #1;                // let the sender settle after power-up
    forever begin
      wait (req && enable);
      #($urandom_range(1, max_delay * 10) * 0.1);
      q.push_back(data);
      ack = 1'b1;
      wait (!req);
      #0.1 ack = 1'b0;
    end
  end
endmodule
