// Test helper: sending end of a four-phase bundled-data channel. send(w)
// waits until the previous handshake is finished, drives the data, raises req
// after a short bundling delay and completes the handshake. n_sent counts
// completed words.
`timescale 1ns/1ps
module ch_sender #(
  parameter int W = 16
) (
  output logic         req,
  input  logic         ack,
  output logic [W-1:0] data
);
  int n_sent = 0;
  semaphore lock = new(1);
  initial begin
    req  = 1'b0;
    data = '0;
  end

  task automatic send(input logic [W-1:0] w);
    lock.get(1);
    data = w;
    #0.1 req = 1'b1;
    wait (ack);
    #($urandom_range(0, 5) * 0.1) req = 1'b0;
    wait (!ack);
    n_sent++;
    lock.put(1);
  endtask
endmodule
