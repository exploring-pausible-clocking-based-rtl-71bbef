// Input port controller (behavioural model of the asynchronous controller,
// a transistor-level hard macro).
// When ch_req rises, the controller first waits until the island's input data
// register is free (reg_full low; it can only be emptied by the island logic),
// then requests a pause of the island clock. Once granted, with the clock held
// low, it pulses cap to load the bundled data into the register, raises
// ch_ack and releases the clock. It lowers ch_ack after ch_req falls
// (four-phase handshake). Back-pressure is thus carried by withholding ch_ack.
`timescale 1ns/1ps
module ipc (
  input  logic rst_n,
  input  logic ch_req,
  output logic ch_ack,
  input  logic reg_full,
  output logic pause_req,
  input  logic pause_gnt,
  output logic cap
);
  bit armed;

  initial begin
    ch_ack    = 1'b0;
    pause_req = 1'b0;
    cap       = 1'b0;
    armed     = 1'b0;
    wait (!rst_n);            // nothing moves before the first reset
    armed     = 1'b1;
    forever begin
      wait (rst_n && ch_req);
      wait (!reg_full);
      pause_req = 1'b1;
      wait (pause_gnt);
      #0.02 cap = 1'b1;
      #0.03 cap = 1'b0;
      ch_ack    = 1'b1;
      pause_req = 1'b0;
      wait (!ch_req);
      #0.02 ch_ack = 1'b0;
    end
  end

  always @(posedge cap) if (armed) assert (pause_gnt) else $error("capture outside a clock pause");
endmodule
