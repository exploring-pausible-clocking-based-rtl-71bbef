// Input data register of a GALS channel: holds one received word until the
// island logic takes it. The word and a put toggle are loaded by the capture
// strobe of the input port controller (issued only while the island clock is
// paused); a get toggle flips on the island clock when the logic takes the
// word. full = put ^ get. Because capture happens only with the clock
// stopped, full and q never change close to an island clock edge.
`timescale 1ns/1ps
module input_data_reg #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cap,
  input  logic [W-1:0] d,
  input  logic         take,
  output logic         full,
  output logic [W-1:0] q
);
  logic put_t, get_t;

  always_ff @(posedge cap or negedge rst_n)
    if (!rst_n) begin
      put_t <= 1'b0;
      q     <= '0;
    end else begin
      put_t <= ~put_t;
      q     <= d;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)           get_t <= 1'b0;
    else if (take && full) get_t <= ~get_t;

  assign full = put_t ^ get_t;
endmodule
