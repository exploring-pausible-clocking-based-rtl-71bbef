// Middle controller: counts the OFDM symbols of a frame and, when the pilot
// inserter starts a symbol, queues a control word {last, number} for the
// output stage in island 6 (last marks the final symbol of a frame of
// frame_len symbols). One word is held; ready is low while it waits for its
// channel. The contents of the control word are this design's choice.
`timescale 1ns/1ps
module middle_control (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] frame_len,
  input  logic        sym_start,
  output logic        ready,
  output logic        ctl_valid,
  output logic [16:0] ctl_data,
  input  logic        ctl_ready
);
  logic [15:0] num;

  assign ready = !ctl_valid;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      num       <= '0;
      ctl_valid <= 1'b0;
      ctl_data  <= '0;
    end else begin
      if (ctl_valid && ctl_ready) ctl_valid <= 1'b0;
      if (sym_start && ready) begin
        ctl_valid <= 1'b1;
        ctl_data  <= {(num + 1'b1 >= frame_len), num};
        num       <= (num + 1'b1 >= frame_len) ? 16'd0 : num + 1'b1;
      end
    end
endmodule
