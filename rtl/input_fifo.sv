// Input data FIFO of the front-end island: single-clock, first-word
// fall-through, valid/ready on both sides. Depth must be a power of two.
// Buffers bytes arriving from the data pads while the rest of the front end
// is held back by flow control. Depth and width are this design's choice.
`timescale 1ns/1ps
module input_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_valid,
  input  logic [W-1:0] wr_data,
  output logic         wr_ready,
  output logic         rd_valid,
  output logic [W-1:0] rd_data,
  input  logic         rd_ready
);
  localparam int AW = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;

  assign wr_ready = (wp - rp) != (AW+1)'(DEPTH);
  assign rd_valid = wp != rp;
  assign rd_data  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) if (wr_valid && wr_ready) mem[wp[AW-1:0]] <= wr_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (wr_valid && wr_ready) wp <= wp + 1'b1;
      if (rd_valid && rd_ready) rp <= rp + 1'b1;
    end
endmodule
