// Interleaver interface: distributes whole symbols of coded words round-robin
// over the six interleavers (interleaver t sits in interleaver island t/2 as
// member t%2). A symbol goes to interleaver t only while t is marked free; the
// interface then sends WORDS_PER_SYM words, tagged with the member bit, to
// that island's channel and clears the mark. The island returns a free token
// (the member bit) once it has read the interleaver out. The split of the
// channels into data words and free tokens is this design's choice.
`timescale 1ns/1ps
module il_interface #(
  parameter int N_ISL         = 3,
  parameter int WORDS_PER_SYM = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [15:0]      in_data,
  output logic             in_ready,
  output logic [N_ISL-1:0] wr_valid,     // one channel per island
  output logic [16:0]      wr_data,      // {member, word}
  input  logic [N_ISL-1:0] wr_ready,
  input  logic [N_ISL-1:0] free_valid,   // free tokens from each island
  input  logic [N_ISL-1:0] free_data,
  output logic [N_ISL-1:0] free_take
);
  localparam int NT = 2 * N_ISL;
  logic [NT-1:0] free_q;
  logic [$clog2(NT)-1:0] t;             // interleaver being filled
  logic [7:0]  cnt;                     // words sent of this symbol
  logic [$clog2(N_ISL)-1:0] isl;
  logic        ok, fire;

  assign isl       = t[$clog2(NT)-1:1];
  assign ok        = free_q[t] || (cnt != 8'd0);
  assign wr_data   = {t[0], in_data};
  assign free_take = free_valid;
  assign in_ready  = ok && wr_ready[isl];
  assign fire      = in_valid && in_ready;
  always_comb begin
    wr_valid = '0;
    wr_valid[isl] = in_valid && ok;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      free_q <= '1;
      t      <= '0;
      cnt    <= '0;
    end else begin
      logic [NT-1:0] f;
      f = free_q;
      if (fire && cnt == 8'd0) f[t] = 1'b0;
      for (int i = 0; i < N_ISL; i++)
        if (free_valid[i]) f[2*i + int'(free_data[i])] = 1'b1;
      free_q <= f;
      if (fire) begin
        if (cnt == 8'(WORDS_PER_SYM - 1)) begin
          cnt <= '0;
          t   <= (int'(t) == NT - 1) ? '0 : t + 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
endmodule
