// Pilot inserter: assembles the 256 subcarriers of each OFDM symbol in
// natural order k = 0..255. Symbol s is read from interleaver s mod 6: at the
// start of a symbol a read request (the member bit) goes to that
// interleaver's island and the middle controller is told a symbol starts;
// the island then returns the interleaved words one by one. Each data
// subcarrier takes the next bit pair of the current word through the symbol
// mapper, pilot subcarriers get the constant pilot (AMP, AMP), null
// subcarriers zero (plan in moonrake_pkg::sc_kind). One subcarrier per clock
// while words are available and the output is ready.
`timescale 1ns/1ps
module pilot_inserter
  import moonrake_pkg::*;
#(
  parameter int N_ISL = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [N_ISL-1:0] rreq_valid,
  output logic             rreq_data,
  input  logic [N_ISL-1:0] rreq_ready,
  input  logic [N_ISL-1:0] rd_valid,
  input  logic [15:0]      rd_data [N_ISL],
  output logic [N_ISL-1:0] rd_take,
  input  logic             mc_ready,
  output logic             sym_start,
  output logic             out_valid,
  output cplx_t            out_data,
  input  logic             out_ready
);
  localparam int NT = 2 * N_ISL;
  logic [$clog2(NT)-1:0]    t;
  logic [$clog2(N_ISL)-1:0] isl;
  logic        run;
  logic [7:0]  k;
  logic [15:0] wbuf;
  logic        wval;
  logic [2:0]  pidx;
  sc_kind_e    kind;
  cplx_t       dsym;
  logic        need_word, emit;

  assign isl  = t[$clog2(NT)-1:1];
  assign kind = sc_kind(k);

  symbol_mapper u_map (.bits(wbuf[2*pidx +: 2]), .sym(dsym));

  assign sym_start = !run && mc_ready && rreq_ready[isl];
  assign rreq_data = t[0];
  always_comb begin
    rreq_valid      = '0;
    rreq_valid[isl] = !run && mc_ready;
  end

  assign need_word = run && kind == SC_DATA && !wval;
  always_comb begin
    rd_take      = '0;
    rd_take[isl] = need_word;
  end

  assign emit      = run && (kind != SC_DATA || wval);
  assign out_valid = emit;
  always_comb
    case (kind)
      SC_DATA:  out_data = dsym;
      SC_PILOT: out_data = '{re: AMP, im: AMP};
      default:  out_data = '0;
    endcase

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      t    <= '0;
      run  <= 1'b0;
      k    <= '0;
      wbuf <= '0;
      wval <= 1'b0;
      pidx <= '0;
    end else begin
      if (sym_start) begin
        run <= 1'b1;
        k   <= '0;
      end
      if (need_word && rd_valid[isl]) begin
        wbuf <= rd_data[isl];
        wval <= 1'b1;
        pidx <= '0;
      end
      if (emit && out_ready) begin
        if (kind == SC_DATA) begin
          pidx <= pidx + 1'b1;
          if (pidx == 3'd7) wval <= 1'b0;
        end
        k <= k + 1'b1;
        if (k == 8'd255) begin
          run <= 1'b0;
          t   <= (int'(t) == NT - 1) ? '0 : t + 1'b1;
        end
      end
    end
endmodule
