// GALS island 1, the front end. Its own pausible clock generator times: input
// data FIFO, input controller, scrambler, FEC encoder, interleaver interface,
// pilot inserter with symbol mapping, mapper [4:1] and middle controller.
// It talks to the other islands over 15 channels, each ending in a port
// controller here: per interleaver island one outgoing data channel, one
// incoming free-token channel, one outgoing read-request channel and one
// incoming interleaved-data channel; one outgoing subcarrier channel to the
// IFFT island 5; one outgoing control channel from the middle controller and
// one incoming symbol-done token channel to the input controller, both with
// island 6. Dataflow: bytes -> FIFO -> input control -> scrambler -> FEC
// -> interleaver interface -> islands 2..4 -> pilot inserter -> mapper [4:1]
// -> island 5.
`timescale 1ns/1ps
module gals_block1
  import moonrake_pkg::*;
#(
  parameter int FIFO_DEPTH = 64,
  parameter int CREDITS    = 6
) (
  input  logic        rst_n,
  input  logic [15:0] cfg_half_period,
  input  logic [15:0] cfg_frame_len,
  input  logic [6:0]  cfg_scr_seed,
  output logic        clk,
  // input bytes
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  output logic        in_ready,
  // to interleaver islands: coded words {member, word}
  output logic        wr_req  [3],
  input  logic        wr_ack  [3],
  output logic [16:0] wr_data [3],
  // from interleaver islands: free tokens (member)
  input  logic        fr_req  [3],
  output logic        fr_ack  [3],
  input  logic        fr_data [3],
  // to interleaver islands: read requests (member)
  output logic        rq_req  [3],
  input  logic        rq_ack  [3],
  output logic        rq_data [3],
  // from interleaver islands: interleaved words
  input  logic        rd_req  [3],
  output logic        rd_ack  [3],
  input  logic [15:0] rd_data [3],
  // to island 5: subcarriers
  output logic        sc_req,
  input  logic        sc_ack,
  output logic [31:0] sc_data,
  // to island 6: control words
  output logic        ct_req,
  input  logic        ct_ack,
  output logic [16:0] ct_data,
  // from island 6: symbol-done tokens
  input  logic        tk_req,
  output logic        tk_ack,
  input  logic        tk_data
);
  localparam int NP = 15;
  logic [NP-1:0] preq, pgnt;

  pclk_gen #(.NPORT(NP)) u_clk (.rst_n, .half_period(cfg_half_period),
                                .pause_req(preq), .pause_gnt(pgnt), .clk);

  // ---------------- front-end datapath ----------------
  logic       f_valid, f_ready;
  logic [7:0] f_data;
  input_fifo #(.W(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .wr_valid(in_valid), .wr_data(in_data), .wr_ready(in_ready),
    .rd_valid(f_valid), .rd_data(f_data), .rd_ready(f_ready));

  logic       tok_valid, tok_take, tok_d;
  logic       c_valid, c_ready, c_sof;
  logic [7:0] c_data;
  input_control #(.BYTES_PER_SYM(BYTES_PER_SYM), .CREDITS(CREDITS)) u_ictl (
    .clk, .rst_n, .frame_len(cfg_frame_len), .tok_valid, .tok_take,
    .in_valid(f_valid), .in_data(f_data), .in_ready(f_ready),
    .out_valid(c_valid), .out_data(c_data), .out_sof(c_sof), .out_ready(c_ready));

  logic       s_valid, s_ready, s_sof;
  logic [7:0] s_data;
  scrambler u_scr (
    .clk, .rst_n, .seed(cfg_scr_seed), .in_valid(c_valid), .in_data(c_data), .in_sof(c_sof),
    .in_ready(c_ready), .out_valid(s_valid), .out_data(s_data), .out_sof(s_sof), .out_ready(s_ready));

  logic        e_valid, e_ready;
  logic [15:0] e_data;
  fec_encoder u_fec (
    .clk, .rst_n, .in_valid(s_valid), .in_data(s_data), .in_sof(s_sof), .in_ready(s_ready),
    .out_valid(e_valid), .out_data(e_data), .out_ready(e_ready));

  logic [2:0]  w_valid, w_ready, fr_valid, fr_take, fr_d;
  logic [16:0] w_data;
  il_interface #(.N_ISL(3), .WORDS_PER_SYM(WORDS_PER_SYM)) u_ilif (
    .clk, .rst_n, .in_valid(e_valid), .in_data(e_data), .in_ready(e_ready),
    .wr_valid(w_valid), .wr_data(w_data), .wr_ready(w_ready),
    .free_valid(fr_valid), .free_data(fr_d), .free_take(fr_take));

  logic [2:0]  q_valid, q_ready, r_valid, r_take;
  logic        q_data;
  logic [15:0] r_data [3];
  logic        mc_ready, sym_start;
  logic        p_valid, p_ready;
  cplx_t       p_data;
  pilot_inserter #(.N_ISL(3)) u_pil (
    .clk, .rst_n, .rreq_valid(q_valid), .rreq_data(q_data), .rreq_ready(q_ready),
    .rd_valid(r_valid), .rd_data(r_data), .rd_take(r_take),
    .mc_ready, .sym_start, .out_valid(p_valid), .out_data(p_data), .out_ready(p_ready));

  logic  m_valid, m_ready;
  cplx_t m_data;
  mapper41 u_m41 (.clk, .rst_n, .in_valid(p_valid), .in_data(p_data), .in_ready(p_ready),
                  .out_valid(m_valid), .out_data(m_data), .out_ready(m_ready));

  logic        k_valid, k_ready;
  logic [16:0] k_data;
  middle_control u_mctl (.clk, .rst_n, .frame_len(cfg_frame_len), .sym_start, .ready(mc_ready),
                         .ctl_valid(k_valid), .ctl_data(k_data), .ctl_ready(k_ready));

  // ---------------- port controllers ----------------
  // pause request bits: 0..2 wr OPC, 3..5 free IPC, 6..8 rreq OPC,
  // 9..11 rdata IPC, 12 subcarrier OPC, 13 control OPC, 14 token IPC
  for (genvar i = 0; i < 3; i++) begin : g_isl
    opc #(.W(17)) u_wr (.clk, .rst_n, .tx_valid(w_valid[i]), .tx_data(w_data), .tx_ready(w_ready[i]),
                        .pause_req(preq[i]), .pause_gnt(pgnt[i]),
                        .ch_req(wr_req[i]), .ch_ack(wr_ack[i]), .ch_data(wr_data[i]));
    gals_in_port #(.W(1)) u_fr (.clk, .rst_n, .ch_req(fr_req[i]), .ch_ack(fr_ack[i]), .ch_data(fr_data[i]),
                                .pause_req(preq[3+i]), .pause_gnt(pgnt[3+i]),
                                .rx_valid(fr_valid[i]), .rx_data(fr_d[i]), .rx_ready(fr_take[i]));
    opc #(.W(1)) u_rq (.clk, .rst_n, .tx_valid(q_valid[i]), .tx_data(q_data), .tx_ready(q_ready[i]),
                       .pause_req(preq[6+i]), .pause_gnt(pgnt[6+i]),
                       .ch_req(rq_req[i]), .ch_ack(rq_ack[i]), .ch_data(rq_data[i]));
    gals_in_port #(.W(16)) u_rd (.clk, .rst_n, .ch_req(rd_req[i]), .ch_ack(rd_ack[i]), .ch_data(rd_data[i]),
                                 .pause_req(preq[9+i]), .pause_gnt(pgnt[9+i]),
                                 .rx_valid(r_valid[i]), .rx_data(r_data[i]), .rx_ready(r_take[i]));
  end

  opc #(.W(32)) u_sc (.clk, .rst_n, .tx_valid(m_valid), .tx_data(m_data), .tx_ready(m_ready),
                      .pause_req(preq[12]), .pause_gnt(pgnt[12]),
                      .ch_req(sc_req), .ch_ack(sc_ack), .ch_data(sc_data));
  opc #(.W(17)) u_ct (.clk, .rst_n, .tx_valid(k_valid), .tx_data(k_data), .tx_ready(k_ready),
                      .pause_req(preq[13]), .pause_gnt(pgnt[13]),
                      .ch_req(ct_req), .ch_ack(ct_ack), .ch_data(ct_data));
  gals_in_port #(.W(1)) u_tk (.clk, .rst_n, .ch_req(tk_req), .ch_ack(tk_ack), .ch_data(tk_data),
                              .pause_req(preq[14]), .pause_gnt(pgnt[14]),
                              .rx_valid(tok_valid), .rx_data(tok_d), .rx_ready(tok_take));
endmodule
