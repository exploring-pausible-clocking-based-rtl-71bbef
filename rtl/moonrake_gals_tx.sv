// GALS OFDM baseband transmitter built on pausible clocking. Six islands,
// each with its own pausible clock generator (half period programmed per
// island over JTAG), are joined by 16 point-to-point
// bundled-data channels, each with an output port controller at the sender
// and an input port controller plus input data register at the receiver:
//   island 1  front end (FIFO, input/middle control, scrambler, FEC,
//             interleaver interface, symbol mapping, pilot inserter,
//             mapper [4:1])
//   islands 2..4  two interleavers each
//   island 5  four 64-point IFFTs
//   island 6  IFFT 4p stage and output stage
// Channels: 1->k data, k->1 free token, 1->k read request, k->1 interleaved
// data (k = 2..4: 12 channels), 1->5 subcarriers, 5->6 IFFT results,
// 1->6 control words, 6->1 symbol-done tokens.
// Input: bytes with valid/ready in the island-1 clock domain (in_clk). Output:
// one complex sample per out_clk cycle while out_valid, 320 samples (64
// cyclic prefix + 256) per OFDM symbol of 24 input bytes, scaled by 1/64.
// BIST: with the BIST bit set the input is fed by a PRNG instead of in_data,
// and the output samples are compacted into misr_sig (cleared otherwise).
// Configuration (island clock half periods, frame length, scrambler seed,
// BIST mode) is loaded through the JTAG port (see jtag_ctrl); its reset
// values run every island at a 2 ns period with 4-symbol frames.
`timescale 1ns/1ps
module moonrake_gals_tx
  import moonrake_pkg::*;
#(
  parameter int FIFO_DEPTH = 64,
  parameter int CREDITS    = 6
) (
  input  logic        rst_n,
  input  logic        tck,
  input  logic        trst_n,
  input  logic        tms,
  input  logic        tdi,
  output logic        tdo,
  output logic        in_clk,
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  output logic        in_ready,
  output logic        out_clk,
  output logic        out_valid,
  output logic [15:0] out_i,
  output logic [15:0] out_q,
  output logic        out_sos,
  output logic        out_eof,
  output logic [31:0] misr_sig
);
  logic        wr_req [3], wr_ack [3], fr_req [3], fr_ack [3], fr_data [3];
  logic        rq_req [3], rq_ack [3], rq_data [3], rd_req [3], rd_ack [3];
  logic [16:0] wr_data [3];
  logic [15:0] rd_data [3];
  logic        sc_req, sc_ack, ct_req, ct_ack, tk_req, tk_ack, tk_data, y_req, y_ack;
  logic [31:0] sc_data, y_data;
  logic [16:0] ct_data;
  logic        clk1, clk5, clk6;
  logic        il_clk [3];

  // configuration through JTAG
  logic [15:0] cfg_half_period [6];
  logic [15:0] cfg_frame_len;
  logic [6:0]  cfg_scr_seed;
  logic        bist_en;
  jtag_ctrl u_jtag (.tck, .trst_n, .tms, .tdi, .tdo, .cfg_half_period, .cfg_frame_len,
                    .cfg_scr_seed, .cfg_bist_en(bist_en));

  // BIST input source
  logic       f_valid, f_ready;
  logic [7:0] f_data, prng_data;
  bist_prng u_prng (.clk(clk1), .rst_n, .take(bist_en && f_ready), .out_data(prng_data));
  assign f_valid  = bist_en ? 1'b1 : in_valid;
  assign f_data   = bist_en ? prng_data : in_data;
  assign in_ready = f_ready && !bist_en;
  assign in_clk   = clk1;

  gals_block1 #(.FIFO_DEPTH(FIFO_DEPTH), .CREDITS(CREDITS)) u_b1 (
    .rst_n, .cfg_half_period(cfg_half_period[0]), .cfg_frame_len, .cfg_scr_seed, .clk(clk1),
    .in_valid(f_valid), .in_data(f_data), .in_ready(f_ready),
    .wr_req, .wr_ack, .wr_data, .fr_req, .fr_ack, .fr_data,
    .rq_req, .rq_ack, .rq_data, .rd_req, .rd_ack, .rd_data,
    .sc_req, .sc_ack, .sc_data, .ct_req, .ct_ack, .ct_data, .tk_req, .tk_ack, .tk_data);

  for (genvar i = 0; i < 3; i++) begin : g_il
    gals_block_il u_bil (
      .rst_n, .cfg_half_period(cfg_half_period[1+i]), .clk(il_clk[i]),
      .wr_req(wr_req[i]), .wr_ack(wr_ack[i]), .wr_data(wr_data[i]),
      .fr_req(fr_req[i]), .fr_ack(fr_ack[i]), .fr_data(fr_data[i]),
      .rq_req(rq_req[i]), .rq_ack(rq_ack[i]), .rq_data(rq_data[i]),
      .rd_req(rd_req[i]), .rd_ack(rd_ack[i]), .rd_data(rd_data[i]));
  end

  gals_block5 u_b5 (.rst_n, .cfg_half_period(cfg_half_period[4]), .clk(clk5),
                    .sc_req, .sc_ack, .sc_data, .y_req, .y_ack, .y_data);

  cplx_t o_data;
  gals_block6 u_b6 (.rst_n, .cfg_half_period(cfg_half_period[5]), .clk(clk6),
                    .y_req, .y_ack, .y_data, .ct_req, .ct_ack, .ct_data,
                    .tk_req, .tk_ack, .tk_data,
                    .out_valid, .out_data(o_data), .out_sos, .out_eof);
  assign out_i   = o_data.re;
  assign out_q   = o_data.im;
  assign out_clk = clk6;

  // BIST output compaction
  bist_misr u_misr (.clk(clk6), .rst_n, .clear(!bist_en), .en(out_valid),
                    .in_data({o_data.re, o_data.im}), .sig(misr_sig));
endmodule
