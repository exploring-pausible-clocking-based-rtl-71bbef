// GALS interleaver island (islands 2, 3 and 4 of the transmitter are three
// instances). Two interleavers, each holding one OFDM symbol, behind four
// port controllers: coded words {member, word} arrive from the interleaver
// interface and fill the addressed interleaver in order; when a read request
// (member) from the pilot inserter finds that interleaver full, the island
// streams its columns back over the interleaved-data channel and then
// returns a free token (member) to the interleaver interface. A read request
// for an interleaver that is not yet full stays in the input data register,
// holding back further requests, until the block is complete.
`timescale 1ns/1ps
module gals_block_il (
  input  logic        rst_n,
  input  logic [15:0] cfg_half_period,
  output logic        clk,
  input  logic        wr_req,
  output logic        wr_ack,
  input  logic [16:0] wr_data,
  output logic        fr_req,
  input  logic        fr_ack,
  output logic        fr_data,
  input  logic        rq_req,
  output logic        rq_ack,
  input  logic        rq_data,
  output logic        rd_req,
  input  logic        rd_ack,
  output logic [15:0] rd_data
);
  localparam int COLS = 24;
  logic [3:0] preq, pgnt;

  pclk_gen #(.NPORT(4)) u_clk (.rst_n, .half_period(cfg_half_period),
                               .pause_req(preq), .pause_gnt(pgnt), .clk);

  logic        w_valid, w_take;
  logic [16:0] w_d;
  logic        q_valid, q_take, q_d;
  logic        o_valid, o_ready;
  logic [15:0] o_data;
  logic        f_valid, f_ready, f_d;

  gals_in_port #(.W(17)) u_wr (.clk, .rst_n, .ch_req(wr_req), .ch_ack(wr_ack), .ch_data(wr_data),
                               .pause_req(preq[0]), .pause_gnt(pgnt[0]),
                               .rx_valid(w_valid), .rx_data(w_d), .rx_ready(w_take));
  opc #(.W(1)) u_fr (.clk, .rst_n, .tx_valid(f_valid), .tx_data(f_d), .tx_ready(f_ready),
                     .pause_req(preq[1]), .pause_gnt(pgnt[1]),
                     .ch_req(fr_req), .ch_ack(fr_ack), .ch_data(fr_data));
  gals_in_port #(.W(1)) u_rq (.clk, .rst_n, .ch_req(rq_req), .ch_ack(rq_ack), .ch_data(rq_data),
                              .pause_req(preq[2]), .pause_gnt(pgnt[2]),
                              .rx_valid(q_valid), .rx_data(q_d), .rx_ready(q_take));
  opc #(.W(16)) u_rd (.clk, .rst_n, .tx_valid(o_valid), .tx_data(o_data), .tx_ready(o_ready),
                      .pause_req(preq[3]), .pause_gnt(pgnt[3]),
                      .ch_req(rd_req), .ch_ack(rd_ack), .ch_data(rd_data));

  logic [4:0]  wcnt [2];
  logic [1:0]  full, pend;
  logic        reading, rsel;
  logic [4:0]  ridx;
  logic [15:0] rword [2];
  logic        wsel;

  assign wsel   = w_d[16];
  assign w_take = w_valid && !full[wsel];
  assign q_take = q_valid && !reading && full[q_d];

  for (genvar i = 0; i < 2; i++) begin : g_il
    interleaver #(.ROWS(16), .COLS(COLS)) u_il (
      .clk, .wr_en(w_take && wsel == 1'(i)), .wr_idx(wcnt[i]), .wr_word(w_d[15:0]),
      .rd_idx(ridx), .rd_word(rword[i]));
  end

  assign o_valid = reading;
  assign o_data  = rword[rsel];
  assign f_valid = pend != 2'b00;
  assign f_d     = !pend[0];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wcnt[0] <= '0;
      wcnt[1] <= '0;
      full    <= '0;
      pend    <= '0;
      reading <= 1'b0;
      rsel    <= 1'b0;
      ridx    <= '0;
    end else begin
      logic [1:0] fl, pd;
      fl = full;
      pd = pend;
      if (f_valid && f_ready) pd[f_d] = 1'b0;
      if (w_take) begin
        if (wcnt[wsel] == 5'(COLS - 1)) begin
          wcnt[wsel] <= '0;
          fl[wsel]   = 1'b1;
        end else begin
          wcnt[wsel] <= wcnt[wsel] + 1'b1;
        end
      end
      if (q_take) begin
        reading <= 1'b1;
        rsel    <= q_d;
        ridx    <= '0;
      end
      if (o_valid && o_ready) begin
        ridx <= ridx + 1'b1;
        if (ridx == 5'(COLS - 1)) begin
          reading  <= 1'b0;
          fl[rsel] = 1'b0;
          pd[rsel] = 1'b1;
        end
      end
      full <= fl;
      pend <= pd;
    end
endmodule
