// GALS island 6: IFFT 4p stage and output stage. It gathers the four
// first-stage results Y_0..3[n] of each n, passes them through the radix-4
// stage, and writes the four time samples x[n + 64q] into the output buffer.
// With all 64 n done it takes the symbol's control word from the middle
// controller, plays the symbol out with its cyclic prefix, and then sends a
// symbol-done token to the input controller of island 1. Output samples are
// timed by this island's clock (clk). Two IPCs, one OPC.
`timescale 1ns/1ps
module gals_block6
  import moonrake_pkg::*;
#(
  parameter int NCP_P = 64
) (
  input  logic        rst_n,
  input  logic [15:0] cfg_half_period,
  output logic        clk,
  input  logic        y_req,
  output logic        y_ack,
  input  logic [31:0] y_data,
  input  logic        ct_req,
  output logic        ct_ack,
  input  logic [16:0] ct_data,
  output logic        tk_req,
  input  logic        tk_ack,
  output logic        tk_data,
  output logic        out_valid,
  output cplx_t       out_data,
  output logic        out_sos,
  output logic        out_eof
);
  logic [2:0] preq, pgnt;
  pclk_gen #(.NPORT(3)) u_clk (.rst_n, .half_period(cfg_half_period),
                               .pause_req(preq), .pause_gnt(pgnt), .clk);

  logic        y_valid, y_take, c_valid, c_take, t_valid, t_ready;
  logic [31:0] y_d;
  logic [16:0] c_d;
  gals_in_port #(.W(32)) u_y (.clk, .rst_n, .ch_req(y_req), .ch_ack(y_ack), .ch_data(y_data),
                              .pause_req(preq[0]), .pause_gnt(pgnt[0]),
                              .rx_valid(y_valid), .rx_data(y_d), .rx_ready(y_take));
  gals_in_port #(.W(17)) u_c (.clk, .rst_n, .ch_req(ct_req), .ch_ack(ct_ack), .ch_data(ct_data),
                              .pause_req(preq[1]), .pause_gnt(pgnt[1]),
                              .rx_valid(c_valid), .rx_data(c_d), .rx_ready(c_take));
  opc #(.W(1)) u_t (.clk, .rst_n, .tx_valid(t_valid), .tx_data(1'b1), .tx_ready(t_ready),
                    .pause_req(preq[2]), .pause_gnt(pgnt[2]),
                    .ch_req(tk_req), .ch_ack(tk_ack), .ch_data(tk_data));

  typedef enum logic [1:0] {S_COLLECT, S_CTL, S_PLAY, S_TOKEN} state_e;
  state_e st;
  cplx_t  yv [4];
  logic [1:0] r;
  logic [5:0] n;
  logic       f_valid, x_valid, busy, done;
  logic [5:0] x_n;
  cplx_t      x [4];

  assign y_take = (st == S_COLLECT) && !f_valid && y_valid;
  assign c_take = (st == S_CTL) && c_valid && !busy;
  assign t_valid = (st == S_TOKEN);

  ifft4 u_f4 (.clk, .rst_n, .in_valid(f_valid), .in_n(n), .in_y(yv),
              .out_valid(x_valid), .out_n(x_n), .out_x(x));

  output_stage #(.NCP_P(NCP_P)) u_os (.clk, .rst_n, .wr_en(x_valid), .wr_n(x_n), .wr_x(x),
                       .start(c_take), .last(c_d[16]), .busy, .done,
                       .out_valid, .out_data, .out_sos, .out_eof);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st      <= S_COLLECT;
      r       <= '0;
      n       <= '0;
      f_valid <= 1'b0;
      for (int i = 0; i < 4; i++) yv[i] <= '0;
    end else begin
      if (f_valid) begin
        f_valid <= 1'b0;
        n       <= n + 1'b1;
      end
      case (st)
        S_COLLECT: begin
          if (y_take) begin
            yv[r] <= y_d;
            r     <= r + 1'b1;
            if (r == 2'd3) f_valid <= 1'b1;
          end
          if (x_valid && x_n == 6'd63) st <= S_CTL;
        end
        S_CTL:   if (c_take) st <= S_PLAY;
        S_PLAY:  if (done) st <= S_TOKEN;
        default: if (t_ready) st <= S_COLLECT;
      endcase
    end
endmodule
