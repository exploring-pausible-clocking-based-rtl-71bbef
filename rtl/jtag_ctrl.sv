// JTAG controller for working-mode configuration and island clock
// programming. A standard IEEE 1149.1 TAP state machine (TCK, TMS, TDI, TDO,
// asynchronous TRST_N) with a 4-bit instruction register:
//   4'b0001 IDCODE  32-bit identification register (IDCODE parameter)
//   4'b0010 CONFIG  CFG_W-bit configuration register, see below
//   4'b1111 BYPASS  (also selected for every other code)
// The CONFIG register is shifted LSB first through a shift stage and copied
// to the outputs on Update-DR, so outputs change only once per scan. Layout
// from bit 0: six 16-bit island clock half periods (island 1 first, in ps),
// the 16-bit frame length, the 7-bit scrambler seed, the BIST enable bit.
// Capture-DR loads the current configuration, so a scan reads it back.
// The outputs are quasi-static: they are meant to be changed while the
// transmitter is idle, and are not synchronized into the island clocks. The
// instruction codes and register layout are this design's choice.
`timescale 1ns/1ps
module jtag_ctrl #(
  parameter logic [31:0]  IDCODE   = 32'h1000_0A6D,
  parameter logic [15:0]  HP_RESET = 16'd1000,
  parameter logic [15:0]  FL_RESET = 16'd4,
  parameter logic [6:0]   SD_RESET = 7'h5d
) (
  input  logic        tck,
  input  logic        trst_n,
  input  logic        tms,
  input  logic        tdi,
  output logic        tdo,
  output logic [15:0] cfg_half_period [6],
  output logic [15:0] cfg_frame_len,
  output logic [6:0]  cfg_scr_seed,
  output logic        cfg_bist_en
);
  localparam int CFG_W = 6*16 + 16 + 7 + 1;

  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PA_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PA_IR, EX2_IR, UPD_IR
  } tap_e;
  typedef enum logic [3:0] {I_IDCODE = 4'b0001, I_CONFIG = 4'b0010, I_BYPASS = 4'b1111} instr_e;

  tap_e st, st_n;
  logic [3:0]       ir_sh, ir;
  logic [31:0]      id_sh;
  logic [CFG_W-1:0] cfg_sh, cfg;
  logic             byp;

  always_comb
    case (st)
      TLR:     st_n = tms ? TLR    : RTI;
      RTI:     st_n = tms ? SEL_DR : RTI;
      SEL_DR:  st_n = tms ? SEL_IR : CAP_DR;
      CAP_DR:  st_n = tms ? EX1_DR : SH_DR;
      SH_DR:   st_n = tms ? EX1_DR : SH_DR;
      EX1_DR:  st_n = tms ? UPD_DR : PA_DR;
      PA_DR:   st_n = tms ? EX2_DR : PA_DR;
      EX2_DR:  st_n = tms ? UPD_DR : SH_DR;
      UPD_DR:  st_n = tms ? SEL_DR : RTI;
      SEL_IR:  st_n = tms ? TLR    : CAP_IR;
      CAP_IR:  st_n = tms ? EX1_IR : SH_IR;
      SH_IR:   st_n = tms ? EX1_IR : SH_IR;
      EX1_IR:  st_n = tms ? UPD_IR : PA_IR;
      PA_IR:   st_n = tms ? EX2_IR : PA_IR;
      EX2_IR:  st_n = tms ? UPD_IR : SH_IR;
      default: st_n = tms ? SEL_DR : RTI;     // UPD_IR
    endcase

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) st <= TLR;
    else         st <= st_n;

  // shift and capture on the rising edge
  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) begin
      ir_sh  <= '0;
      ir     <= I_IDCODE;
      id_sh  <= '0;
      cfg_sh <= '0;
      byp    <= 1'b0;
      cfg    <= {1'b0, SD_RESET, FL_RESET, {6{HP_RESET}}};
    end else begin
      case (st)
        TLR:    ir <= I_IDCODE;
        CAP_IR: ir_sh <= 4'b0001;
        SH_IR:  ir_sh <= {tdi, ir_sh[3:1]};
        UPD_IR: ir <= ir_sh;
        CAP_DR: begin
          id_sh  <= IDCODE;
          cfg_sh <= cfg;
          byp    <= 1'b0;
        end
        SH_DR: begin
          if (ir == I_IDCODE)      id_sh  <= {tdi, id_sh[31:1]};
          else if (ir == I_CONFIG) cfg_sh <= {tdi, cfg_sh[CFG_W-1:1]};
          else                     byp    <= tdi;
        end
        UPD_DR: if (ir == I_CONFIG) cfg <= cfg_sh;
        default: ;
      endcase
    end

  // TDO changes on the falling edge
  always_ff @(negedge tck or negedge trst_n)
    if (!trst_n) tdo <= 1'b0;
    else if (st == SH_IR) tdo <= ir_sh[0];
    else if (st == SH_DR) tdo <= (ir == I_IDCODE) ? id_sh[0] : (ir == I_CONFIG) ? cfg_sh[0] : byp;
    else tdo <= 1'b0;

  for (genvar i = 0; i < 6; i++) begin : g_hp
    assign cfg_half_period[i] = cfg[16*i +: 16];
  end
  assign cfg_frame_len = cfg[96 +: 16];
  assign cfg_scr_seed  = cfg[112 +: 7];
  assign cfg_bist_en   = cfg[119];
endmodule
