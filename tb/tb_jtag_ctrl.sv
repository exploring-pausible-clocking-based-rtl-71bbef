// Test of the JTAG controller. Checks: IDCODE is selected after reset and
// after a return to Test-Logic-Reset, the CONFIG register reset values,
// writing random configurations and reading them back (outputs change only
// at Update-DR, not while shifting), Pause-DR in the middle of a scan,
// BYPASS (one-bit delay) and the captured instruction register value.
`timescale 1ns/1ps
module tb_jtag_ctrl;
  localparam int CFG_W = 120;
  localparam logic [31:0] ID = 32'h1234_5679;

  logic        tck = 1'b0, trst_n = 1'b1, tms = 1'b1, tdi = 1'b0, tdo;
  logic [15:0] cfg_half_period [6];
  logic [15:0] cfg_frame_len;
  logic [6:0]  cfg_scr_seed;
  logic        cfg_bist_en;
  int checks = 0, failures = 0;

  jtag_ctrl #(.IDCODE(ID), .HP_RESET(16'd777), .FL_RESET(16'd9), .SD_RESET(7'h33)) dut (.*);

  function automatic logic [CFG_W-1:0] outs();
    return {cfg_bist_en, cfg_scr_seed, cfg_frame_len, cfg_half_period[5], cfg_half_period[4],
            cfg_half_period[3], cfg_half_period[2], cfg_half_period[1], cfg_half_period[0]};
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one TCK cycle; o is TDO sampled at the rising edge
  task automatic clk(bit m, bit d, output bit o);
    tms = m; tdi = d;
    #10 tck = 1'b1;
    o = tdo;
    #10 tck = 1'b0;
  endtask

  task automatic reset_tap();
    bit o;
    repeat (5) clk(1, 0, o);
    clk(0, 0, o);                                          // Run-Test/Idle
  endtask

  task automatic shift_ir(logic [3:0] code, output logic [3:0] cap);
    bit o;
    clk(1, 0, o); clk(1, 0, o); clk(0, 0, o); clk(0, 0, o); // -> Shift-IR
    for (int i = 0; i < 4; i++) begin
      clk(i == 3, code[i], o);
      cap[i] = o;
    end
    clk(1, 0, o); clk(0, 0, o);                            // Update-IR -> RTI
  endtask

  // shift n bits; optionally pause in the middle (Exit1 -> Pause -> Exit2 -> Shift)
  task automatic shift_dr(input logic [CFG_W:0] din, input int n, input bit pause,
                          output logic [CFG_W:0] dout, input logic [CFG_W-1:0] hold);
    bit o;
    dout = '0;
    clk(1, 0, o); clk(0, 0, o); clk(0, 0, o);              // -> Shift-DR
    for (int i = 0; i < n; i++) begin
      if (pause && i == n / 2) begin
        clk(1, din[i], o); dout[i] = o;                    // shift and exit
        clk(0, 0, o); clk(0, 0, o); clk(0, 0, o);          // Pause-DR
        check(outs() == hold, "outputs stable while paused");
        clk(1, 0, o); clk(0, 0, o);                        // Exit2 -> Shift-DR
        continue;
      end
      clk(i == n - 1, din[i], o);
      dout[i] = o;
      if (i == n / 3) check(outs() == hold, "outputs stable while shifting");
    end
    clk(1, 0, o); clk(0, 0, o);                            // Update-DR -> RTI
  endtask

  initial begin
    #1000000;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [CFG_W:0] d;
    logic [CFG_W-1:0] w, prev;
    logic [3:0] cap;
    #1 trst_n = 1'b0;
    #30 trst_n = 1'b1;
    check(outs() == {1'b0, 7'h33, 16'd9, {6{16'd777}}}, "reset configuration");
    reset_tap();
    // IDCODE after reset
    shift_dr('0, 32, 0, d, outs());
    check(d[31:0] == ID, "IDCODE after reset");
    // random configurations, with and without a pause
    for (int k = 0; k < 20; k++) begin
      shift_ir(4'b0010, cap);
      check(cap == 4'b0001, "captured IR value");
      prev = outs();
      w = {$urandom, $urandom, $urandom, $urandom};
      shift_dr({1'b0, w}, CFG_W, k[0], d, prev);
      check(d[CFG_W-1:0] == prev, "read back of previous configuration");
      check(outs() == w, "configuration updated");
      check(dut.cfg_half_period[2] == w[32 +: 16] && cfg_scr_seed == w[112 +: 7] &&
            cfg_bist_en == w[119], "field layout");
    end
    // BYPASS: one bit of delay, config untouched
    shift_ir(4'b1111, cap);
    prev = outs();
    w = {$urandom, $urandom, $urandom, $urandom};
    shift_dr({1'b0, w}, 64, 0, d, prev);
    check(d[0] == 1'b0 && d[63:1] == w[62:0], "bypass delay");
    check(outs() == prev, "bypass leaves configuration");
    // an unused code also selects bypass
    shift_ir(4'b0111, cap);
    shift_dr({1'b0, w}, 16, 0, d, prev);
    check(d[15:1] == w[14:0], "unused code acts as bypass");
    // back through Test-Logic-Reset: IDCODE again, configuration kept
    reset_tap();
    shift_dr('0, 32, 0, d, prev);
    check(d[31:0] == ID, "IDCODE after Test-Logic-Reset");
    check(outs() == prev, "configuration kept over TAP reset");
    // asynchronous TRST_N restores the reset configuration
    #3 trst_n = 1'b0;
    #1 check(outs() == {1'b0, 7'h33, 16'd9, {6{16'd777}}}, "TRST_N reset");
    trst_n = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
