// End-to-end test of the GALS OFDM transmitter at its default sizes.
// After reading the JTAG IDCODE, the test programs six different island
// clock periods, the frame length and the seed through JTAG and reads them
// back. It then feeds symbols of random bytes from the pads with random
// gaps, switches to BIST mode through JTAG, where the PRNG feeds the input,
// and checks the first 14
// output symbols against a reference computed here: scrambler, convolutional
// code, block interleaver, QPSK, subcarrier plan and a floating-point
// 256-point IFFT (scaled by 1/64), each output sample within +-TOL LSB.
// Also checked: bytes entering in BIST mode follow the PRNG sequence, the
// MISR signature matches one computed from the observed samples, and
// start-of-symbol / end-of-frame flags. It counts how often each mechanism
// occurred (clock pauses, input back-pressure, credit stalls, input data
// register back-pressure, interleaver rotation, frame ends, BIST) and fails
// any that never happened.
`timescale 1ns/1ps
module tb_moonrake_gals_tx;
  localparam int NSYM_PAD = 10;
  localparam int NSYM     = 14;
  localparam int FLEN     = 4;
  localparam int TOL      = 4;
  localparam int A        = 11585;
  localparam real PI      = 3.14159265358979;

  int checks = 0, failures = 0;

  logic        rst_n = 1'b1;
  logic        tck = 1'b0, tms = 1'b1, tdi = 1'b0, tdo;
  logic        bist_en = 1'b0;       // mirror of the programmed BIST bit
  logic [15:0] hp [6] = '{16'd1000, 16'd1130, 16'd1270, 16'd1410, 16'd900, 16'd1050};
  logic        in_clk, in_valid = 1'b0, in_ready;
  logic [7:0]  in_data = '0;
  logic        out_clk, out_valid, out_sos, out_eof;
  logic [15:0] out_i, out_q;
  logic [31:0] misr_sig;

  moonrake_gals_tx dut (
    .rst_n, .tck, .trst_n(rst_n), .tms, .tdi, .tdo,
    .in_clk, .in_valid, .in_data, .in_ready,
    .out_clk, .out_valid, .out_i, .out_q, .out_sos, .out_eof, .misr_sig);

  // ---------------- JTAG ----------------
  localparam int CFG_W = 120;
  task automatic jtag_clk(bit m, bit d, output bit o);
    tms = m; tdi = d;
    #10 tck = 1'b1;
    o = tdo;
    #10 tck = 1'b0;
  endtask
  task automatic jtag_ir(logic [3:0] code);
    bit o;
    jtag_clk(0, 0, o); jtag_clk(1, 0, o); jtag_clk(1, 0, o);   // RTI -> SEL_DR -> SEL_IR
    jtag_clk(0, 0, o); jtag_clk(0, 0, o);                      // CAP_IR -> SH_IR
    for (int i = 0; i < 4; i++) jtag_clk(i == 3, code[i], o);  // last bit exits
    jtag_clk(1, 0, o); jtag_clk(0, 0, o);                      // UPD_IR -> RTI
  endtask
  task automatic jtag_dr(input logic [CFG_W-1:0] din, input int n, output logic [CFG_W-1:0] dout);
    bit o;
    dout = '0;
    jtag_clk(1, 0, o); jtag_clk(0, 0, o); jtag_clk(0, 0, o);   // SEL_DR -> CAP_DR -> SH_DR
    for (int i = 0; i < n; i++) begin
      jtag_clk(i == n - 1, din[i], o);
      dout[i] = o;
    end
    jtag_clk(1, 0, o); jtag_clk(0, 0, o);                      // UPD_DR -> RTI
  endtask
  function automatic logic [CFG_W-1:0] cfg_word(bit bist);
    return {bist, 7'h5d, 16'(FLEN), hp[5], hp[4], hp[3], hp[2], hp[1], hp[0]};
  endfunction
  int n_jtag = 0;
  task automatic jtag_program(bit bist);
    logic [CFG_W-1:0] rb;
    jtag_ir(4'b0010);
    jtag_dr(cfg_word(bist), CFG_W, rb);
    jtag_dr(cfg_word(bist), CFG_W, rb);                        // read back
    checks++;
    if (rb != cfg_word(bist)) begin failures++; $display("JTAG read-back %h", rb); end
    bist_en = bist;
    n_jtag++;
  endtask

  // ---------------- stimulus ----------------
  byte unsigned bytes_in [$];      // every byte entering the front end
  int n_pad = 0;

  initial begin
    #0.2 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    begin
      logic [CFG_W-1:0] id;
      bit o;
      repeat (5) jtag_clk(1, 0, o);
      jtag_clk(0, 0, o);                                       // RTI, IDCODE selected
      jtag_dr('0, 32, id);
      checks++;
      if (id[31:0] != 32'h1000_0A6D) begin failures++; $display("IDCODE %h", id[31:0]); end
    end
    jtag_program(1'b0);
    while (n_pad < NSYM_PAD * 24) begin
      @(negedge in_clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_data  = 8'($urandom);
      @(posedge in_clk);
      if (in_valid && in_ready) n_pad++;
    end
    @(negedge in_clk);
    in_valid = 1'b0;
    jtag_program(1'b1);
  end

  // record bytes actually written into the input FIFO
  always @(posedge in_clk)
    if (rst_n && dut.f_valid && dut.f_ready) bytes_in.push_back(dut.f_data);

  // independent PRNG model for BIST bytes
  logic [31:0] prng = 32'h1;
  int n_bist_bytes = 0;
  always @(posedge in_clk)
    if (rst_n && dut.bist_en && dut.f_ready) begin
      checks++;
      if (dut.f_data != prng[7:0]) begin
        failures++;
        $display("BIST byte mismatch %h vs %h", dut.f_data, prng[7:0]);
      end
      for (int i = 0; i < 8; i++) prng = prng[0] ? ((prng >> 1) ^ 32'h8020_0003) : (prng >> 1);
      n_bist_bytes++;
    end

  // ---------------- reference ----------------
  function automatic bit is_null(int k);  return k == 0 || (k >= 105 && k <= 151); endfunction
  function automatic bit is_pilot(int k); int u; u = (k <= 104) ? k - 1 : k - 48; return (u % 13) == 6; endfunction

  real ref_re [NSYM][256];
  real ref_im [NSYM][256];

  task automatic build_ref(int s);
    bit [6:0] scr;
    bit [6:0] hist;
    bit c [384];
    bit il [384];
    real xr [256], xi [256];
    int d;
    if (s % FLEN == 0) begin scr = 7'h5d; hist = '0; end
    else begin scr = scr_state; hist = fec_state; end
    for (int b = 0; b < 24; b++)
      for (int i = 0; i < 8; i++) begin
        bit fb, u;
        fb   = scr[6] ^ scr[3];
        u    = bytes_in[s*24 + b][i] ^ fb;
        scr  = {scr[5:0], fb};
        // hist[0] = previous bit, hist[5] = 6 bits ago
        c[(b*8 + i)*2]     = u ^ hist[1] ^ hist[2] ^ hist[4] ^ hist[5];
        c[(b*8 + i)*2 + 1] = u ^ hist[0] ^ hist[1] ^ hist[2] ^ hist[5];
        hist = {hist[5:0], u};
      end
    scr_state = scr;
    fec_state = hist;
    for (int j = 0; j < 384; j++) il[j] = c[(j % 16) * 24 + j / 16];
    d = 0;
    for (int k = 0; k < 256; k++) begin
      if (is_null(k)) begin xr[k] = 0; xi[k] = 0; end
      else if (is_pilot(k)) begin xr[k] = A; xi[k] = A; end
      else begin
        xr[k] = il[2*d] ? -A : A;
        xi[k] = il[2*d + 1] ? -A : A;
        d++;
      end
    end
    for (int t = 0; t < 256; t++) begin
      real sr, si;
      sr = 0; si = 0;
      for (int k = 0; k < 256; k++) begin
        real ph;
        if (xr[k] == 0 && xi[k] == 0) continue;
        ph = 2.0 * PI * real'((k * t) % 256) / 256.0;
        sr += xr[k] * $cos(ph) - xi[k] * $sin(ph);
        si += xr[k] * $sin(ph) + xi[k] * $cos(ph);
      end
      ref_re[s][t] = sr / 64.0;
      ref_im[s][t] = si / 64.0;
    end
  endtask
  bit [6:0] scr_state, fec_state;

  // ---------------- output checking ----------------
  int sym = 0, pos = 0, n_eof = 0, n_sos = 0;
  logic [31:0] misr_ref = '0;
  int n_misr = 0;

  always @(posedge out_clk) begin
    if (!dut.bist_en) misr_ref = '0;
    else if (out_valid) begin
      misr_ref = ({misr_ref[30:0], 1'b0} ^ (misr_ref[31] ? 32'h04C1_1DB7 : 32'h0)) ^ {out_i, out_q};
      n_misr++;
    end
    if (out_valid && sym < NSYM) begin
      int t;
      real er, ei;
      if (pos == 0) begin
        while (bytes_in.size() < (sym + 1) * 24) @(posedge in_clk);
        build_ref(sym);
      end
      t  = (pos < 64) ? pos + 192 : pos - 64;
      er = real'($signed(out_i)) - ref_re[sym][t];
      ei = real'($signed(out_q)) - ref_im[sym][t];
      checks++;
      if (er > TOL || er < -TOL || ei > TOL || ei < -TOL) begin
        failures++;
        if (failures < 10) $display("sym %0d pos %0d: got (%0d,%0d) ref (%f,%f)", sym, pos,
                                    $signed(out_i), $signed(out_q), ref_re[sym][t], ref_im[sym][t]);
      end
      checks++;
      if (out_sos != (pos == 0)) failures++;
      if (out_sos) n_sos++;
      checks++;
      if (out_eof != (pos == 319 && (sym % FLEN) == FLEN - 1)) failures++;
      if (out_eof) n_eof++;
      pos++;
      if (pos == 320) begin pos = 0; sym++; end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_backpressure = 0, n_credit_stall = 0, n_il_wrap = 0, n_reg_full_wait = 0;
  always @(posedge in_clk) begin
    if (dut.in_valid && !dut.in_ready && !bist_en) n_backpressure++;
    if (dut.u_b1.u_ictl.credits == 0 && dut.u_b1.f_valid) n_credit_stall++;
    if (dut.u_b1.u_ilif.fire && dut.u_b1.u_ilif.cnt == 8'd23 && dut.u_b1.u_ilif.t == 3'd5) n_il_wrap++;
  end
  always @(posedge dut.u_b1.sc_req) if (dut.u_b5.u_in.full) n_reg_full_wait++;

  task automatic need(string what, int n);
    checks++;
    $display("mechanism %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("  never happened: %s", what); end
  endtask

  initial begin
    int pauses;
    wait (sym == NSYM);
    repeat (3) @(posedge out_clk);
    checks++;
    if (misr_sig != misr_ref) begin
      failures++;
      $display("MISR %h expected %h", misr_sig, misr_ref);
    end
    pauses = dut.u_b1.u_clk.n_pauses + dut.g_il[0].u_bil.u_clk.n_pauses + dut.g_il[1].u_bil.u_clk.n_pauses
           + dut.g_il[2].u_bil.u_clk.n_pauses + dut.u_b5.u_clk.n_pauses + dut.u_b6.u_clk.n_pauses;
    need("clock pauses", pauses);
    need("input back-pressure cycles", n_backpressure);
    need("credit stall cycles", n_credit_stall);
    need("interleaver rotations", n_il_wrap);
    need("input register full at request", n_reg_full_wait);
    need("start of symbol", n_sos);
    need("end of frame", n_eof);
    need("BIST bytes", n_bist_bytes);
    need("MISR words", n_misr);
    need("JTAG configuration scans", n_jtag);
    $display("simulated time %0t", $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog: %0d symbols seen", sym);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
