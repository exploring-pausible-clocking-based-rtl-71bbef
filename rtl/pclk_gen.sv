// Behavioural model of a pausible local clock generator (not synthesizable:
// the real part is a ring oscillator with a programmable delay line and a
// mutual-exclusion element, a full-custom macro).
// The island clock has a programmable half period (half_period, in ps). At
// the end of every low phase the generator arbitrates: port controllers that
// have raised pause_req by then are granted (pause_gnt) and the next rising
// edge waits until every granted request has been withdrawn. A grant is given
// only while clk is low, so data a port controller moves while it holds a
// grant can never meet a clock edge. Requests raised after the decision wait
// for the next low phase. Stretching the low phase instead of resampling the
// data is what removes metastability at the clock boundary.
// The clock runs during reset; a half period below 100 ps is treated as 100 ps.
`timescale 1ns/1ps
module pclk_gen #(
  parameter int NPORT = 2
) (
  input  logic             rst_n,
  input  logic [15:0]      half_period,
  input  logic [NPORT-1:0] pause_req,
  output logic [NPORT-1:0] pause_gnt,
  output logic             clk
);
  realtime hp;
  int unsigned n_pauses;   // number of stretched cycles, for observation

  always_comb hp = (half_period < 16'd100) ? 0.1 : real'(half_period) / 1000.0;

  initial begin
    clk       = 1'b0;
    pause_gnt = '0;
    n_pauses  = 0;
    forever begin
      clk = 1'b0;
      #(hp);
      if (rst_n && (pause_req != '0)) begin
        pause_gnt = pause_req;
        n_pauses  = n_pauses + 1;
        wait ((pause_gnt & pause_req) == '0);
        pause_gnt = '0;
      end
      clk = 1'b1;
      #(hp);
    end
  end

  // A grant never coexists with a high clock.
  always @(posedge clk) if (rst_n) assert (pause_gnt == '0) else $error("clock rose during a pause grant");
endmodule
