// Final stage of the 256-point IFFT (radix-4 decimation in frequency of the
// input, i.e. X split into X[4m + r]). Given the four 64-point results
// Y_r[n] for one n, it forms Z_r = Y_r[n] * exp(+j*2*pi*r*n/256) and the
// 4-point inverse DFT across r:
//   x[n + 64q] = (1/4) * sum_r Z_r * j^(r*q),  q = 0..3.
// One register stage: inputs taken when in_valid, outputs valid one clock
// later. Rounding and saturation to 16 bits; the 1/4 scaling is this design's
// choice (with the 1/16 of the first stage the IFFT is scaled by 1/64).
`timescale 1ns/1ps
module ifft4
  import moonrake_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [5:0] in_n,
  input  cplx_t      in_y [4],
  output logic       out_valid,
  output logic [5:0] out_n,
  output cplx_t      out_x [4]
);
  logic signed [39:0] zr [4];
  logic signed [39:0] zi [4];
  logic signed [15:0] c [4];
  logic signed [15:0] s [4];
  logic [7:0] ti [4];

  for (genvar r = 0; r < 4; r++) begin : g_tw
    assign ti[r] = 8'(r * int'(in_n));
    cos_rom u_rom (.k(ti[r]), .cos_o(c[r]), .sin_o(s[r]));
    // Q1.14 twiddle product, kept with 14 fractional bits
    assign zr[r] = 40'(in_y[r].re * c[r]) - 40'(in_y[r].im * s[r]);
    assign zi[r] = 40'(in_y[r].re * s[r]) + 40'(in_y[r].im * c[r]);
  end

  // radix-4 butterfly with j^(r*q)
  logic signed [39:0] xr [4];
  logic signed [39:0] xi [4];
  always_comb begin
    xr[0] = zr[0] + zr[1] + zr[2] + zr[3];
    xi[0] = zi[0] + zi[1] + zi[2] + zi[3];
    xr[1] = zr[0] - zi[1] - zr[2] + zi[3];
    xi[1] = zi[0] + zr[1] - zi[2] - zr[3];
    xr[2] = zr[0] - zr[1] + zr[2] - zr[3];
    xi[2] = zi[0] - zi[1] + zi[2] - zi[3];
    xr[3] = zr[0] + zi[1] - zr[2] - zi[3];
    xi[3] = zi[0] - zr[1] - zi[2] + zr[3];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_n     <= '0;
      for (int q = 0; q < 4; q++) out_x[q] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_n <= in_n;
        for (int q = 0; q < 4; q++) begin
          out_x[q].re <= sat16((xr[q] + 40'sd32768) >>> 16);
          out_x[q].im <= sat16((xi[q] + 40'sd32768) >>> 16);
        end
      end
    end
endmodule
