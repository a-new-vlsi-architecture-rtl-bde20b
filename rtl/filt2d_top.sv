// filt2d_top: the two filters of the design side by side.
//
//   * fir_*: the 2-D FIR filter (b_ij = 0) in the configuration worked out
//     gate by gate: N = 2, a 512-pixel-wide image, 4-bit samples,
//     coefficients, adders and registers, fixed-width 4 x 4 multipliers,
//     line shift registers of M-1 stages and a column counter producing the
//     line-boundary clears.
//   * iir_*: the 2-D IIR filter of the same order and image width, with the
//     output fed back through its own delay chain (2(N+1)^2 - 1 multipliers).
//     Its word width is not fixed by the document; it uses the same W.
//
// Both take one pixel per clock in row-wise scan order, with latency 0
// (y belongs to the pixel presented in the same clock), and share clk and
// the synchronous reset rst, which also marks the start of a frame.
module filt2d_top
  import filt2d_pkg::*;
#(
  parameter int unsigned W = FILT_W,
  parameter int unsigned N = FILT_N,
  parameter int unsigned M = FILT_M
) (
  input  logic                 clk,
  input  logic                 rst,
  // FIR filter
  input  logic [W-1:0]         fir_x,
  input  logic [W-1:0]         fir_a [N+1][N+1],
  output logic [W-1:0]         fir_y,
  output logic [$clog2(M)-1:0] fir_col,
  // IIR filter
  input  logic [W-1:0]         iir_x,
  input  logic [W-1:0]         iir_a [N+1][N+1],
  input  logic [W-1:0]         iir_b [N+1][N+1],
  output logic [W-1:0]         iir_y,
  output logic [$clog2(M)-1:0] iir_col
);
  logic [W-1:0] no_b [N+1][N+1];

  for (genvar i = 0; i <= N; i++) begin : g_zero_i
    for (genvar j = 0; j <= N; j++) begin : g_zero_j
      assign no_b[i][j] = '0;
    end
  end

  filt2d #(.W(W), .N(N), .M(M), .IIR(1'b0)) u_fir (
    .clk(clk), .rst(rst), .x_in(fir_x), .a_coef(fir_a), .b_coef(no_b),
    .y_out(fir_y), .col(fir_col)
  );

  filt2d #(.W(W), .N(N), .M(M), .IIR(1'b1)) u_iir (
    .clk(clk), .rst(rst), .x_in(iir_x), .a_coef(iir_a), .b_coef(iir_b),
    .y_out(iir_y), .col(iir_col)
  );
endmodule
