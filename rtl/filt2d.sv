// filt2d: 2-D IIR/FIR digital filter as a systolic array without global
// broadcast.
//
// The filter computes, for an image scanned line by line (one pixel per
// clock, M pixels per line),
//   y(n,m) = sum_{i,j=0..N} a_ij x(n-i,m-j) + sum_{(i,j)!=(0,0)} b_ij y(n-i,m-j)
// with x and y taken as zero outside the image (above the first line and
// left of the first column).  With IIR = 0 the b terms and their hardware
// are left out and the structure is the FIR filter.
//
// Structure (N+1 systolic rows, row 0 at the output):
//   * The input X passes a chain of N unit delays giving X_i = z^-i X; row i
//     takes X_i and runs it through its own N-tap delay chain, so every
//     register output drives at most a multiplier and the next register.
//     For the IIR filter the output Y passes the same kind of chain.
//   * Row i multiplies its taps by a_i0 .. a_iN (and b_i0 .. b_iN) with
//     fixed-width multipliers and adds the products, in an adder tree, to
//     the partial sum of row i+1.
//   * The partial sum of row i (i >= 1) reaches row i-1 through a shift
//     register of M-1 stages: one line back (z1^-1 = z^-M) minus the one
//     pixel that the extra input delay X_i = z^-1 X_(i-1) already added.
//   * The sum of row 0 is shifted one bit left (output scaling from the
//     product format, two integer bits, to the sample format) and is Y.
//   * row_ctrl counts the columns and clears the tap chains of row i when
//     that row starts a new line (left image border).
// This follows the rewritten transfer function and delay arrangement of the
// document.  The per-row staggering of the line clears, the synchronous
// reset of every register and the coefficient ports are this design's
// choices.  A frame is one image after a reset; pulse rst between frames.
//
// Word format: x_in, y_out and the coefficients are W-bit two's-complement
// fractions; the sum of the absolute coefficient values must stay below one
// so that no sum overflows (an assertion checks this outside reset).
//
// Timing: latency 0, y_out belongs to the pixel on x_in in the same clock
// (a combinational path of one multiplier and 2 (FIR) or 3 (IIR, N = 2)
// adder levels).  The first pixel of a frame is taken in the first clock
// with rst low; col is the column of the current pixel.
module filt2d #(
  parameter int unsigned W   = 4,
  parameter int unsigned N   = 2,
  parameter int unsigned M   = 512,
  parameter bit          IIR = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [W-1:0]         x_in,
  input  logic [W-1:0]         a_coef [N+1][N+1],
  input  logic [W-1:0]         b_coef [N+1][N+1],
  output logic [W-1:0]         y_out,
  output logic [$clog2(M)-1:0] col
);
  logic         rst2;
  logic         rst1 [N+1];
  logic [W-1:0] xhat [N+1];   // X_i = z^-i X
  logic [W-1:0] yhat [N+1];   // Y_i = z^-i Y (IIR only)
  logic [W-1:0] psum [N+1];   // partial sum leaving row i
  logic [W-1:0] sr_out [N+1]; // partial sum of row i after the line shift register

  row_ctrl #(.M(M), .N(N)) u_ctrl (
    .clk(clk), .rst(rst), .col(col), .rst2(rst2), .rst1(rst1)
  );

  // input path: X_i = z^-1 X_(i-1)
  assign xhat[0] = x_in;
  for (genvar i = 1; i <= N; i++) begin : g_xhat
    always_ff @(posedge clk) begin
      if (rst) xhat[i] <= '0;
      else     xhat[i] <= xhat[i-1];
    end
  end

  // output path (feedback): Y_i = z^-1 Y_(i-1)
  assign yhat[0] = y_out;
  if (IIR) begin : g_yhat
    for (genvar i = 1; i <= N; i++) begin : g_stage
      always_ff @(posedge clk) begin
        if (rst) yhat[i] <= '0;
        else     yhat[i] <= yhat[i-1];
      end
    end
  end else begin : g_no_yhat
    for (genvar i = 1; i <= N; i++) begin : g_stage
      assign yhat[i] = '0;
    end
  end

  for (genvar i = 0; i <= N; i++) begin : g_row
    filt2d_row #(
      .W(W), .N(N), .IIR(IIR), .FIRST(i == 0), .LAST(i == N)
    ) u_row (
      .clk     (clk),
      .clr     (rst1[i]),
      .xh      (xhat[i]),
      .yh      (yhat[i]),
      .a       (a_coef[i]),
      .b       (b_coef[i]),
      .psum_in ((i == N) ? W'(0) : sr_out[i+1]),
      .psum_out(psum[i])
    );
  end

  // line shift registers between rows: z1^-1 z2^+1 = z^-(M-1)
  assign sr_out[0] = '0;
  for (genvar i = 1; i <= N; i++) begin : g_sr
    shift_reg #(.W(W), .LEN(M - 1)) u_sr (
      .clk(clk), .rst(rst), .din(psum[i]), .dout(sr_out[i])
    );
  end

  // output scaling: one bit left, from product to sample format
  assign y_out = {psum[0][W-2:0], 1'b0};

  // Rule of the number format: the sum of |a_ij| (and |b_ij|) stays below
  // one, i.e. the magnitude codes add up to less than 2^(W-1).  Otherwise a
  // sum can overflow the W-bit adders and the output wraps.
  localparam int unsigned MW = W + $clog2(2 * (N + 1) * (N + 1));

  logic [MW-1:0] coef_mag;

  function automatic logic [W-1:0] mag(input logic [W-1:0] c);
    return c[W-1] ? (~c + 1'b1) : c;
  endfunction

  always_comb begin
    coef_mag = '0;
    for (int i = 0; i <= int'(N); i++) begin
      for (int j = 0; j <= int'(N); j++) begin
        coef_mag = coef_mag + MW'(mag(a_coef[i][j]));
        if (IIR && (i != 0 || j != 0))
          coef_mag = coef_mag + MW'(mag(b_coef[i][j]));
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (coef_mag < MW'(2 ** (W - 1)))
        else $error("filt2d: sum of |coefficients| is %0d/%0d, must stay below one",
                    coef_mag, 2 ** (W - 1));
    end
  end
endmodule
