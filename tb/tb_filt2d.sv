// tb_filt2d: self-check of the systolic 2-D filter on small images.
//
// Three filters see the same row-wise pixel stream of 8-pixel lines, frames
// of 7 lines, a reset between frames: a second-order IIR filter, the FIR
// filter with the same a coefficients, and a third-order IIR filter, all with
// W = 8 and random coefficients (new ones every frame) whose magnitudes add
// up to less than one, as the number format requires.  The expected output
// of every pixel is computed from the filter equation
//   s(n,m) = sum_{i,j} fw(a_ij, x(n-i,m-j)) + sum_{(i,j)!=(0,0)} fw(b_ij, y(n-i,m-j))
//   y(n,m) = 2 s(n,m)  (mod 2^W)
// with x and y zero outside the frame, and compared in the clock in which
// the pixel is presented (latency 0).  The column output is checked too.
module tb_filt2d;
  import tb_ref_pkg::*;
  localparam int W = 8, M = 8, L = 7, FRAMES = 4, NMAX = 3;
  int checks = 0, failures = 0;

  logic         clk = 1'b0, rst = 1'b1;
  logic [W-1:0] x = '0;
  logic [W-1:0] a2 [3][3], b2 [3][3], a3 [4][4], b3 [4][4];
  logic [W-1:0] y_iir, y_fir, y_iir3;
  logic [2:0]   col_iir, col_fir, col_iir3;

  int xi [L][M];
  int yi [3][L][M];   // expected outputs of the three filters
  int s, n_bnd = 0, budget, v, slot;
  bit neg;

  filt2d #(.W(W), .N(2), .M(M), .IIR(1'b1)) dut_iir (
    .clk(clk), .rst(rst), .x_in(x), .a_coef(a2), .b_coef(b2), .y_out(y_iir), .col(col_iir));
  filt2d #(.W(W), .N(2), .M(M), .IIR(1'b0)) dut_fir (
    .clk(clk), .rst(rst), .x_in(x), .a_coef(a2), .b_coef(b2), .y_out(y_fir), .col(col_fir));
  filt2d #(.W(W), .N(3), .M(M), .IIR(1'b1)) dut_iir3 (
    .clk(clk), .rst(rst), .x_in(x), .a_coef(a3), .b_coef(b3), .y_out(y_iir3), .col(col_iir3));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int xv(input int n, input int m);
    return (n < 0 || m < 0) ? 0 : xi[n][m];
  endfunction
  function automatic int yv(input int f, input int n, input int m);
    return (n < 0 || m < 0) ? 0 : yi[f][n][m];
  endfunction

  initial begin
    for (int fr = 0; fr < FRAMES; fr++) begin
      // random coefficients whose magnitudes add up to at most 127/128
      for (int i = 0; i < NMAX + 1; i++)
        for (int j = 0; j < NMAX + 1; j++) begin
          a3[i][j] = '0; b3[i][j] = '0;
          if (i < 3 && j < 3) begin a2[i][j] = '0; b2[i][j] = '0; end
        end
      for (int k = 0; k < 2; k++) begin
        budget = 127;
        while (budget > 0) begin
          v = 1 + int'($urandom % 40); if (v > budget) v = budget; budget -= v;
          slot = int'($urandom % 32);
          neg = 1'($urandom % 2);
          if (k == 0) begin
            // second-order filters: slots 0..8 a_ij, 9..17 b_ij, rest unused
            if (slot < 9)       a2[slot / 3][slot % 3] = W'(neg ? -v : v);
            else if (slot < 18) b2[(slot - 9) / 3][(slot - 9) % 3] = W'(neg ? -v : v);
            else                budget += v;
            // b_00 does not count; keep it non-zero-free for clarity
            b2[0][0] = '0;
          end else begin
            if (slot < 16) a3[slot / 4][slot % 4] = W'(neg ? -v : v);
            else           b3[(slot - 16) / 4][(slot - 16) % 4] = W'(neg ? -v : v);
            b3[0][0] = '0;
          end
        end
      end
      rst <= 1'b1;
      repeat (2) @(posedge clk);
      rst <= 1'b0;
      for (int n = 0; n < L; n++) begin
        for (int m = 0; m < M; m++) begin
          xi[n][m] = (fr == 0 && n == 0) ? 255 : int'($urandom % 256);
          x <= W'(xi[n][m]);
          // filter 0: IIR N=2, filter 1: FIR N=2, filter 2: IIR N=3
          for (int f = 0; f < 3; f++) begin
            int nn;
            nn = (f == 2) ? 3 : 2;
            s = 0;
            for (int i = 0; i <= nn; i++)
              for (int j = 0; j <= nn; j++) begin
                s += fw_ref(int'((f == 2) ? a3[i][j] : a2[i][j]), xv(n - i, m - j), W);
                if (f != 1 && (i != 0 || j != 0))
                  s += fw_ref(int'((f == 2) ? b3[i][j] : b2[i][j]), yv(f, n - i, m - j), W);
              end
            yi[f][n][m] = (s * 2) & 255;
          end
          #1;
          checks += 4;
          if (int'(y_iir) != yi[0][n][m]) begin failures++; if (failures < 10) $display("fr%0d (%0d,%0d) IIR %0d expected %0d", fr, n, m, y_iir, yi[0][n][m]); end
          if (int'(y_fir) != yi[1][n][m]) begin failures++; if (failures < 10) $display("fr%0d (%0d,%0d) FIR %0d expected %0d", fr, n, m, y_fir, yi[1][n][m]); end
          if (int'(y_iir3) != yi[2][n][m]) begin failures++; if (failures < 10) $display("fr%0d (%0d,%0d) IIR3 %0d expected %0d", fr, n, m, y_iir3, yi[2][n][m]); end
          if (int'(col_iir) != m || int'(col_fir) != m || int'(col_iir3) != m) begin
            failures++; if (failures < 10) $display("fr%0d (%0d,%0d) col %0d", fr, n, m, col_iir);
          end
          // a left-border pixel whose previous-line pixel is non-zero shows the line clears at work
          if (m == 0 && n > 0 && xi[n-1][M-1] != 0) n_bnd++;
          @(posedge clk);
        end
      end
    end
    checks++;
    if (n_bnd == 0) begin failures++; $display("left border never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
