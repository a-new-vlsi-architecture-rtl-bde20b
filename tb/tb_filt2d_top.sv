// tb_filt2d_top: end-to-end test of the design at its full size.
//
// Both filters (FIR and IIR, N = 2, 512-pixel lines, W = 4) filter two
// complete 512 x 512 frames of random pixels, one pixel per clock, with a
// reset between the frames.  Frame 0 uses fixed coefficients (a smoothing
// FIR kernel; an IIR filter with feedback taps in both directions), frame 1
// random coefficients; in both the sum of |coefficients| stays below one,
// as the number format requires.  Every output is compared, in the clock of
// its pixel (latency 0), with the filter equation evaluated independently
// (see tb_ref_pkg).  The test also counts that each mechanism of the design
// was used: line-boundary clears, left-border pixels where the previous
// line's last pixel is non-zero, non-zero partial sums leaving each line
// shift register, pixels where the IIR feedback terms are non-zero, and the
// frame restart; one that never happened counts as a failure.
module tb_filt2d_top;
  import tb_ref_pkg::*;
  localparam int W = 4, M = 512, L = 512, FRAMES = 2;
  int checks = 0, failures = 0;
  int n_clear = 0, n_border = 0, n_sr1 = 0, n_sr2 = 0, n_fb = 0, n_frame = 0;

  logic         clk = 1'b0, rst = 1'b1;
  logic [W-1:0] fir_x = '0, iir_x = '0;
  logic [W-1:0] fir_a [3][3], iir_a [3][3], iir_b [3][3];
  logic [W-1:0] fir_y, iir_y;
  logic [8:0]   fir_col, iir_col;

  int xf [L][M], xr [L][M];   // FIR and IIR input frames
  int yf [L][M], yr [L][M];   // expected outputs
  int s, fb, budget, v, slot;

  filt2d_top dut (
    .clk(clk), .rst(rst),
    .fir_x(fir_x), .fir_a(fir_a), .fir_y(fir_y), .fir_col(fir_col),
    .iir_x(iir_x), .iir_a(iir_a), .iir_b(iir_b), .iir_y(iir_y), .iir_col(iir_col)
  );

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, sampled on every clock outside reset
  always @(posedge clk) begin
    if (!rst) begin
      if (dut.u_fir.sr_out[1] != 0 && dut.u_iir.sr_out[1] != 0) n_sr1++;
      if (dut.u_fir.sr_out[2] != 0 && dut.u_iir.sr_out[2] != 0) n_sr2++;
    end
  end

  // frame samples, zero outside the frame
  function automatic int gxf(input int n, input int m);
    return (n < 0 || m < 0) ? 0 : xf[n][m];
  endfunction
  function automatic int gxr(input int n, input int m);
    return (n < 0 || m < 0) ? 0 : xr[n][m];
  endfunction
  function automatic int gyr(input int n, input int m);
    return (n < 0 || m < 0) ? 0 : yr[n][m];
  endfunction

  initial begin
    for (int fr = 0; fr < FRAMES; fr++) begin
      if (fr == 0) begin
        // codes are multiples of 1/8; sum of magnitudes 7/8 for each filter
        // (with 4-bit words a coefficient of 1/8 times any pixel rounds to zero)
        fir_a = '{'{4'd2, 4'd0, 4'd0}, '{4'd0, 4'd3, 4'd0}, '{4'd0, 4'd0, 4'd2}};
        iir_a = '{'{4'd2, 4'd0, 4'd0}, '{4'd0, 4'd0, 4'd0}, '{4'd0, 4'd0, 4'd0}};
        iir_b = '{'{4'd0, 4'd3, 4'd0}, '{4'd0, 4'd0, 4'd0}, '{4'd14, 4'd0, 4'd0}};
      end else begin
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++) begin fir_a[i][j] = '0; iir_a[i][j] = '0; iir_b[i][j] = '0; end
        budget = 7;
        while (budget > 0) begin
          v = 1 + int'($urandom % 2); if (v > budget) v = budget; budget -= v;
          slot = int'($urandom % 9);
          fir_a[slot / 3][slot % 3] = W'(($urandom % 2) ? v : -v);
        end
        budget = 7;
        while (budget > 0) begin
          v = 1 + int'($urandom % 3); if (v > budget) v = budget; budget -= v;
          slot = int'($urandom % 17);
          if (slot < 9) iir_a[slot / 3][slot % 3] = W'(($urandom % 2) ? v : -v);
          else          iir_b[(slot - 8) / 3][(slot - 8) % 3] = W'(($urandom % 2) ? v : -v);
        end
      end
      rst <= 1'b1;
      repeat (2) @(posedge clk);
      rst <= 1'b0;
      n_frame++;
      for (int n = 0; n < L; n++) begin
        for (int m = 0; m < M; m++) begin
          xf[n][m] = int'($urandom % 16);
          xr[n][m] = int'($urandom % 16);
          fir_x <= W'(xf[n][m]);
          iir_x <= W'(xr[n][m]);
          s = 0;
          for (int i = 0; i <= 2; i++)
            for (int j = 0; j <= 2; j++) s += fw_ref(int'(fir_a[i][j]), gxf(n - i, m - j), W);
          yf[n][m] = (2 * s) & 15;
          s = 0; fb = 0;
          for (int i = 0; i <= 2; i++)
            for (int j = 0; j <= 2; j++) begin
              s += fw_ref(int'(iir_a[i][j]), gxr(n - i, m - j), W);
              if (i != 0 || j != 0) fb += fw_ref(int'(iir_b[i][j]), gyr(n - i, m - j), W);
            end
          yr[n][m] = (2 * (s + fb)) & 15;
          if ((fb & 15) != 0) n_fb++;
          #1;
          checks += 3;
          if (int'(fir_y) != yf[n][m]) begin
            failures++;
            if (failures < 10) $display("frame %0d (%0d,%0d): FIR y=%0d expected %0d", fr, n, m, fir_y, yf[n][m]);
          end
          if (int'(iir_y) != yr[n][m]) begin
            failures++;
            if (failures < 10) $display("frame %0d (%0d,%0d): IIR y=%0d expected %0d", fr, n, m, iir_y, yr[n][m]);
          end
          if (int'(fir_col) != m || int'(iir_col) != m) begin
            failures++;
            if (failures < 10) $display("frame %0d (%0d,%0d): column %0d/%0d", fr, n, m, fir_col, iir_col);
          end
          if (dut.u_fir.rst2 && dut.u_iir.rst2) n_clear++;
          if (m == 0 && n > 0 && xf[n-1][M-1] != 0 && xr[n-1][M-1] != 0) n_border++;
          @(posedge clk);
        end
      end
    end
    $display("line clears %0d, left-border pixels %0d, SR1 busy %0d, SR2 busy %0d, IIR feedback %0d, frames %0d",
             n_clear, n_border, n_sr1, n_sr2, n_fb, n_frame);
    checks += 6;
    if (n_clear  != FRAMES * L) begin failures++; $display("line clears: %0d", n_clear); end
    if (n_border == 0) begin failures++; $display("left border never exercised"); end
    if (n_sr1    == 0) begin failures++; $display("line shift register 1 never carried data"); end
    if (n_sr2    == 0) begin failures++; $display("line shift register 2 never carried data"); end
    if (n_fb     == 0) begin failures++; $display("IIR feedback never non-zero"); end
    if (n_frame  != FRAMES) begin failures++; $display("frames: %0d", n_frame); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
