// tb_filt2d_row: self-check of one systolic row with W = 8, N = 2.
//
// Three rows are driven with the same random stream: an IIR middle row
// (b_0 .. b_N and a partial-sum input), an IIR row 0 (no b_0 tap) and an FIR
// last row (no Y taps, no partial-sum input).  The expected partial sum is
// sum_j fw(a_j, xh(t-j)) + sum_j fw(b_j, yh(t-j)) + psum_in, modulo 2^W,
// with samples from before the latest clear taken as zero.  Clears are
// issued at random.  The output is checked in the same clock as its inputs
// (the row is combinational from xh, yh and psum_in).
module tb_filt2d_row;
  import tb_ref_pkg::*;
  localparam int W = 8, N = 2;
  int checks = 0, failures = 0;

  logic         clk = 1'b0, clr = 1'b1;
  logic [W-1:0] xh = '0, yh = '0, psum_in = '0;
  logic [W-1:0] a [N+1], b [N+1];
  logic [W-1:0] p_mid, p_first, p_last;
  int xhist [N+1], yhist [N+1];   // xhist[j] = xh(t-j) after clears
  int e_mid, e_first, e_last, nclr = 0;

  filt2d_row #(.W(W), .N(N), .IIR(1'b1), .FIRST(1'b0), .LAST(1'b0)) dut_mid (
    .clk(clk), .clr(clr), .xh(xh), .yh(yh), .a(a), .b(b), .psum_in(psum_in), .psum_out(p_mid));
  filt2d_row #(.W(W), .N(N), .IIR(1'b1), .FIRST(1'b1), .LAST(1'b0)) dut_first (
    .clk(clk), .clr(clr), .xh(xh), .yh(yh), .a(a), .b(b), .psum_in(psum_in), .psum_out(p_first));
  filt2d_row #(.W(W), .N(N), .IIR(1'b0), .FIRST(1'b0), .LAST(1'b1)) dut_last (
    .clk(clk), .clr(clr), .xh(xh), .yh(yh), .a(a), .b(b), .psum_in(psum_in), .psum_out(p_last));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j <= N; j++) begin
      a[j] = W'($urandom); b[j] = W'($urandom); xhist[j] = 0; yhist[j] = 0;
    end
    @(posedge clk);
    clr <= 1'b0;
    for (int t = 0; t < 3000; t++) begin
      xh      <= W'($urandom);
      yh      <= W'($urandom);
      psum_in <= W'($urandom);
      clr     <= ($urandom % 16 == 0);
      if (t % 1000 == 999) for (int j = 0; j <= N; j++) begin a[j] = W'($urandom); b[j] = W'($urandom); end
      #1;
      xhist[0] = int'(xh);
      yhist[0] = int'(yh);
      e_mid = int'(psum_in); e_first = int'(psum_in); e_last = 0;
      for (int j = 0; j <= N; j++) begin
        e_mid   += fw_ref(int'(a[j]), xhist[j], W) + fw_ref(int'(b[j]), yhist[j], W);
        e_first += fw_ref(int'(a[j]), xhist[j], W) + ((j > 0) ? fw_ref(int'(b[j]), yhist[j], W) : 0);
        e_last  += fw_ref(int'(a[j]), xhist[j], W);
      end
      checks += 3;
      if (int'(p_mid)   != (e_mid   & 255)) begin failures++; if (failures < 10) $display("t=%0d mid %0d expected %0d", t, p_mid, e_mid & 255); end
      if (int'(p_first) != (e_first & 255)) begin failures++; if (failures < 10) $display("t=%0d first %0d expected %0d", t, p_first, e_first & 255); end
      if (int'(p_last)  != (e_last  & 255)) begin failures++; if (failures < 10) $display("t=%0d last %0d expected %0d", t, p_last, e_last & 255); end
      @(posedge clk);
      // tap registers: shift, or clear when clr was high
      if (clr) begin
        nclr++;
        for (int j = 1; j <= N; j++) begin xhist[j] = 0; yhist[j] = 0; end
      end else begin
        for (int j = N; j >= 1; j--) begin xhist[j] = xhist[j-1]; yhist[j] = yhist[j-1]; end
      end
    end
    checks++;
    if (nclr == 0) begin failures++; $display("no clear was exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
