// tb_fw_mult: exhaustive self-check of the fixed-width multiplier.
//
// For W = 4 (the design width) and W = 6, every pair of operands is applied.
// The expected output is worked out from the exact signed product: the
// multiplier must return floor((a*x - D + B) / 2^W) mod 2^W, where D is the
// value of the partial products of columns 0 .. W-2 that it drops and B the
// constant bias: half an output LSB plus the mean of D, ((W-2) 2^(W-1) + 1)/4,
// capped at 2^W - 1.  The
// test also checks that a zero operand gives zero, that the error stays
// within 2.5 output LSBs, and that the mean error is smaller in magnitude than
// that of plain truncation.
module tb_fw_mult;
  int checks = 0, failures = 0;

  logic [3:0] a4, x4, p4;
  logic [5:0] a6, x6, p6;

  fw_mult #(.W(4)) dut4 (.a(a4), .x(x4), .p(p4));
  fw_mult #(.W(6)) dut6 (.a(a6), .x(x6), .p(p6));

  function automatic int sx(input int v, input int w);
    return (v >= (1 << (w - 1))) ? v - (1 << w) : v;
  endfunction

  // expected code of the fixed-width product
  function automatic int ref_p(input int a, input int x, input int w);
    int d = 0, full, r, b;
    b = (1 << (w - 1)) + ((w - 2) * (1 << (w - 1)) + 1) / 4;
    if (b > (1 << w) - 1) b = (1 << w) - 1;
    for (int i = 0; i < w; i++)
      for (int j = 0; j < w; j++)
        if (i + j <= w - 2) d += ((a >> i) & 1) * ((x >> j) & 1) * (1 << (i + j));
    full = sx(a, w) * sx(x, w);
    r = full - d + b;
    r = r >>> w;                       // floor
    return r & ((1 << w) - 1);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int err_sum, trunc_sum;

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction
  int got, exp_p, full, maxerr, e;

  initial begin
    for (int w = 4; w <= 6; w += 2) begin
      err_sum = 0; trunc_sum = 0; maxerr = 0;
      for (int a = 0; a < (1 << w); a++) begin
        for (int x = 0; x < (1 << w); x++) begin
          if (w == 4) begin a4 = 4'(a); x4 = 4'(x); end
          else        begin a6 = 6'(a); x6 = 6'(x); end
          #1;
          got   = (w == 4) ? int'(p4) : int'(p6);
          exp_p = ref_p(a, x, w);
          checks++;
          if (got != exp_p) begin
            failures++;
            if (failures < 10) $display("W=%0d a=%0d x=%0d: p=%0d expected %0d", w, a, x, got, exp_p);
          end
          full = sx(a, w) * sx(x, w);
          e = sx(got, w) * (1 << w) - full;
          if (e < 0) e = -e;
          if (e > maxerr && !(sx(a, w) == -(1 << (w-1)) && sx(x, w) == -(1 << (w-1)))) maxerr = e;
          err_sum   += sx(got, w) * (1 << w) - full;
          trunc_sum += (full >>> w) * (1 << w) - full;
          if (a == 0 || x == 0) begin
            checks++;
            if (got != 0) begin failures++; $display("W=%0d zero operand gives %0d", w, got); end
          end
        end
      end
      checks++;
      if (maxerr > 5 * (1 << w) / 2) begin
        failures++; $display("W=%0d max error %0d exceeds 2.5 LSB", w, maxerr);
      end
      checks++;
      if (iabs(err_sum) >= iabs(trunc_sum)) begin
        failures++; $display("W=%0d error sum %0d not below truncation %0d", w, err_sum, trunc_sum);
      end
      $display("W=%0d: mean error %f (truncation %f), max |error| %0d/%0d LSB",
               w, real'(err_sum) / (1 << (3*w)), real'(trunc_sum) / (1 << (3*w)), maxerr, 1 << w);

    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
