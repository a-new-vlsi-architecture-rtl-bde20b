// tb_ref_pkg: reference arithmetic for the filter testbenches.
//
// fw_ref gives the expected code of a W-bit fixed-width product, worked out
// from the exact signed product rather than from partial products:
//   p = floor((a*x - D + B) / 2^W) mod 2^W
// with D the value of the dropped partial products a_i x_j, i+j <= W-2, and
// B = min(2^(W-1) + ((W-2) 2^(W-1) + 1) / 4, 2^W - 1) the rounding and
// compensation bias.  Filter sums are taken modulo 2^W and the output is the
// row-0 sum shifted one bit left.
package tb_ref_pkg;
  function automatic int sx(input int v, input int w);
    return (v >= (1 << (w - 1))) ? v - (1 << w) : v;
  endfunction

  function automatic int fw_ref(input int a, input int x, input int w);
    int d, full, r, b;
    d = 0;
    b = (1 << (w - 1)) + ((w - 2) * (1 << (w - 1)) + 1) / 4;
    if (b > (1 << w) - 1) b = (1 << w) - 1;
    for (int i = 0; i < w; i++)
      for (int j = 0; j < w; j++)
        if (i + j <= w - 2) d += ((a >> i) & 1) * ((x >> j) & 1) * (1 << (i + j));
    full = sx(a, w) * sx(x, w);
    r = (full - d + b) >>> w;
    return r & ((1 << w) - 1);
  endfunction
endpackage
