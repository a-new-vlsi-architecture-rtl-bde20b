// fw_mult: lower-error fixed-width W x W two's-complement multiplier.
//
// A full W x W product has 2W bits; a fixed-width multiplier returns only
// the upper W (p = P[2W-1:W]) and saves most of the adders of the low half.
// The partial products are formed Baugh-Wooley style: a_i & x_j, inverted
// when exactly one of i, j is the sign position W-1, plus the correction
// constants 2^W and 2^(2W-1).  Columns W .. 2W-1 are kept as in a full
// multiplier.  Of the discarded half, column W-1 (the most significant
// discarded column) is still added, so that its carry into column W follows
// the actual operands, and a fixed bias stands in for rounding (half an
// output LSB) and for the mean of columns 0 .. W-2, which are dropped
// (bias 12 for W = 4, i.e. 2^(W-1) + ((W-2) 2^(W-1) + 1) / 4, capped at
// 2^W - 1).  The result is a product whose mean error is close to zero
// instead of the -1/2 LSB of plain truncation, and a zero operand gives an
// exact zero.
//
// The document uses a fixed-width multiplier of this kind (4 x 4) in every
// tap and names the inputs a_ij^t, x_ij^t and outputs P_t; the exact
// compensation circuit of its cited multiplier is not reproduced here, and
// the scheme above (keep column W-1, add the constant bias) is this design's own.
//
// Interface: purely combinational.
//   a, x : W-bit two's-complement fractions (value = code / 2^(W-1))
//   p    : W-bit product (value = code / 2^(W-2)), i.e. two integer bits
module fw_mult #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] x,
  output logic [W-1:0] p
);
  localparam int unsigned PW = 2 * W;
  // half an output LSB for rounding, plus the mean value of the dropped
  // columns 0 .. W-2 (each partial product is 1 with probability 1/4),
  // capped below one output LSB so that a zero operand stays exact
  localparam int unsigned DMEAN = ((W - 2) * (2 ** (W - 1)) + 1) / 4;
  localparam int unsigned BIAS  = ((2 ** (W - 1)) + DMEAN < (2 ** W)) ?
                                  (2 ** (W - 1)) + DMEAN : (2 ** W) - 1;

  logic [PW-1:0] acc;

  always_comb begin
    logic pp;
    // correction constants of the Baugh-Wooley form, and the bias
    acc = PW'(1) << W;
    acc = acc + (PW'(1) << (PW - 1));
    acc = acc + PW'(BIAS);
    for (int i = 0; i < int'(W); i++) begin
      for (int j = 0; j < int'(W); j++) begin
        if (i + j >= int'(W) - 1) begin
          pp = a[i] & x[j];
          if ((i == int'(W) - 1) != (j == int'(W) - 1)) pp = ~pp;
          acc = acc + (PW'(pp) << (i + j));
        end
      end
    end
  end

  assign p = acc[PW-1:W];
endmodule
