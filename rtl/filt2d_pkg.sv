// filt2d_pkg: constants shared by the 2-D systolic filter modules.
//
// The filter configuration worked out in detail is a second-order (N = 2)
// 2-D filter for a 512-pixel-wide image (M = 512) with 4-bit words (W = 4).
// These are the defaults of every module; a different size is obtained by
// overriding the module parameters.
//
// Number format: samples and coefficients are W-bit two's-complement
// fractions (sign bit, then W-1 fraction bits, value range [-1, 1)).  A
// fixed-width product keeps the upper W bits of the 2W-bit product, so it
// carries two integer bits (value = code / 2^(W-2)).  Partial sums travel in
// that product format; the output scaling shifts the final sum one bit left
// to return to the sample format.
package filt2d_pkg;
  localparam int unsigned FILT_N = 2;    // filter order N1 = N2 = N
  localparam int unsigned FILT_M = 512;  // image width in pixels
  localparam int unsigned FILT_W = 4;    // word width of samples, coefficients, sums

endpackage
