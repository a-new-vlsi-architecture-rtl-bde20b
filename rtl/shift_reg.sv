// shift_reg: the line shift register (SR) between two systolic rows.
//
// With the image scanned row by row, one pixel per clock, a delay of one
// image line minus one pixel (z1^-1 z2^+1 = z^-(M-1)) carries the partial
// sum of row i of the filter to the adder tree of row i-1.  This module is
// that delay: LEN = M-1 stages of W-bit registers, shifted every clock.
// The length M-1 and the word width follow the document; the synchronous
// reset RST, clearing every stage so that a new frame starts with zero
// contributions from the rows above it, is this design's choice.
//
// Interface: dout(t) = din(t - LEN); after rst, dout is 0 for LEN cycles.
module shift_reg #(
  parameter int unsigned W   = 4,
  parameter int unsigned LEN = 511
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  logic [W-1:0] stage [LEN];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < int'(LEN); k++) stage[k] <= '0;
    end else begin
      stage[0] <= din;
      for (int k = 1; k < int'(LEN); k++) stage[k] <= stage[k-1];
    end
  end

  assign dout = stage[LEN-1];
endmodule
