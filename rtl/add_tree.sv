// add_tree: balanced binary adder tree.
//
// The operands of one systolic row (its products and the partial sum coming
// up from the row below) are added in a tree of ceil(log2(NUM)) adder levels,
// which is what sets the critical path of the filter: a multiplier followed
// by two adder levels for the second-order FIR filter, three for the IIR
// filter.  Operand count padding uses zeros.  Sums are modulo 2^W: with the
// coefficient scaling the filter uses (sum of |coefficients| below one) no
// intermediate sum leaves the W-bit range.
//
// Adding the row products in a tree is the published arrangement; the
// zero-padded balanced shape is this design's choice.
//
// Interface: purely combinational; op[k] are the NUM operands, sum their
// W-bit sum.
module add_tree #(
  parameter int unsigned NUM = 4,
  parameter int unsigned W   = 4
) (
  input  logic [W-1:0] op [NUM],
  output logic [W-1:0] sum
);
  localparam int unsigned LEVELS = (NUM > 1) ? $clog2(NUM) : 0;
  localparam int unsigned LEAVES = 1 << LEVELS;

  logic [W-1:0] node [LEAVES];

  // level by level, node[k] <= node[2k] + node[2k+1], in place
  always_comb begin
    for (int k = 0; k < int'(LEAVES); k++) node[k] = (k < int'(NUM)) ? op[k] : '0;
    for (int l = 1; l <= int'(LEVELS); l++) begin
      for (int k = 0; k < int'(LEAVES >> l); k++) node[k] = node[2*k] + node[2*k+1];
    end
  end

  assign sum = node[0];
endmodule
