// filt2d_row: one row i of the systolic 2-D filter.
//
// The filter output is rewritten as a nest of row terms,
//   Y = [F(0)X + G(0)Y] + z1^-1 z2 ([F(1)X1 + G(1)Y1] + z1^-1 z2 (...)),
// with F(i) = sum_j a_ij z2^-j, G(i) = sum_j b_ij z2^-j, X_i = z2^-i X and
// Y_i = z2^-i Y.  This module is one bracket: it receives X_i (xh) and, for
// an IIR filter, Y_i (yh), runs each through its own chain of N unit delays,
// multiplies every tap by its coefficient in a fixed-width multiplier, and
// adds the products to the partial sum arriving from row i+1 in an adder
// tree.  Every delay output drives one multiplier and the next delay only,
// so no signal is broadcast across the array.
//
// Row 0 (FIRST) has no b_00 tap: Y itself is the output being computed, so
// only its delayed taps Y(z^-1) .. Y(z^-N) are used.  Row N (LAST) has no
// partial sum input.  With IIR = 0 the Y chain and the b multipliers are
// not built (FIR filter).
//
// clr is the synchronous clear of the tap registers (the row's RST1): it
// empties the chains at the start of each image line so that pixels of the
// previous line do not enter the taps of the first columns.
//
// The row equation and its local-only wiring follow the published
// structure.  The per-row tap chain (one register per tap, not shared with
// the input path) and the clear input are this design's realisation.  Ports
// a row variant does not use (yh and b when IIR = 0, b[0] in row 0, psum_in
// in the last row) are left unconnected inside.
//
// Timing: xh, yh and psum_in to psum_out are combinational (one multiplier
// and ceil(log2(operands)) adder levels); the taps move one step per clock.
module filt2d_row #(
  parameter int unsigned W     = 4,
  parameter int unsigned N     = 2,
  parameter bit          IIR   = 1'b0,
  parameter bit          FIRST = 1'b0,
  parameter bit          LAST  = 1'b0
) (
  input  logic         clk,
  input  logic         clr,
  input  logic [W-1:0] xh,
  input  logic [W-1:0] yh,
  input  logic [W-1:0] a [N+1],
  input  logic [W-1:0] b [N+1],
  input  logic [W-1:0] psum_in,
  output logic [W-1:0] psum_out
);
  localparam int unsigned NA   = N + 1;
  localparam int unsigned NB   = IIR ? (FIRST ? N : N + 1) : 0;
  localparam int unsigned B0   = FIRST ? 1 : 0;  // first b tap used
  localparam int unsigned NIN  = LAST ? 0 : 1;
  localparam int unsigned NOPS = NA + NB + NIN;

  logic [W-1:0] xt [N+1];   // X_i delayed by 0 .. N
  logic [W-1:0] ops [NOPS];

  assign xt[0] = xh;
  for (genvar j = 1; j <= N; j++) begin : g_xtap
    always_ff @(posedge clk) begin
      if (clr) xt[j] <= '0;
      else     xt[j] <= xt[j-1];
    end
  end

  for (genvar j = 0; j <= N; j++) begin : g_amul
    fw_mult #(.W(W)) u_mul (.a(a[j]), .x(xt[j]), .p(ops[j]));
  end

  if (IIR) begin : g_iir
    logic [W-1:0] yd [N];   // Y_i delayed by 1 .. N
    for (genvar j = 0; j < N; j++) begin : g_ytap
      always_ff @(posedge clk) begin
        if (clr)         yd[j] <= '0;
        else if (j == 0) yd[j] <= yh;
        else             yd[j] <= yd[(j == 0) ? 0 : j-1];
      end
    end
    if (!FIRST) begin : g_b0
      fw_mult #(.W(W)) u_mul (.a(b[0]), .x(yh), .p(ops[NA]));
    end
    for (genvar j = 1; j <= N; j++) begin : g_bmul
      fw_mult #(.W(W)) u_mul (.a(b[j]), .x(yd[j-1]), .p(ops[NA + j - B0]));
    end
  end

  if (!LAST) begin : g_in
    assign ops[NOPS-1] = psum_in;
  end

  add_tree #(.NUM(NOPS), .W(W)) u_tree (.op(ops), .sum(psum_out));
endmodule
