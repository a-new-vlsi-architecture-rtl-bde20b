// row_ctrl: line-boundary control of the row-wise scanned filter.
//
// A counter runs through the pixel column 0 .. M-1 of the image line that is
// entering the filter (one pixel per clock, column 0 in the first clock after
// reset).  On the last column it raises RST2.  The tap registers of systolic
// row i must start every image line empty (zero padding at the left image
// edge); row i works i clocks ahead of row 0's line phase, so its clear
// strobe is RST2 delayed by i clocks, and the global reset is ORed in:
// rst1[i] = RST | RST2 delayed by i.  The counter, RST2 and the OR gate
// follow the document; the per-row delay of RST2 is this design's reading
// of how its clears are synchronised with rows that run ahead of row 0.
//
// Interface: col is the column of the pixel on the filter input this clock;
// rst2 is high while col == M-1; rst1[i] are synchronous clears for the tap
// registers of row i.
module row_ctrl #(
  parameter int unsigned M = 512,
  parameter int unsigned N = 2
) (
  input  logic                 clk,
  input  logic                 rst,
  output logic [$clog2(M)-1:0] col,
  output logic                 rst2,
  output logic                 rst1 [N+1]
);
  localparam int unsigned CW = $clog2(M);

  // rst2_d[k]: RST2 delayed by k clocks
  logic rst2_d [N+1];

  always_ff @(posedge clk) begin
    if (rst || rst2) col <= '0;
    else             col <= col + CW'(1);
  end

  assign rst2      = (col == CW'(M - 1));
  assign rst2_d[0] = rst2;

  for (genvar k = 1; k <= N; k++) begin : g_dly
    always_ff @(posedge clk) begin
      if (rst) rst2_d[k] <= 1'b0;
      else     rst2_d[k] <= rst2_d[k-1];
    end
  end

  for (genvar k = 0; k <= N; k++) begin : g_or
    assign rst1[k] = rst | rst2_d[k];
  end
endmodule
