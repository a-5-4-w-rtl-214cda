// MVG1: the elementary two-input minimum-value block of the sorting tree.
//
// One QW-bit comparator and one QW-bit 2-to-1 multiplexer.  cp is 0 when
// x0 < x1 and 1 when x1 < x0; on a tie cp is 0 (this design's choice), so
// the lower-indexed input wins and indices stay deterministic.
// Combinational.
module mvg1 #(
  parameter int unsigned QW = 3
) (
  input  logic [QW-1:0] x0,
  input  logic [QW-1:0] x1,
  output logic [QW-1:0] min_o,
  output logic          cp
);

  assign cp    = (x1 < x0);
  assign min_o = cp ? x1 : x0;

endmodule
