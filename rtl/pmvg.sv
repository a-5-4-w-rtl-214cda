// PMVG: one half (2^(W-1) inputs) of the probabilistic sorter.
//
// Two MVG1 trees find the minima of the two quarters (2^(W-2) inputs each);
// a final MVG1 compares them.  Its winner is min1 of the half, its loser is
// kept as the half's min2 (the "last competitor" of the half's minimum).
// The extra index logic records the index of that loser as well: the
// comparison signal cp selects which quarter's index goes with min1 and
// which with min2.
// Structure follows the published PMVG; all w-2 first stages are placed
// inside it here.
// Combinational.
module pmvg #(
  parameter int unsigned W  = 6,
  parameter int unsigned QW = 3
) (
  input  logic [QW-1:0] x [2**(W-1)],
  output logic [QW-1:0] min1,
  output logic [QW-1:0] min2,
  output logic [W-2:0]  idx1,
  output logic [W-2:0]  idx2
);

  localparam int unsigned QN = 2**(W-2);

  logic [QW-1:0] xq0 [QN];
  logic [QW-1:0] xq1 [QN];
  logic [QW-1:0] m0, m1;
  logic [W-3:0]  cp0, cp1;   // indices inside each quarter
  logic          cp;

  always_comb begin
    for (int k = 0; k < QN; k++) begin
      xq0[k] = x[k];
      xq1[k] = x[QN + k];
    end
  end

  mvg1_tree #(.L(W-2), .QW(QW)) u_q0 (.x(xq0), .min_o(m0), .idx_o(cp0));
  mvg1_tree #(.L(W-2), .QW(QW)) u_q1 (.x(xq1), .min_o(m1), .idx_o(cp1));

  mvg1 #(.QW(QW)) u_last (.x0(m0), .x1(m1), .min_o(min1), .cp(cp));

  assign min2 = cp ? m0 : m1;
  assign idx1 = cp ? {1'b1, cp1} : {1'b0, cp0};
  assign idx2 = cp ? {1'b0, cp0} : {1'b1, cp1};

endmodule
