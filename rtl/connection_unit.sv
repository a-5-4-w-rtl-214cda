// Connection unit (CU) of the probabilistic sorter.
//
// Merges the (min1, min2) pairs of the two halves A and B.  One MVG1
// compares A.min1 with B.min1 and gives the overall min1 and its comparison
// signal cp.  MVG1_A compares A.min2 with B.min1 and MVG1_B compares A.min1
// with B.min2; cp picks MVG1_A's result when A holds min1 and MVG1_B's
// otherwise.  Index q (of min1) and t (of min2) follow the same selections;
// the extra top bit tells which half the value came from.
// Structure follows the published connection unit; the extra index MSB is
// this design's addition.
// Combinational.
module connection_unit #(
  parameter int unsigned W  = 6,
  parameter int unsigned QW = 3
) (
  input  logic [QW-1:0] a_min1,
  input  logic [QW-1:0] a_min2,
  input  logic [W-2:0]  a_idx1,
  input  logic [W-2:0]  a_idx2,
  input  logic [QW-1:0] b_min1,
  input  logic [QW-1:0] b_min2,
  input  logic [W-2:0]  b_idx1,
  input  logic [W-2:0]  b_idx2,
  output logic [QW-1:0] min1,
  output logic [QW-1:0] min2,
  output logic [W-1:0]  idx1,
  output logic [W-1:0]  idx2
);

  logic          cp, cp_a, cp_b;
  logic [QW-1:0] m_a, m_b;
  logic [W-1:0]  idx_a, idx_b;

  mvg1 #(.QW(QW)) u_mvg1   (.x0(a_min1), .x1(b_min1), .min_o(min1), .cp(cp));
  mvg1 #(.QW(QW)) u_mvg1_a (.x0(a_min2), .x1(b_min1), .min_o(m_a),  .cp(cp_a));
  mvg1 #(.QW(QW)) u_mvg1_b (.x0(a_min1), .x1(b_min2), .min_o(m_b),  .cp(cp_b));

  assign idx_a = cp_a ? {1'b1, b_idx1} : {1'b0, a_idx2};
  assign idx_b = cp_b ? {1'b1, b_idx2} : {1'b0, a_idx1};

  assign min2 = cp ? m_b   : m_a;
  assign idx2 = cp ? idx_b : idx_a;
  assign idx1 = cp ? {1'b1, b_idx1} : {1'b0, a_idx1};

endmodule
