// Probabilistic sorting unit (s = 2): finds the two least reliable bits.
//
// The 2^W reliabilities go through a W-stage comparison tree built from
// MVG1 blocks (minimum only).  The second minimum is taken only from the
// last two stages: the loser of the final comparison inside the winning
// half (PMVG) and the minimum of the other half (connection unit).  min1 and
// its index are always exact; min2 is the true second minimum with high
// probability (about 75% for uniformly placed minima) at roughly half the
// area of an exact two-minimum tree.
//
// Inputs beyond the code length are padded with the largest reliability,
// and for the shortened (31,19) code (mode = MODE_31_19) the 32 removed
// positions are forced to that value too, so neither is ever picked.
// The test pattern generator needs one index per cycle: after the first
// test pattern it flips idx1, after the second idx2, after the third idx1
// again (Gray order), so 'index' is idx2 when cnt = 1 and idx1 otherwise.
//
// Interface: mag (one Q-bit reliability per bit), mode, cnt in; index,
// idx1/idx2 and min1/min2 out.  Combinational, evaluated while the first
// test pattern is decoded.
module prob_sort_unit
  import bch_pkg::*;
#(
  parameter int unsigned W = 6     // tree depth, 2^W >= N inputs
) (
  input  logic [Q-1:0]     mag [N],
  input  code_mode_e       mode,
  input  logic [1:0]       cnt,
  output logic [IDX_W-1:0] index,
  output logic [W-1:0]     idx1,
  output logic [W-1:0]     idx2,
  output logic [Q-1:0]     min1,
  output logic [Q-1:0]     min2
);

  localparam int unsigned HN = 2**(W-1);

  logic [Q-1:0] xa [HN];
  logic [Q-1:0] xb [HN];
  logic [Q-1:0] a_min1, a_min2, b_min1, b_min2;
  logic [W-2:0] a_idx1, a_idx2, b_idx1, b_idx2;

  always_comb begin
    for (int k = 0; k < 2 * HN; k++) begin
      logic [Q-1:0] v;
      if (k >= N || (mode == MODE_31_19 && k >= N_SHORT)) v = {Q{1'b1}};
      else                                                 v = mag[k];
      if (k < HN) xa[k]      = v;
      else        xb[k - HN] = v;
    end
  end

  pmvg #(.W(W), .QW(Q)) u_pmvg_a (
    .x(xa), .min1(a_min1), .min2(a_min2), .idx1(a_idx1), .idx2(a_idx2)
  );
  pmvg #(.W(W), .QW(Q)) u_pmvg_b (
    .x(xb), .min1(b_min1), .min2(b_min2), .idx1(b_idx1), .idx2(b_idx2)
  );

  connection_unit #(.W(W), .QW(Q)) u_cu (
    .a_min1(a_min1), .a_min2(a_min2), .a_idx1(a_idx1), .a_idx2(a_idx2),
    .b_min1(b_min1), .b_min2(b_min2), .b_idx1(b_idx1), .b_idx2(b_idx2),
    .min1(min1), .min2(min2), .idx1(idx1), .idx2(idx2)
  );

  assign index = IDX_W'((cnt == 2'd1) ? idx2 : idx1);

endmodule
