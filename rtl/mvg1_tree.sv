// Comparison tree of MVG1 blocks: minimum of 2^L inputs and its index.
//
// Stage l (1..L) pairs the survivors of stage l-1.  The index of the
// minimum is the string of comparison signals cp along the winning path,
// the last stage's cp being the most significant bit.  Only the minimum is
// kept at each node (no second-minimum tracking), which is what makes the
// probabilistic sorter cheaper than a full two-minimum tree.
// Structure as in the published sorter; the index encoding is this design's.
// Combinational.
module mvg1_tree #(
  parameter int unsigned L  = 4,
  parameter int unsigned QW = 3
) (
  input  logic [QW-1:0] x [2**L],
  output logic [QW-1:0] min_o,
  output logic [L-1:0]  idx_o
);

  // Stage l holds 2^(L-l) survivors; their indices have l valid bits.
  for (genvar l = 0; l <= L; l++) begin : g_st
    logic [QW-1:0] v  [2**(L-l)];
    logic [L-1:0]  ix [2**(L-l)];
    if (l == 0) begin : g_leaf
      for (genvar k = 0; k < 2**L; k++) begin : g_k
        assign v[k]  = x[k];
        assign ix[k] = '0;
      end
    end else begin : g_node
      for (genvar k = 0; k < 2**(L-l); k++) begin : g_k
        logic cp;
        mvg1 #(.QW(QW)) u_mvg1 (
          .x0(g_st[l-1].v[2*k]), .x1(g_st[l-1].v[2*k+1]), .min_o(v[k]), .cp(cp)
        );
        assign ix[k] = (cp ? g_st[l-1].ix[2*k+1] : g_st[l-1].ix[2*k])
                     | (L'(cp) << (l - 1));
      end
    end
  end

  assign min_o = g_st[L].v[0];
  assign idx_o = g_st[L].ix[0];

endmodule
