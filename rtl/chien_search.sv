// Fully parallel Chien search unit (level of parallelism P = 63).
//
// Substitutes every non-zero field element alpha^i, i = 0..62, into the ELP
// in the same cycle:
//   val[i] = 1 + delta1 * alpha^i + delta2 * alpha^(2i)
// Because alpha^i and alpha^(2i) are constants, each of the 124 products
// (i = 1..62, two per i) is an XOR network over the coefficient bits; equal
// XOR combinations of the six coefficient bits recur across the products,
// and synthesis is free to share them.  In the fabricated decoder this unit
// is a custom pass-transistor-logic macro; here it is plain logic.
//
// Interface: delta1/delta2 in, one 6-bit value per i out (zero marks a
// root).  Combinational.
module chien_search
  import bch_pkg::*;
(
  input  gf_t delta1,
  input  gf_t delta2,
  output gf_t val [N]
);

  for (genvar i = 0; i < N; i++) begin : g_pos
    localparam gf_t A1 = gf_alpha_pow(i);
    localparam gf_t A2 = gf_alpha_pow((2 * i) % N);
    assign val[i] = gf_t'(1) ^ gf_mul(delta1, A1) ^ gf_mul(delta2, A2);
  end

endmodule
