// Syndrome computation unit of the hard-decision kernel.
//
// Computes the syndrome vector s = y * H^T of a 63-bit test pattern, where
// the parity-check matrix has the rows (1, alpha, alpha^2, ...) and
// (1, alpha^3, alpha^6, ...):
//   s1 = XOR over j of tp[j] * alpha^j
//   s3 = XOR over j of tp[j] * alpha^(3j)
// Each term is a constant, so both syndromes are pure XOR trees.  The unit
// also forms s1^3 = s1^2 * s1, which the ELP unit and the controller's
// Table I classification both use.  A shortened (31,19) word is processed
// unchanged: its unused top 32 positions are zero and add nothing.
//
// The parity-check matrix and the s1^3 output follow the published decoder;
// the primitive polynomial (see bch_pkg) is this design's choice.
//
// Interface: tp in, s1 / s3 / s1_cube out.  Purely combinational; the
// decoder evaluates one test pattern per clock cycle.
module syndrome_unit
  import bch_pkg::*;
(
  input  logic [N-1:0] tp,       // test pattern, bit j is the coefficient of x^j
  output gf_t          s1,
  output gf_t          s3,
  output gf_t          s1_cube
);

  gf_t term1 [N];
  gf_t term3 [N];

  for (genvar j = 0; j < N; j++) begin : g_col
    localparam gf_t H1 = gf_alpha_pow(j);
    localparam gf_t H3 = gf_alpha_pow((3 * j) % N);
    assign term1[j] = tp[j] ? H1 : '0;
    assign term3[j] = tp[j] ? H3 : '0;
  end

  always_comb begin
    s1 = '0;
    s3 = '0;
    for (int j = 0; j < N; j++) begin
      s1 = s1 ^ term1[j];
      s3 = s3 ^ term3[j];
    end
  end

  assign s1_cube = gf_mul(gf_mul(s1, s1), s1);

endmodule
