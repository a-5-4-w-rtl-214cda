// Error-location-polynomial (ELP) computation unit, Peterson rule for t = 2.
//
// delta(x) = 1 + delta1*x + delta2*x^2 with
//   delta1 = s1
//   delta2 = (s1^3 + s3) / s1
// The division is a multiplication by s1^-1 = s1^62, formed with a square-
// and-multiply chain of GF(2^6) multipliers.  When s1 = 0 the inverse is 0,
// so delta2 = 0 and the polynomial has no roots; the controller then reports
// the pattern as error-free (s3 = 0) or undecodable (s3 != 0) from the
// syndromes alone.  With one error s1^3 = s3, delta2 = 0 and delta(x) has the
// single root 1/s1.
//
// The Peterson-rule formulas follow the published decoder; the inversion
// circuit and the s1 = 0 convention are this design's choices.
//
// Interface: syndromes in, delta1/delta2 out.  Combinational.
module elp_unit
  import bch_pkg::*;
(
  input  gf_t s1,
  input  gf_t s3,
  input  gf_t s1_cube,
  output gf_t delta1,
  output gf_t delta2
);

  gf_t s1_inv;

  assign s1_inv = gf_inv(s1);
  assign delta1 = s1;
  assign delta2 = gf_mul(s1_cube ^ s3, s1_inv);

endmodule
