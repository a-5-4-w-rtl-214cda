// Peterson-rule hard-decision decoding (HDD) kernel for the double-error-
// correcting BCH codes.
//
// syndrome unit -> ELP unit (Peterson rule) -> fully parallel Chien search
// -> error location evaluator, all in one combinational pass, so a test
// pattern is decoded in a single clock cycle.  Besides the error location
// vector the kernel hands the syndromes (s1, s3, s1^3) and the number of
// roots found to the controller, which decides whether the correction is
// valid.
module hdd_kernel
  import bch_pkg::*;
(
  input  logic [N-1:0] tp,
  input  code_mode_e   mode,
  output gf_t          s1,
  output gf_t          s3,
  output gf_t          s1_cube,
  output logic [N-1:0] err_loc,
  output logic [1:0]   num_err
);

  gf_t delta1, delta2;
  gf_t val [N];

  syndrome_unit u_syn (.tp(tp), .s1(s1), .s3(s3), .s1_cube(s1_cube));

  elp_unit u_elp (
    .s1(s1), .s3(s3), .s1_cube(s1_cube), .delta1(delta1), .delta2(delta2)
  );

  chien_search u_chien (.delta1(delta1), .delta2(delta2), .val(val));

  error_loc_evaluator u_eval (
    .val(val), .mode(mode), .err_loc(err_loc), .num_err(num_err)
  );

endmodule
