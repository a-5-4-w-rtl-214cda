// Error location evaluator.
//
// A zero Chien search value at alpha^i means an error at bit position
// (n - i) mod n, because the ELP roots are the inverses of the error
// locators alpha^j.  The evaluator zero-tests every value, permutes the
// results into the 63-bit error location vector and counts the roots found
// (the "detected errors" reported to the controller, saturating at 3).
// For the shortened (31,19) code a root that points into the 32 removed
// positions cannot be a real error: it is dropped, so the root count falls
// short of the ELP degree and the controller rejects the pattern.
//
// The root-to-position rule follows the published decoder; the root count
// as the 'detected errors' signal and the shortened-mode masking are this
// design's reading.
//
// Interface: Chien values and code mode in, error vector and root count
// out.  Combinational.
module error_loc_evaluator
  import bch_pkg::*;
(
  input  gf_t          val [N],
  input  code_mode_e   mode,
  output logic [N-1:0] err_loc,
  output logic [1:0]   num_err
);

  always_comb begin
    int unsigned cnt;
    cnt = 0;
    for (int j = 0; j < N; j++) begin
      err_loc[j] = (val[(N - j) % N] == '0);
      if (mode == MODE_31_19 && j >= N_SHORT) err_loc[j] = 1'b0;
      if (err_loc[j]) cnt++;
    end
    num_err = (cnt > 3) ? 2'd3 : 2'(cnt);
  end

endmodule
