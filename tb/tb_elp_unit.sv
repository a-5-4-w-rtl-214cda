// Testbench of the Peterson-rule ELP unit: for every (s1, s3) pair it checks
// delta1 = s1 and delta2 * s1 = s1^3 + s3 (delta2 = 0 when s1 = 0), using
// table-based field arithmetic.
module tb_elp_unit;
  import bch_pkg::*;
  import bch_ref_pkg::*;

  gf_t s1, s3, s1_cube, delta1, delta2;
  int checks = 0, failures = 0;

  elp_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init();
    for (int a = 0; a < 64; a++)
      for (int b = 0; b < 64; b++) begin
        int c;
        s1 = gf_t'(a); s3 = gf_t'(b);
        c = gmul(gmul(a, a), a);
        s1_cube = gf_t'(c);
        #1;
        checks++;
        if (int'(delta1) != a) failures++;
        checks++;
        if (a == 0) begin
          if (delta2 != '0) failures++;
        end else if (gmul(int'(delta2), a) != (c ^ b)) begin
          failures++;
          $display("FAIL: s1=%0d s3=%0d delta2=%0d", a, b, delta2);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
