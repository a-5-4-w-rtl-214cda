// Testbench of the fully parallel Chien search: for random and boundary
// coefficient pairs every output must equal 1 + delta1*alpha^i +
// delta2*alpha^(2i), computed with log/antilog tables; polynomials built
// from known roots must show zeros exactly at those roots.
module tb_chien_search;
  import bch_pkg::*;
  import bch_ref_pkg::*;

  gf_t delta1, delta2;
  gf_t val [N];
  int checks = 0, failures = 0;

  chien_search dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init();
    for (int it = 0; it < 600; it++) begin
      int a, b, r1, r2;
      if (it < 300) begin
        a = $urandom_range(0, 63); b = $urandom_range(0, 63);
      end else begin
        // delta(x) = (1 + X1 x)(1 + X2 x): roots at X1^-1, X2^-1
        r1 = $urandom_range(0, 62); r2 = $urandom_range(0, 62);
        a = gpow_alpha(r1) ^ gpow_alpha(r2);
        b = gpow_alpha(r1 + r2);
      end
      delta1 = gf_t'(a); delta2 = gf_t'(b);
      #1;
      for (int i = 0; i < N; i++) begin
        int e;
        e = 1 ^ gmul(a, gpow_alpha(i)) ^ gmul(b, gpow_alpha(2 * i));
        checks++;
        if (int'(val[i]) != e) begin
          failures++;
          $display("FAIL: d1=%0d d2=%0d i=%0d got %0d exp %0d", a, b, i, val[i], e);
        end
        if (it >= 300 && r1 != r2) begin
          checks++;
          if ((val[i] == '0) != (i == (63 - r1) % 63 || i == (63 - r2) % 63)) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
