// Testbench of the syndrome unit: random 63-bit words and random codewords
// (whose syndromes must be zero) are applied and s1, s3 and s1^3 are
// compared with syndromes computed by Horner's rule over log/antilog
// tables.
module tb_syndrome_unit;
  import bch_pkg::*;
  import bch_ref_pkg::*;

  logic [N-1:0] tp;
  gf_t          s1, s3, s1_cube;
  int checks = 0, failures = 0;

  syndrome_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init();
    for (int it = 0; it < 3000; it++) begin
      int e1, e3;
      if (it % 3 == 0) tp = encode(N'({$urandom, $urandom} << 12));
      else if (it < 63) tp = N'(1) << it;
      else             tp = N'({$urandom, $urandom});
      #1;
      syndromes(tp, e1, e3);
      checks++;
      if (int'(s1) != e1 || int'(s3) != e3 || int'(s1_cube) != gmul(gmul(e1, e1), e1)) begin
        failures++;
        $display("FAIL: tp=%h s1=%h/%h s3=%h/%h", tp, s1, e1, s3, e3);
      end
      if (it % 3 == 0) begin
        checks++;
        if (s1 != '0 || s3 != '0) begin failures++; $display("FAIL: codeword syndrome"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
