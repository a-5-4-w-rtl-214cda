// Testbench of the Peterson-rule HDD kernel: codewords of both codes with
// 0 to 3 random bit errors.  Wherever the exhaustive bounded-distance model
// decodes, the kernel must return the same error vector and root count;
// with three errors it must either find fewer roots than the ELP degree or
// return a different weight-<=2 pattern (a miscorrection, as the model
// does).  Syndromes are checked too.
module tb_hdd_kernel;
  import bch_pkg::*;
  import bch_ref_pkg::*;

  logic [N-1:0] tp;
  code_mode_e   mode;
  gf_t          s1, s3, s1_cube;
  logic [N-1:0] err_loc;
  logic [1:0]   num_err;
  int checks = 0, failures = 0;

  hdd_kernel dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init();
    for (int it = 0; it < 3000; it++) begin
      logic [N-1:0] info, cw, e;
      int n, nerr, k, r1, r3;
      bit ok;
      mode = code_mode_e'(it % 2);
      n = (mode == MODE_31_19) ? NS : NN;
      info = N'({$urandom, $urandom} & ((64'd1 << (n - 12)) - 1));
      cw = encode(info << 12);
      k = it % 4;
      tp = cw;
      for (int q = 0; q < k; q++) tp[$urandom_range(0, n - 1)] ^= 1'b1;
      #1;
      ok = hdd(tp, n, e, nerr);
      syndromes(tp, r1, r3);
      checks++;
      if (int'(s1) != r1 || int'(s3) != r3) failures++;
      checks++;
      if (ok) begin
        if (err_loc !== e || int'(num_err) != nerr) begin
          failures++;
          $display("FAIL: tp=%h err=%h exp %h (%0d/%0d)", tp, err_loc, e, num_err, nerr);
        end
      end else begin
        // Not decodable: the kernel must not produce a weight-<=2 pattern
        // that clears the syndromes.
        int a1, a3;
        syndromes(tp ^ err_loc, a1, a3);
        if ($countones(err_loc) <= 2 && a1 == 0 && a3 == 0) begin
          failures++;
          $display("FAIL: kernel decoded an undecodable word");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
