// Testbench of the error location evaluator: random Chien values with a few
// zeros planted at random positions; checks that a zero at alpha^i marks bit
// (63 - i) mod 63, that positions 31..62 are dropped in the shortened mode
// and that the root count saturates at 3.
module tb_error_loc_evaluator;
  import bch_pkg::*;

  gf_t          val [N];
  code_mode_e   mode;
  logic [N-1:0] err_loc;
  logic [1:0]   num_err;
  int checks = 0, failures = 0;

  error_loc_evaluator dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      logic [N-1:0] exp_e;
      int cnt;
      mode = code_mode_e'($urandom_range(0, 1));
      for (int i = 0; i < N; i++) val[i] = gf_t'($urandom_range(1, 63));
      for (int z = 0; z < int'($urandom_range(0, 4)); z++) val[$urandom_range(0, 62)] = '0;
      #1;
      exp_e = '0; cnt = 0;
      for (int i = 0; i < N; i++) begin
        int j;
        j = (i == 0) ? 0 : 63 - i;
        if (val[i] == '0 && !(mode == MODE_31_19 && j >= 31)) begin
          exp_e[j] = 1'b1; cnt++;
        end
      end
      checks++;
      if (err_loc !== exp_e || int'(num_err) != ((cnt > 3) ? 3 : cnt)) begin
        failures++;
        $display("FAIL: err_loc %h exp %h cnt %0d exp %0d", err_loc, exp_e, num_err, cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
