// Testbench of the probabilistic (s = 2) sorter: random reliabilities with
// many ties, both code modes.  idx1/min1 must be the exact minimum (first
// index on ties); idx2/min2 must be the minimum over the sibling quarter of
// idx1 and the other half, as the model computes it; 'index' must follow
// the Gray order (idx1, idx2, idx1).  It also counts how often the
// probabilistic second minimum differs in value from the true one, which
// must happen at least once.
module tb_prob_sort_unit;
  import bch_pkg::*;
  import bch_ref_pkg::*;

  logic [Q-1:0]     mag [N];
  code_mode_e       mode;
  logic [1:0]       cnt;
  logic [IDX_W-1:0] index;
  logic [5:0]       idx1, idx2;
  logic [Q-1:0]     min1, min2;
  int checks = 0, failures = 0, n_diff = 0;

  prob_sort_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init();
    for (int it = 0; it < 4000; it++) begin
      int m [NN];
      int n, e1, e2, ex2, hi;
      mode = code_mode_e'($urandom_range(0, 1));
      n = (mode == MODE_31_19) ? NS : NN;
      hi = (it % 2 != 0) ? 7 : 3;
      for (int i = 0; i < N; i++) begin
        m[i] = $urandom_range(0, hi);
        mag[i] = Q'(m[i]);
      end
      cnt = 2'($urandom_range(0, 3));
      #1;
      lrb(m, n, e1, e2);
      ex2 = exact_second(m, n, e1);
      if (m[ex2] != m[e2]) n_diff++;
      checks++;
      if (int'(idx1) != e1 || int'(idx2) != e2 || int'(min1) != m[e1] || int'(min2) != m[e2]) begin
        failures++;
        $display("FAIL: idx %0d/%0d exp %0d/%0d", idx1, idx2, e1, e2);
      end
      checks++;
      if (int'(index) != ((cnt == 1) ? e2 : e1)) failures++;
    end
    checks++;
    if (n_diff == 0) failures++;
    $display("probabilistic min2 differed from exact min2 in %0d of 4000 cases", n_diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
