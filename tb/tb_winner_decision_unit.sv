// Testbench of the winner decision unit: sequences of one to four test
// patterns with random reliabilities, flipping patterns, error vectors and
// validity.  A model recomputes the metric (sum of |r| over changed bits),
// the metric checking signal (valid and strictly better than the best so
// far in this codeword) and the provisional decision, which falls back to
// the hard decision while no candidate is valid.
module tb_winner_decision_unit;
  import bch_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             step = 1'b0, first = 1'b0, cand_valid = 1'b0;
  logic [N-1:0]     y = '0, flip = '0, err_loc = '0;
  logic [Q-1:0]     mag [N];
  logic             metric_check;
  logic [N-1:0]     decision;
  logic [MET_W-1:0] metric;
  int checks = 0, failures = 0, n_better = 0, n_worse = 0;

  winner_decision_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mag[i]) mag[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int w = 0; w < 1000; w++) begin
      bit have;
      int best_m;
      logic [N-1:0] best;
      y = N'({$urandom, $urandom});
      foreach (mag[i]) mag[i] = Q'($urandom_range(0, 7));
      have = 0; best_m = 0; best = y;
      for (int k = 0; k < int'($urandom_range(1, 4)); k++) begin
        int m;
        bit mc;
        logic [N-1:0] c;
        step = 1'b1;
        first = (k == 0);
        cand_valid = ($urandom_range(0, 3) != 0);
        flip = '0; err_loc = '0;
        repeat ($urandom_range(0, 2)) flip[$urandom_range(0, 62)] = 1'b1;
        repeat ($urandom_range(0, 2)) err_loc[$urandom_range(0, 62)] = 1'b1;
        #1;
        c = y ^ flip ^ err_loc;
        m = 0;
        for (int i = 0; i < N; i++) if (c[i] != y[i]) m += int'(mag[i]);
        mc = cand_valid && (!have || m < best_m);
        if (mc) begin best = c; best_m = m; have = 1; n_better++; end
        else if (cand_valid) n_worse++;
        checks++;
        if (int'(metric) != m || metric_check != mc || decision !== best) begin
          failures++;
          $display("FAIL: metric %0d/%0d mc %b/%b", metric, m, metric_check, mc);
        end
        @(posedge clk); #1;
      end
      step = 1'b0;
      @(posedge clk); #1;
    end
    checks++;
    if (n_better == 0 || n_worse == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
