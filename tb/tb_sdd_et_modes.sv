// Early-termination comparison: four decoders side by side, with no early
// termination, with criterion 1 only, with both criteria (the default) and
// with criterion 2 only.
// The same noisy BCH(63,51) words at 0, 2, 4, 6 and 8 dB are fed to all
// four.  Each output is compared with the Chase-II model in the matching
// configuration, and the average number of test patterns per SNR point is
// printed for each configuration.  Checks: without early termination every
// word takes exactly four patterns, and per word the count never grows when
// a criterion is added (none >= criterion 1 >= both, none >= criterion 2
// >= both).
module tb_sdd_et_modes;
  import bch_pkg::*;
  import bch_ref_pkg::*;

  localparam int NPTS  = 5;
  localparam int WORDS = 400;
  localparam int NW    = NPTS * WORDS;
  localparam int WATCHDOG_CYCLES = 100000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int stim [NW][NN];
  int tp_used [4][NW];
  bit done_cfg [4];
  bit stim_ready = 0;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction

  for (genvar g = 0; g < 4; g++) begin : g_cfg
    localparam bit E1 = (g == 1 || g == 2);
    localparam bit E2 = (g >= 2);
    logic                in_valid = 1'b0, in_ready, out_valid;
    logic [N*SOFT_W-1:0] in_rx = '0;
    logic [N-1:0]        out_codeword;
    logic [2:0]          out_num_tp;
    logic [1:0]          out_term;
    int                  n_out = 0;

    sdd_top #(.ET1_EN(E1), .ET2_EN(E2)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
      .in_mode(MODE_63_51), .in_rx(in_rx), .out_valid(out_valid),
      .out_codeword(out_codeword), .out_num_tp(out_num_tp), .out_term(out_term)
    );

    always @(negedge clk) begin
      if (rst_n && out_valid && n_out < NW) begin
        chase_res_t e;
        e = chase(stim[n_out], 1'b0, E1, E2);
        checks++;
        if (out_codeword !== e.decision || int'(out_num_tp) != e.num_tp) begin
          failures++;
          $display("FAIL cfg %0d word %0d", g, n_out);
        end
        tp_used[g][n_out] = int'(out_num_tp);
        n_out++;
      end
    end

    initial begin
      wait (stim_ready && rst_n);
      @(negedge clk);
      for (int w = 0; w < NW; w++) begin
        for (int i = 0; i < NN; i++) in_rx[SOFT_W*i +: SOFT_W] = SOFT_W'(stim[w][i]);
        in_valid = 1'b1;
        while (!in_ready) @(negedge clk);
        @(negedge clk);
      end
      in_valid = 1'b0;
      wait (n_out == NW);
      done_cfg[g] = 1;
    end
  end

  initial begin
    ref_init();
    for (int p = 0; p < NPTS; p++) begin
      real sigma;
      sigma = $sqrt(1.0 / (2.0 * (51.0 / 63.0) * (10.0 ** ((2.0 * p) / 10.0))));
      for (int w = 0; w < WORDS; w++) begin
        logic [N-1:0] cw;
        cw = encode(N'({$urandom, $urandom} & ((64'd1 << 51) - 1)) << 12);
        for (int i = 0; i < NN; i++) begin
          real x;
          int  q;
          x = (cw[i] ? -1.0 : 1.0) + sigma * gauss();
          q = $rtoi(x * 2.5 + (x >= 0 ? 0.5 : -0.5));
          stim[p * WORDS + w][i] = (q > 7) ? 7 : (q < -8) ? -8 : q;
        end
      end
    end
    stim_ready = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done_cfg[0] && done_cfg[1] && done_cfg[2] && done_cfg[3]);
    for (int p = 0; p < NPTS; p++) begin
      int s [4];
      s = '{0, 0, 0, 0};
      for (int w = p * WORDS; w < (p + 1) * WORDS; w++) begin
        for (int g = 0; g < 4; g++) s[g] += tp_used[g][w];
        checks++;
        if (tp_used[0][w] != 4 || tp_used[1][w] > tp_used[0][w] || tp_used[2][w] > tp_used[1][w] ||
            tp_used[3][w] > tp_used[0][w] || tp_used[2][w] > tp_used[3][w]) begin
          failures++;
          $display("FAIL: word %0d patterns %0d/%0d/%0d", w, tp_used[0][w], tp_used[1][w], tp_used[2][w]);
        end
      end
      $display("EbN0=%0d dB avgTP: no ET %0.3f, criterion 1 %0.3f, criterion 2 %0.3f, both %0.3f",
               2 * p, real'(s[0]) / WORDS, real'(s[1]) / WORDS, real'(s[3]) / WORDS,
               real'(s[2]) / WORDS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
