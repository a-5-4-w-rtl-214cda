// End-to-end testbench of the soft-decision BCH decoder at its default
// configuration (both early-termination criteria on).
//
// Random information words are encoded (BCH(63,51) and shortened (31,19)),
// sent over BPSK with additive white Gaussian noise at several Eb/N0 points,
// quantised to 4-bit two's-complement samples and decoded.  Every output is
// compared bit-exactly with an independent Chase-II model (same early
// termination and least-reliable-bit rules), including the number of test
// patterns used and the criterion that ended the word.  It also checks the latency (a codeword that
// uses k test patterns appears k cycles after it was accepted), measures
// the cycles per codeword when words are offered back to back, and counts
// how often each mechanism occurred: both early-termination criteria, all
// four patterns, invalid patterns, one- and two-error corrections, the hard-
// decision fallback, a probabilistic second minimum differing from the true
// one, the shortened mode and idle gaps.  A mechanism never seen is a
// failure.  Average test patterns and bit errors per SNR point are printed.
module tb_sdd_top;
  import bch_pkg::*;
  import bch_ref_pkg::*;

  localparam int WORDS_PER_POINT = 2000;
  localparam int WATCHDOG_CYCLES = 1000000;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                in_valid = 1'b0;
  logic                in_ready;
  code_mode_e          in_mode = MODE_63_51;
  logic [N*SOFT_W-1:0] in_rx = '0;
  logic                out_valid;
  logic [N-1:0]        out_codeword;
  logic [2:0]          out_num_tp;
  logic [1:0]          out_term;

  sdd_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Expected results, in order of acceptance.
  chase_res_t    exp_q [$];
  longint        acc_cycle_q [$];
  logic [N-1:0]  sent_q [$];

  // Mechanism counters.
  int n_et1 = 0, n_et2 = 0, n_full4 = 0, n_invalid = 0, n_one = 0, n_two = 0;
  int n_fallback = 0, n_prob_min2 = 0, n_short = 0, n_gap = 0;
  // Per-point statistics.
  int    pt_words, pt_tp, pt_bit_err_hard, pt_bit_err_soft;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction

  // Output monitor.
  // Sampled at the falling edge, half a cycle after the outputs settle.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      chase_res_t e;
      longint     a;
      logic [N-1:0] sent;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        e    = exp_q.pop_front();
        a    = acc_cycle_q.pop_front();
        sent = sent_q.pop_front();
        if (out_codeword !== e.decision || int'(out_num_tp) != e.num_tp ||
            out_term != {e.et2, e.et1}) begin
          failures++;
          $display("FAIL: got %h/%0d expected %h/%0d", out_codeword, out_num_tp,
                   e.decision, e.num_tp);
        end
        checks++;
        if (cycle - a != longint'(e.num_tp)) begin
          failures++;
          $display("FAIL: latency %0d cycles for %0d test patterns", cycle - a, e.num_tp);
        end
        pt_words++;
        pt_tp += e.num_tp;
        pt_bit_err_soft += $countones(out_codeword ^ sent);
      end
    end
  end

  // Offer one received word and record what the model expects.
  task automatic send(int r[NN], bit short_code, logic [N-1:0] sent);
    chase_res_t e;
    int m[NN], i1, i2, n;
    logic [N-1:0] yv;
    e = chase(r, short_code);
    n = short_code ? NS : NN;
    for (int i = 0; i < NN; i++) begin
      int v;
      v = (i < n) ? r[i] : 0;
      m[i] = (v < 0) ? ((-v > 7) ? 7 : -v) : v;
      yv[i] = (v < 0);
      in_rx[SOFT_W*i +: SOFT_W] = SOFT_W'(r[i]);
    end
    lrb(m, n, i1, i2);
    if (i2 != exact_second(m, n, i1) && m[i2] != m[exact_second(m, n, i1)]) n_prob_min2++;
    pt_bit_err_hard += $countones(yv ^ sent);
    in_mode  = short_code ? MODE_31_19 : MODE_63_51;
    in_valid = 1'b1;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    // Accepted at the next rising edge.
    exp_q.push_back(e);
    acc_cycle_q.push_back(cycle + 1);
    sent_q.push_back(sent);
    @(posedge clk);
    #1;
    in_valid = 1'b0;
    if (e.et1) n_et1++;
    if (e.et2) n_et2++;
    if (e.num_tp == 4) n_full4++;
    if (e.n_invalid > 0) n_invalid++;
    if (e.n_one_err > 0) n_one++;
    if (e.n_two_err > 0) n_two++;
    if (e.fallback) n_fallback++;
    if (short_code) n_short++;
  endtask

  task automatic run_point(real ebn0_db, bit short_code, int words, bit gaps);
    real rate, sigma;
    int  k, n, r[NN];
    logic [N-1:0] info, cw;
    longint t0;
    n = short_code ? NS : NN;
    k = n - 12;
    rate  = real'(k) / real'(n);
    sigma = $sqrt(1.0 / (2.0 * rate * (10.0 ** (ebn0_db / 10.0))));
    pt_words = 0; pt_tp = 0; pt_bit_err_hard = 0; pt_bit_err_soft = 0;
    t0 = cycle;
    for (int w = 0; w < words; w++) begin
      info = N'({$urandom, $urandom} & ((64'd1 << k) - 1));
      cw   = encode(info << 12);
      for (int i = 0; i < NN; i++) begin
        real x;
        int  q;
        x = (cw[i] ? -1.0 : 1.0) + sigma * gauss();
        q = $rtoi(x * 2.5 + (x >= 0 ? 0.5 : -0.5));
        if (q > 7) q = 7;
        if (q < -8) q = -8;
        r[i] = (i < n) ? q : int'($urandom_range(0, 15)) - 8;  // junk beyond n
      end
      if (gaps && ($urandom_range(0, 7) == 0)) begin
        n_gap++;
        repeat ($urandom_range(1, 3)) @(posedge clk);
        #1;
      end
      send(r, short_code, cw);
    end
    wait (exp_q.size() == 0);
    @(posedge clk);
    #1;
    $display("POINT code=(%0d,%0d) EbN0=%0.1f dB words=%0d avgTP=%0.3f hard_bit_err=%0d soft_bit_err=%0d cycles=%0d",
             n, k, ebn0_db, pt_words, real'(pt_tp) / real'(pt_words),
             pt_bit_err_hard, pt_bit_err_soft, cycle - t0);
    // Trends of the published evaluation: close to one test pattern at
    // 8 dB, and at 3 dB and above the soft decisions carry fewer bit
    // errors than the raw hard decisions.
    if (ebn0_db >= 8.0) begin
      checks++;
      if (real'(pt_tp) / real'(pt_words) > 1.1) begin
        failures++;
        $display("FAIL: %0.3f test patterns on average at %0.1f dB", real'(pt_tp) / real'(pt_words), ebn0_db);
      end
    end
    if (ebn0_db >= 3.0) begin
      checks++;
      if (pt_bit_err_soft >= pt_bit_err_hard) begin
        failures++;
        $display("FAIL: no coding gain at %0.1f dB", ebn0_db);
      end
    end
    // Back-to-back words: the decoder spends exactly one cycle per test
    // pattern, so (apart from the drain) cycles == test patterns.
    if (!gaps) begin
      checks++;
      if (cycle - t0 > longint'(pt_tp) + 3) begin
        failures++;
        $display("FAIL: %0d cycles for %0d test patterns", cycle - t0, pt_tp);
      end
    end
  endtask

  initial begin
    ref_init();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    run_point(0.0, 1'b0, WORDS_PER_POINT, 1'b0);
    run_point(3.0, 1'b0, WORDS_PER_POINT, 1'b1);
    run_point(5.0, 1'b0, WORDS_PER_POINT, 1'b0);
    run_point(8.0, 1'b0, WORDS_PER_POINT, 1'b0);
    run_point(0.0, 1'b1, WORDS_PER_POINT, 1'b1);
    run_point(5.0, 1'b1, WORDS_PER_POINT, 1'b0);

    $display("MECHANISMS et1=%0d et2=%0d all4=%0d invalid_tp=%0d one_err=%0d two_err=%0d fallback=%0d prob_min2=%0d short=%0d gaps=%0d",
             n_et1, n_et2, n_full4, n_invalid, n_one, n_two, n_fallback, n_prob_min2,
             n_short, n_gap);
    if (n_et1 == 0)       begin failures++; $display("FAIL: ET criterion 1 never occurred"); end
    if (n_et2 == 0)       begin failures++; $display("FAIL: ET criterion 2 never occurred"); end
    if (n_full4 == 0)     begin failures++; $display("FAIL: four test patterns never used"); end
    if (n_invalid == 0)   begin failures++; $display("FAIL: invalid pattern never seen"); end
    if (n_one == 0)       begin failures++; $display("FAIL: one-error correction never seen"); end
    if (n_two == 0)       begin failures++; $display("FAIL: two-error correction never seen"); end
    if (n_fallback == 0)  begin failures++; $display("FAIL: fallback never seen"); end
    if (n_prob_min2 == 0) begin failures++; $display("FAIL: probabilistic min2 never differed"); end
    if (n_short == 0)     begin failures++; $display("FAIL: shortened mode never used"); end
    if (n_gap == 0)       begin failures++; $display("FAIL: idle gap never used"); end
    checks += 10;
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
