// Testbench of the controller: drives random syndromes, root counts and
// metric checking signals and compares the Table I class, candidate
// validity, both early-termination criteria, 'done', the handshake and the
// test pattern counter with a cycle-level model.  Each criterion must fire
// at least once, and some codewords must run all four patterns.
module tb_sdd_controller;
  import bch_pkg::*;
  import bch_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic       in_ready, load, advance, busy, first, done, cand_valid, et1, et2;
  logic [1:0] cnt;
  gf_t        s1 = '0, s3 = '0, s1_cube = '0;
  logic [1:0] num_err = '0;
  logic       metric_check = 1'b0;
  syn_class_e syn_class;
  int checks = 0, failures = 0, n_et1 = 0, n_et2 = 0, n_four = 0;

  sdd_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model state.
  bit m_busy = 0;
  int m_cnt = 0;

  initial begin
    ref_init();
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 20000; c++) begin
      int a, b, cls, deg;
      bit valid, e1, e2, dn, rdy;
      in_valid = ($urandom_range(0, 3) != 0);
      case ($urandom_range(0, 3))
        0: begin a = 0; b = 0; end
        1: begin a = 0; b = $urandom_range(1, 63); end
        2: begin a = $urandom_range(1, 63); b = gmul(gmul(a, a), a); end
        default: begin a = $urandom_range(1, 63); b = $urandom_range(0, 63); end
      endcase
      s1 = gf_t'(a); s3 = gf_t'(b); s1_cube = gf_t'(gmul(gmul(a, a), a));
      num_err = ($urandom_range(0, 3) == 0) ? 2'($urandom_range(0, 3))
              : ((a == 0) ? 2'd0 : (gmul(gmul(a, a), a) == b) ? 2'd1 : 2'd2);
      metric_check = 1'($urandom_range(0, 1));
      #1;
      if (a == 0 && b == 0) cls = 0;
      else if (a == 0) cls = 3;
      else if (gmul(gmul(a, a), a) == b) cls = 1;
      else cls = 2;
      deg = (cls == 3) ? 2 : cls;
      valid = m_busy && cls != 3 && int'(num_err) == deg;
      e1 = valid && deg < 2;
      e2 = m_busy && m_cnt == 2 && metric_check && !e1;
      dn = m_busy && (m_cnt == 3 || e1 || e2);
      rdy = !m_busy || dn;
      checks++;
      if (int'(syn_class) != cls || cand_valid != valid || et1 != e1 || et2 != e2 ||
          done != dn || in_ready != rdy || busy != m_busy || int'(cnt) != m_cnt ||
          load != (in_valid && rdy) || advance != (m_busy && !dn) || first != (m_cnt == 0)) begin
        failures++;
        $display("FAIL: cycle %0d busy=%b cnt=%0d done=%b/%b", c, busy, cnt, done, dn);
      end
      if (e1) n_et1++;
      if (e2) n_et2++;
      if (dn && m_cnt == 3) n_four++;
      @(posedge clk);
      if (in_valid && rdy) begin m_busy = 1; m_cnt = 0; end
      else if (dn) begin m_busy = 0; m_cnt = 0; end
      else if (m_busy) m_cnt++;
      #1;
    end
    checks++;
    if (n_et1 == 0 || n_et2 == 0 || n_four == 0) failures++;
    $display("et1=%0d et2=%0d four=%0d", n_et1, n_et2, n_four);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
