// Testbench of the PMVG half-sorter (W = 6, 32 inputs): random 3-bit values
// with ties.  min1/idx1 must be the first minimum of the 32 inputs; min2/idx2
// must be the first minimum of the other 16-input quarter (the last
// competitor of min1).
module tb_pmvg;
  logic [2:0] x [32];
  logic [2:0] min1, min2;
  logic [4:0] idx1, idx2;
  int checks = 0, failures = 0;

  pmvg #(.W(6), .QW(3)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int first_min(int lo, int hi);
    int b;
    b = lo;
    for (int i = lo; i <= hi; i++) if (x[i] < x[b]) b = i;
    return b;
  endfunction

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int q0, q1, e1, e2;
      foreach (x[i]) x[i] = 3'($urandom_range(0, (it % 2 != 0) ? 7 : 2));
      #1;
      q0 = first_min(0, 15);
      q1 = first_min(16, 31);
      if (x[q1] < x[q0]) begin e1 = q1; e2 = q0; end
      else begin e1 = q0; e2 = q1; end
      checks++;
      if (int'(idx1) != e1 || int'(idx2) != e2 || min1 != x[e1] || min2 != x[e2]) begin
        failures++;
        $display("FAIL: idx %0d/%0d exp %0d/%0d", idx1, idx2, e1, e2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
