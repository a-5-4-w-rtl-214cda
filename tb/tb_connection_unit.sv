// Testbench of the connection unit (W = 6): random (min1, min2) pairs for
// halves A and B with their 5-bit indices.  min1/idx1 must be the smaller
// of the two min1 values (A on a tie, index MSB = half); min2/idx2 must be
// the smaller of the loser half's min1 and the winner half's min2, with the
// lower-index half winning ties.
module tb_connection_unit;
  logic [2:0] a_min1, a_min2, b_min1, b_min2, min1, min2;
  logic [4:0] a_idx1, a_idx2, b_idx1, b_idx2;
  logic [5:0] idx1, idx2;
  int checks = 0, failures = 0;

  connection_unit #(.W(6), .QW(3)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int am1, am2, bm1, bm2, e1, e2, v1, v2;
      am1 = $urandom_range(0, 7); am2 = $urandom_range(am1, 7);
      bm1 = $urandom_range(0, 7); bm2 = $urandom_range(bm1, 7);
      a_min1 = 3'(am1); a_min2 = 3'(am2); b_min1 = 3'(bm1); b_min2 = 3'(bm2);
      a_idx1 = 5'($urandom); a_idx2 = 5'($urandom);
      b_idx1 = 5'($urandom); b_idx2 = 5'($urandom);
      #1;
      if (bm1 < am1) begin
        v1 = bm1; e1 = 32 + int'(b_idx1);
        if (bm2 < am1) begin v2 = bm2; e2 = 32 + int'(b_idx2); end
        else begin v2 = am1; e2 = int'(a_idx1); end
      end else begin
        v1 = am1; e1 = int'(a_idx1);
        if (bm1 < am2) begin v2 = bm1; e2 = 32 + int'(b_idx1); end
        else begin v2 = am2; e2 = int'(a_idx2); end
      end
      checks++;
      if (int'(min1) != v1 || int'(min2) != v2 || int'(idx1) != e1 || int'(idx2) != e2) begin
        failures++;
        $display("FAIL: min %0d/%0d exp %0d/%0d idx %0d/%0d exp %0d/%0d",
                 min1, min2, v1, v2, idx1, idx2, e1, e2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
