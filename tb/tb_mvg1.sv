// Testbench of the MVG1 block: all pairs of 3-bit inputs; min must be the
// smaller value and cp must be 1 exactly when x1 < x0.
module tb_mvg1;
  logic [2:0] x0, x1, min_o;
  logic       cp;
  int checks = 0, failures = 0;

  mvg1 #(.QW(3)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        x0 = 3'(a); x1 = 3'(b);
        #1;
        checks++;
        if (int'(min_o) != ((b < a) ? b : a) || cp != (b < a)) begin
          failures++;
          $display("FAIL: x0=%0d x1=%0d min=%0d cp=%b", a, b, min_o, cp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
