// Testbench of the hard decision unit: random 4-bit samples including the
// extremes; y must be the sign and |r| the magnitude saturated to 7.
module tb_hard_decision_unit;
  import bch_pkg::*;

  logic [N*SOFT_W-1:0] rx;
  logic [N-1:0]        y;
  logic [Q-1:0]        mag [N];
  int checks = 0, failures = 0;

  hard_decision_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 500; it++) begin
      int v [N];
      for (int i = 0; i < N; i++) begin
        v[i] = (it < 16) ? it - 8 : int'($urandom_range(0, 15)) - 8;
        rx[SOFT_W*i +: SOFT_W] = SOFT_W'(v[i]);
      end
      #1;
      for (int i = 0; i < N; i++) begin
        int m;
        m = (v[i] < 0) ? -v[i] : v[i];
        if (m > 7) m = 7;
        checks++;
        if (y[i] != (v[i] < 0) || int'(mag[i]) != m) begin
          failures++;
          $display("FAIL: r=%0d y=%b mag=%0d", v[i], y[i], mag[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
