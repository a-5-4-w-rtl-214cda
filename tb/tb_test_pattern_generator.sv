// Testbench of the test pattern generator: for random hard decisions and
// index pairs it loads a word and advances three times with the Gray index
// sequence (i1, i2, i1), checking TP1..TP4 and the flipping pattern after
// every step, plus an out-of-range index that must flip nothing.
module tb_test_pattern_generator;
  import bch_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b0, load = 1'b0, advance = 1'b0;
  logic [IDX_W-1:0] index = '0;
  logic [N-1:0]     y = '0, tp, flip;
  int checks = 0, failures = 0;

  test_pattern_generator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_tp(logic [N-1:0] f, string what);
    checks++;
    if (tp !== (y ^ f) || flip !== f) begin
      failures++;
      $display("FAIL %s: tp=%h exp %h", what, tp, y ^ f);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int it = 0; it < 500; it++) begin
      int i1, i2;
      logic [N-1:0] e1, e2;
      i1 = $urandom_range(0, 62);
      i2 = (it % 10 == 0) ? 63 : $urandom_range(0, 62);
      e1 = N'(1) << i1;
      e2 = (i2 < 63) ? (N'(1) << i2) : '0;
      y = N'({$urandom, $urandom});
      load = 1'b1; @(posedge clk); #1 load = 1'b0;
      expect_tp('0, "TP1");
      advance = 1'b1; index = IDX_W'(i1); @(posedge clk); #1;
      expect_tp(e1, "TP2");
      index = IDX_W'(i2); @(posedge clk); #1;
      expect_tp(e1 ^ e2, "TP3");
      index = IDX_W'(i1); @(posedge clk); #1;
      expect_tp(e2, "TP4");
      advance = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
