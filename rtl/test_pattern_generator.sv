// Test pattern generator (Chase-II, p = 2, Gray order).
//
// The four test patterns are produced one per clock cycle:
//   TP1 = y, TP2 = TP1 with bit idx1 flipped, TP3 = TP2 with bit idx2
//   flipped, TP4 = TP3 with bit idx1 flipped back.
// Because consecutive patterns differ in one bit (Gray coding), a single
// index decoder and one register of flip bits serve all four: 'advance'
// toggles the bit named by 'index', 'load' clears the register for a new
// codeword.  tp = y ^ flip; the flip register is also the flipping pattern
// the winner decision unit needs.  An index >= N flips nothing.
//
// The Gray order and the shared flip logic follow the published decoder;
// the load/advance controls and the reset are this design's choices.
//
// Interface: clk, rst_n, load, advance, index, y in; tp, flip out.  The
// pattern for cycle k is valid during cycle k (registered flips).
module test_pattern_generator
  import bch_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             advance,
  input  logic [IDX_W-1:0] index,
  input  logic [N-1:0]     y,
  output logic [N-1:0]     tp,
  output logic [N-1:0]     flip
);

  logic [N-1:0] onehot;

  always_comb begin
    onehot = '0;
    if (index < IDX_W'(N)) onehot[index] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       flip <= '0;
    else if (load)    flip <= '0;
    else if (advance) flip <= flip ^ onehot;
  end

  assign tp = y ^ flip;

endmodule
