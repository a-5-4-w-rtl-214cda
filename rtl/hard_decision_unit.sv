// Hard decision unit and reliability (|r|) extraction.
//
// Each received sample r_i is a SOFT_W-bit two's-complement number (BPSK:
// bit 0 sent as +1, bit 1 as -1).  The hard decision y_i is the sign bit and
// the reliability |r_i| is the magnitude on Q bits; the single value with no
// positive counterpart (-2^Q) saturates to 2^Q - 1.  With the default 4-bit
// samples the 252-bit received word becomes the 63-bit hard-decision word
// and 189 bits of reliabilities.  The sample format is this design's choice;
// only the 252/63/189 bit counts come from the decoder's block diagram.
//
// Interface: rx (packed, sample i at bits [SOFT_W*i +: SOFT_W]) in, y and
// mag out.  Combinational.
module hard_decision_unit
  import bch_pkg::*;
(
  input  logic [N*SOFT_W-1:0] rx,
  output logic [N-1:0]        y,
  output logic [Q-1:0]        mag [N]
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic [SOFT_W-1:0] r;
      logic [SOFT_W-1:0] a;
      r    = rx[SOFT_W*i +: SOFT_W];
      y[i] = r[SOFT_W-1];
      a    = r[SOFT_W-1] ? (~r + 1'b1) : r;
      mag[i] = a[SOFT_W-1] ? {Q{1'b1}} : a[Q-1:0];
    end
  end

endmodule
