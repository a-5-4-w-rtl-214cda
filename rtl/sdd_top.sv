// Chase-II soft-decision decoder for the IEEE 802.15.6 BCH(63,51) code and
// its shortened (31,19) code, with early termination.
//
// A received word of 63 soft samples (4-bit two's complement each, 252
// bits) is accepted through a valid/ready handshake and held in an input
// register.  From it the hard decision unit forms y and the reliabilities
// |r_i|, and the probabilistic sorter picks the two least reliable bits.
// The single Peterson-rule hard-decision kernel then decodes up to four
// Gray-ordered test patterns, one per clock cycle; the winner decision unit
// keeps the valid candidate with the smallest soft metric and the controller
// stops early when a pattern decodes with fewer than two errors, or when the
// third pattern beats the first two.  The decision codeword (63 bits,
// systematic code bits as received, corrected) is presented for one cycle
// with out_valid, together with the number of test patterns used.
//
// Timing: one test pattern per cycle, so a codeword takes 1 to 4 cycles and
// the next one is accepted in the cycle the current one finishes; the
// result appears on the cycle after that.  For the (31,19) code (in_mode =
// MODE_31_19) only samples 0..30 are used: the removed information bits
// are known zeros, their samples are ignored and they are never flipped or
// corrected.  The block structure, the Gray order, the one-cycle kernel and
// both termination rules follow the published decoder; the sample format,
// the handshake and the output register are this design's own choices.
// There is no output back-pressure: out_valid is a one-cycle pulse.
// out_term tells which early-termination criterion ended the word
// (bit 0: criterion 1, bit 1: criterion 2, none: all four patterns ran).
// ET1_EN / ET2_EN disable the criteria for comparison runs; the default
// is the published configuration with both enabled.
module sdd_top
  import bch_pkg::*;
#(
  parameter bit ET1_EN = 1'b1,
  parameter bit ET2_EN = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  code_mode_e          in_mode,
  input  logic [N*SOFT_W-1:0] in_rx,
  output logic                out_valid,
  output logic [N-1:0]        out_codeword,
  output logic [2:0]          out_num_tp,
  output logic [1:0]          out_term
);

  // ---------------------------------------------------------------- input
  logic [N*SOFT_W-1:0] rx_q;
  code_mode_e          mode_q;

  logic             load, advance, busy, first, done, cand_valid, et1, et2;
  logic [1:0]       cnt;
  syn_class_e       syn_class;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_q   <= '0;
      mode_q <= MODE_63_51;
    end else if (load) begin
      mode_q <= in_mode;
      for (int i = 0; i < N; i++)
        rx_q[SOFT_W*i +: SOFT_W] <= (in_mode == MODE_31_19 && i >= N_SHORT)
                                    ? '0 : in_rx[SOFT_W*i +: SOFT_W];
    end
  end

  // ------------------------------------------------ hard decision, |r_i|
  logic [N-1:0] y;
  logic [Q-1:0] mag [N];

  hard_decision_unit u_hd (.rx(rx_q), .y(y), .mag(mag));

  // --------------------------------------------------------- LRB sorting
  logic [IDX_W-1:0] index;
  logic [IDX_W-1:0] idx1, idx2;
  logic [Q-1:0]     min1, min2;

  prob_sort_unit u_sort (
    .mag(mag), .mode(mode_q), .cnt(cnt), .index(index),
    .idx1(idx1), .idx2(idx2), .min1(min1), .min2(min2)
  );

  // ------------------------------------------------------- test patterns
  logic [N-1:0] tp, flip;

  test_pattern_generator u_tpg (
    .clk(clk), .rst_n(rst_n), .load(load), .advance(advance),
    .index(index), .y(y), .tp(tp), .flip(flip)
  );

  // ---------------------------------------------------------- HDD kernel
  gf_t          s1, s3, s1_cube;
  logic [N-1:0] err_loc;
  logic [1:0]   num_err;

  hdd_kernel u_hdd (
    .tp(tp), .mode(mode_q), .s1(s1), .s3(s3), .s1_cube(s1_cube),
    .err_loc(err_loc), .num_err(num_err)
  );

  // ------------------------------------------------------ winner decision
  logic             metric_check;
  logic [N-1:0]     decision;
  logic [MET_W-1:0] metric;

  winner_decision_unit u_win (
    .clk(clk), .rst_n(rst_n), .step(busy), .first(first),
    .cand_valid(cand_valid), .y(y), .flip(flip), .err_loc(err_loc),
    .mag(mag), .metric_check(metric_check), .decision(decision),
    .metric(metric)
  );

  // ---------------------------------------------------------- controller
  sdd_controller #(.ET1_EN(ET1_EN), .ET2_EN(ET2_EN)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .load(load), .advance(advance), .busy(busy), .cnt(cnt), .first(first),
    .done(done), .s1(s1), .s3(s3), .s1_cube(s1_cube), .num_err(num_err),
    .metric_check(metric_check), .syn_class(syn_class),
    .cand_valid(cand_valid), .et1(et1), .et2(et2)
  );

  // -------------------------------------------------------------- output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid    <= 1'b0;
      out_codeword <= '0;
      out_num_tp   <= '0;
      out_term     <= '0;
    end else begin
      out_valid <= done;
      if (done) begin
        out_codeword <= decision;
        out_num_tp   <= {1'b0, cnt} + 3'd1;
        out_term     <= {et2, et1};
      end
    end
  end

  // A word offered while the decoder is busy must be held until accepted.
  a_in_hold: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready |=> in_valid);

endmodule
