// Winner decision unit: soft-decision metric and best-candidate register.
//
// For BPSK the squared Euclidean distance of a candidate codeword c to the
// received word r differs from that of the hard decision y by
// 4 * sum(|r_i| over the positions where c and y differ), so the metric of
// a candidate is the sum of the reliabilities of the bits it changes:
//   d = flip ^ err_loc,   metric = sum_i d_i * |r_i|,   c = y ^ d.
// Each cycle the controller flags whether the current test pattern decoded
// to a valid candidate.  The metric checking signal is raised when that
// candidate is valid and strictly better than the best one kept so far in
// this codeword (on a tie the earlier test pattern stays); the candidate
// then replaces the provisional decision.  'first' marks the first test
// pattern of a codeword and discards what an earlier codeword left.
// 'decision' is the provisional decision including the current cycle; if
// no test pattern has produced a valid codeword it is the hard decision y.
//
// Selecting the closest candidate and the metric checking signal follow
// the published decoder; the metric form, tie rule and fallback are this
// design's choices.
//
// Interface: clk, rst_n, step (a test pattern is processed this cycle),
// first, cand_valid, y, flip, err_loc, mag in; metric_check, decision,
// metric out.  The best candidate is registered at the end of every step.
module winner_decision_unit
  import bch_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step,
  input  logic             first,
  input  logic             cand_valid,
  input  logic [N-1:0]     y,
  input  logic [N-1:0]     flip,
  input  logic [N-1:0]     err_loc,
  input  logic [Q-1:0]     mag [N],
  output logic             metric_check,
  output logic [N-1:0]     decision,
  output logic [MET_W-1:0] metric
);

  logic [N-1:0]     diff;
  logic [N-1:0]     best_q;
  logic [MET_W-1:0] best_metric_q;
  logic             best_valid_q;
  logic             have_best;
  logic [MET_W-1:0] next_metric;
  logic             next_valid;

  assign diff = flip ^ err_loc;

  always_comb begin
    metric = '0;
    for (int i = 0; i < N; i++)
      if (diff[i]) metric = metric + MET_W'(mag[i]);
  end

  assign have_best    = best_valid_q && !first;
  assign metric_check = cand_valid && (!have_best || metric < best_metric_q);

  always_comb begin
    if (metric_check) begin
      decision    = y ^ diff;
      next_metric = metric;
      next_valid  = 1'b1;
    end else if (have_best) begin
      decision    = best_q;
      next_metric = best_metric_q;
      next_valid  = 1'b1;
    end else begin
      decision    = y;
      next_metric = '0;
      next_valid  = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_q        <= '0;
      best_metric_q <= '0;
      best_valid_q  <= 1'b0;
    end else if (step) begin
      best_q        <= decision;
      best_metric_q <= next_metric;
      best_valid_q  <= next_valid;
    end
  end

endmodule
