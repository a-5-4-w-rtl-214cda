// Controller of the soft-decision decoder: test pattern counter, Table I
// syndrome classification and the two early-termination (ET) criteria.
//
// A codeword is accepted with a valid/ready handshake and then occupies the
// hard-decision kernel for one to four cycles, one test pattern per cycle;
// 'cnt' (0..3) numbers the pattern in flight.  Each cycle the syndromes are
// classified as in Table I (no error, one error, two errors, invalid) and
// the pattern is a valid candidate when the class is not invalid and the
// Chien search found exactly as many roots as the class predicts.
// Decoding of the codeword ends ('done') when
//   - the fourth pattern has been processed, or
//   - ET criterion 1: the current pattern is a valid candidate with fewer
//     than t = 2 errors, or
//   - ET criterion 2 (third pattern only): the winner decision unit reports
//     that the third pattern beats the first two (metric checking signal).
// The next codeword may be accepted in the 'done' cycle, so no cycle is
// lost between codewords.
//
// Table I and both termination rules follow the published decoder; the
// validity test (root count equal to the class) and the handshake are this
// design's choices.
//
// ET1_EN / ET2_EN switch the criteria off individually (both on by
// default), giving the configurations compared in the published study of
// the termination rules: no early termination, criterion 1 only, both.
//
// Interface: clk, rst_n, in_valid, kernel status and metric_check in;
// in_ready, load, advance, busy, cnt, first, done, cand_valid and the
// termination reasons out.
module sdd_controller
  import bch_pkg::*;
#(
  parameter bit ET1_EN = 1'b1,     // early-termination criterion 1
  parameter bit ET2_EN = 1'b1      // early-termination criterion 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  output logic       load,          // accept a new codeword this cycle
  output logic       advance,       // move to the next test pattern
  output logic       busy,          // a test pattern is processed this cycle
  output logic [1:0] cnt,
  output logic       first,
  output logic       done,
  input  gf_t        s1,
  input  gf_t        s3,
  input  gf_t        s1_cube,
  input  logic [1:0] num_err,
  input  logic       metric_check,
  output syn_class_e syn_class,
  output logic       cand_valid,
  output logic       et1,           // terminated by criterion 1
  output logic       et2            // terminated by criterion 2
);

  logic [1:0] degree;

  always_comb begin
    if (s1 == '0 && s3 == '0) syn_class = CLS_NO_ERR;
    else if (s1 == '0)        syn_class = CLS_INVALID;
    else if (s1_cube == s3)   syn_class = CLS_ONE_ERR;
    else                      syn_class = CLS_TWO_ERR;
    case (syn_class)
      CLS_NO_ERR:  degree = 2'd0;
      CLS_ONE_ERR: degree = 2'd1;
      default:     degree = 2'd2;
    endcase
  end

  assign cand_valid = busy && (syn_class != CLS_INVALID) && (num_err == degree);
  assign et1        = ET1_EN && busy && cand_valid && (degree < 2'(T));
  assign et2        = ET2_EN && busy && (cnt == 2'd2) && metric_check && !et1;
  assign done       = busy && ((cnt == 2'(NUM_TP - 1)) || et1 || et2);
  assign in_ready   = !busy || done;
  assign load       = in_valid && in_ready;
  assign advance    = busy && !done;
  assign first      = (cnt == 2'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (load) begin
      busy <= 1'b1;
      cnt  <= '0;
    end else if (done) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (busy) begin
      cnt  <= cnt + 2'd1;
    end
  end

  // The counter only runs while a codeword is in flight.
  a_cnt_idle: assert property (@(posedge clk) disable iff (!rst_n) !busy |-> cnt == '0);

endmodule
