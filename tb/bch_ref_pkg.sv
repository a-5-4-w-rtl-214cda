// Behavioural reference model for the testbenches of the soft-decision BCH
// decoder.  Written independently of the RTL: GF(2^6) arithmetic through
// log/antilog tables, a systematic encoder by polynomial division with the
// generator polynomial, a bounded-distance hard decoder by exhaustive search
// over all error patterns of weight <= 2, and a Chase-II model with the two
// early-termination rules and the probabilistic (s = 2) least-reliable-bit
// selection.  Call ref_init() once before use.
package bch_ref_pkg;

  localparam int NN = 63;
  localparam int NS = 31;

  int exp_t [0:125];
  int log_t [0:63];
  int syn1_col [NN];   // alpha^j
  int syn3_col [NN];   // alpha^(3j)
  // g(x) = 1 + x^3 + x^4 + x^5 + x^8 + x^10 + x^12
  localparam logic [12:0] GEN = 13'b1_0101_0011_1001;

  function automatic void ref_init();
    int a;
    a = 1;
    for (int i = 0; i < 63; i++) begin
      exp_t[i]      = a;
      exp_t[i + 63] = a;
      log_t[a]      = i;
      a = a << 1;
      if ((a & 64) != 0) a = a ^ 'h43;
    end
    log_t[0] = -1;
    for (int j = 0; j < NN; j++) begin
      syn1_col[j] = exp_t[j];
      syn3_col[j] = exp_t[(3 * j) % 63];
    end
  endfunction

  function automatic int gmul(int a, int b);
    if (a == 0 || b == 0) return 0;
    return exp_t[log_t[a] + log_t[b]];
  endfunction

  function automatic int gpow_alpha(int k);
    return exp_t[((k % 63) + 63) % 63];
  endfunction

  // Syndromes by Horner's rule over the received polynomial.
  function automatic void syndromes(logic [NN-1:0] v, output int s1, output int s3);
    int a3;
    a3 = exp_t[3];
    s1 = 0; s3 = 0;
    for (int j = NN - 1; j >= 0; j--) begin
      s1 = gmul(s1, 2) ^ int'(v[j]);
      s3 = gmul(s3, a3) ^ int'(v[j]);
    end
  endfunction

  // Systematic encoding: info in bits [12 +: k], parity in [11:0].
  function automatic logic [NN-1:0] encode(logic [NN-1:0] info_shifted);
    logic [NN-1:0] rem;
    rem = info_shifted;
    for (int i = NN - 1; i >= 12; i--)
      if (rem[i]) rem[i -: 13] = rem[i -: 13] ^ GEN;
    return info_shifted | {51'b0, rem[11:0]};
  endfunction

  // Bounded-distance decoder: finds the error pattern of weight <= 2 inside
  // positions 0..n-1 with the same syndromes.  Returns 1 if found.
  function automatic bit hdd(logic [NN-1:0] v, int n, output logic [NN-1:0] e,
                             output int nerr);
    int s1, s3;
    syndromes(v, s1, s3);
    e = '0; nerr = 0;
    if (s1 == 0 && s3 == 0) return 1;
    for (int j = 0; j < n; j++)
      if (syn1_col[j] == s1 && syn3_col[j] == s3) begin
        e[j] = 1'b1; nerr = 1; return 1;
      end
    for (int j = 0; j < n; j++)
      for (int k = j + 1; k < n; k++)
        if ((syn1_col[j] ^ syn1_col[k]) == s1 && (syn3_col[j] ^ syn3_col[k]) == s3) begin
          e[j] = 1'b1; e[k] = 1'b1; nerr = 2; return 1;
        end
    return 0;
  endfunction

  // First index of the smallest value among the listed positions.
  function automatic int first_min(int m[64], int lo0, int hi0, int lo1, int hi1);
    int best, bi;
    best = 99; bi = -1;
    for (int i = lo0; i <= hi0; i++) if (m[i] < best) begin best = m[i]; bi = i; end
    for (int i = lo1; i <= hi1; i++) if (m[i] < best) begin best = m[i]; bi = i; end
    return bi;
  endfunction

  // Least reliable bits: exact idx1, probabilistic idx2 (s = 2): the second
  // minimum is searched only among the sibling quarter of idx1 inside its
  // half and the other half.
  function automatic void lrb(int mag[NN], int n, output int i1, output int i2);
    int m[64];
    for (int i = 0; i < 64; i++) m[i] = (i < n) ? mag[i] : 7;
    i1 = first_min(m, 0, 63, 1, 0);
    if (i1 < 32) begin
      if (i1 < 16) i2 = first_min(m, 16, 31, 32, 63);
      else         i2 = first_min(m, 0, 15, 32, 63);
    end else begin
      if (i1 < 48) i2 = first_min(m, 0, 31, 48, 63);
      else         i2 = first_min(m, 0, 31, 32, 47);
    end
  endfunction

  // Exact second minimum index (for statistics only).
  function automatic int exact_second(int mag[NN], int n, int i1);
    int best, bi;
    best = 99; bi = -1;
    for (int i = 0; i < n; i++) if (i != i1 && mag[i] < best) begin best = mag[i]; bi = i; end
    return bi;
  endfunction

  typedef struct {
    logic [NN-1:0] decision;
    int            num_tp;
    bit            et1;
    bit            et2;
    int            n_valid;
    int            n_two_err;
    int            n_one_err;
    int            n_invalid;
    bit            fallback;    // no valid candidate: hard decision returned
  } chase_res_t;

  // Chase-II with early termination on 4-bit two's-complement samples; each
// termination criterion can be switched off.
  function automatic chase_res_t chase(int r[NN], bit short_code, bit et1_en = 1, bit et2_en = 1);
    chase_res_t res;
    int n, i1, i2, mag[NN], best_metric, metric;
    logic [NN-1:0] y, flip, tp, e, c, best;
    bit have;
    int nerr;
    int fl[4][2];
    n = short_code ? NS : NN;
    for (int i = 0; i < NN; i++) begin
      int v;
      v = (i < n) ? r[i] : 0;
      y[i]   = (v < 0);
      mag[i] = (v < 0) ? ((-v > 7) ? 7 : -v) : v;
    end
    lrb(mag, n, i1, i2);
    res = '{default: 0};
    res.decision = y;
    have = 0; best = y; best_metric = 0;
    for (int k = 0; k < 4; k++) begin
      bit ok, better;
      flip = '0;
      if (k == 1 || k == 2) flip[i1] = 1'b1;
      if (k == 2 || k == 3) flip[i2] = 1'b1;
      tp = y ^ flip;
      res.num_tp = k + 1;
      ok = hdd(tp, n, e, nerr);
      better = 0;
      if (ok) begin
        res.n_valid++;
        if (nerr == 2) res.n_two_err++;
        if (nerr == 1) res.n_one_err++;
        c = tp ^ e;
        metric = 0;
        for (int i = 0; i < NN; i++) if (c[i] != y[i]) metric += mag[i];
        if (!have || metric < best_metric) begin
          better = 1; have = 1; best = c; best_metric = metric;
        end
      end else res.n_invalid++;
      if (et1_en && ok && nerr < 2) begin res.et1 = 1; break; end
      if (et2_en && k == 2 && better) begin res.et2 = 1; break; end
    end
    res.decision = have ? best : y;
    res.fallback = !have;
    return res;
  endfunction

endpackage
