// Shared constants, types and GF(2^6) arithmetic for the soft-decision
// BCH(63,51) / shortened BCH(31,19) decoder.
//
// Field elements are 6-bit vectors (a0..a5) in the polynomial basis
// a0 + a1*alpha + ... + a5*alpha^5.  The field is built from the primitive
// polynomial p(x) = 1 + x + x^6; with it the product of the minimal
// polynomials of alpha and alpha^3 is the generator polynomial
// 1 + x^3 + x^4 + x^5 + x^8 + x^10 + x^12 used for the (63,51) code.
// The polynomial itself is this design's choice (the decoder works for any
// primitive polynomial of degree 6, provided encoder and decoder agree).
//
// All functions are constant-foldable: the decoder only multiplies by
// constants (powers of alpha) in the syndrome and Chien search units, so
// those collapse into XOR networks at elaboration.
package bch_pkg;

  localparam int unsigned M       = 6;          // GF(2^M)
  localparam int unsigned N       = 63;         // full code length
  localparam int unsigned N_SHORT = 31;         // shortened code length
  localparam int unsigned T       = 2;          // error-correction capability
  localparam int unsigned P_LRB   = 2;          // least reliable bits, p = floor(dmin/2)
  localparam int unsigned NUM_TP  = 4;          // 2^p test patterns
  localparam int unsigned Q       = 3;          // reliability (|r|) bits
  localparam int unsigned SOFT_W  = Q + 1;      // received sample bits (two's complement)
  localparam int unsigned IDX_W   = 6;          // bit index width, ceil(log2(N))
  localparam int unsigned MET_W   = 9;          // soft metric width, covers N * (2^Q - 1)
  localparam logic [M:0]  PRIM_POLY = 7'b100_0011; // x^6 + x + 1

  typedef logic [M-1:0] gf_t;

  // Code selection: the "Mode" input of the decoder.
  typedef enum logic {
    MODE_63_51 = 1'b0,
    MODE_31_19 = 1'b1
  } code_mode_e;

  // Table I syndrome classification.
  typedef enum logic [1:0] {
    CLS_NO_ERR  = 2'd0,   // s1 = s3 = 0
    CLS_ONE_ERR = 2'd1,   // s1^3 = s3 (s1 != 0)
    CLS_TWO_ERR = 2'd2,   // otherwise
    CLS_INVALID = 2'd3    // s1 = 0, s3 != 0: more than two errors
  } syn_class_e;

  // Multiply by alpha: shift up and reduce with p(x).
  function automatic gf_t gf_mul_alpha(gf_t a);
    gf_t r;
    r = {a[M-2:0], 1'b0};
    if (a[M-1]) r = r ^ PRIM_POLY[M-1:0];
    return r;
  endfunction

  // General multiplication, shift-and-add (AND and XOR only).
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    gf_t acc, sh;
    acc = '0;
    sh  = a;
    for (int i = 0; i < M; i++) begin
      if (b[i]) acc = acc ^ sh;
      sh = gf_mul_alpha(sh);
    end
    return acc;
  endfunction

  // alpha^k in vector form.
  function automatic gf_t gf_alpha_pow(int unsigned k);
    gf_t r;
    r = gf_t'(1);
    for (int unsigned i = 0; i < (k % N); i++) r = gf_mul_alpha(r);
    return r;
  endfunction

  // Inverse as a^(2^M - 2) = a^2 * a^4 * a^8 * a^16 * a^32; 0 maps to 0.
  function automatic gf_t gf_inv(gf_t a);
    gf_t sq, acc;
    sq  = gf_mul(a, a);
    acc = sq;
    for (int i = 2; i < M; i++) begin
      sq  = gf_mul(sq, sq);
      acc = gf_mul(acc, sq);
    end
    return acc;
  endfunction

endpackage
