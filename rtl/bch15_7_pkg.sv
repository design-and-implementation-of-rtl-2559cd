// bch15_7_pkg -- shared constants, types and GF(2^4) arithmetic for the
// binary (15,7) double-error-correcting BCH code.
//
// The code has block length n = 2^m - 1 = 15 (m = 4), k = 7 message bits and
// n - k = 8 parity bits, and corrects t = 2 errors. Its field GF(2^4) is built
// on the primitive polynomial p(X) = 1 + X + X^4, and its generator polynomial
// is g(X) = phi1(X) * phi3(X) = (1+X+X^4)(1+X+X^2+X^3+X^4) = 1+X^4+X^6+X^7+X^8.
//
// Bit convention used throughout: bit i of a vector is the coefficient of X^i.
// Written most-significant bit first, g(X) is 111010001 and a code word is
// c14 ... c0, so a systematic word reads [message bits | parity bits].
//
// Field elements are 4-bit polynomial-basis vectors (bit i = coefficient of
// alpha^i, alpha a root of p). The functions below are pure combinational
// helpers; nothing here holds state.
package bch15_7_pkg;

  localparam int unsigned BCH_M = 4;               // field degree
  localparam int unsigned BCH_N = 15;              // block length
  localparam int unsigned BCH_K = 7;               // message length
  localparam int unsigned BCH_T = 2;               // correctable errors
  localparam int unsigned BCH_NK = BCH_N - BCH_K;  // parity bits / deg g

  // p(X) = 1 + X + X^4
  localparam logic [BCH_M:0] PRIM_POLY = 5'b1_0011;
  // g(X) = 1 + X^4 + X^6 + X^7 + X^8  (MSB first: 1 1101 0001)
  localparam logic [BCH_NK:0] GEN_POLY = 9'b1_1101_0001;

  typedef logic [BCH_M-1:0]  gf_t;
  typedef logic [BCH_K-1:0]  message_t;
  typedef logic [BCH_N-1:0]  codeword_t;
  typedef logic [BCH_NK-1:0] parity_t;
  typedef logic [$clog2(BCH_T+1)-1:0] errcnt_t;   // 0 .. t corrected errors

  // Coding-scheme selector. It mirrors the front-panel Boolean: false picks
  // the systematic code word, true the non-systematic one.
  typedef enum logic {
    ENC_SYSTEMATIC     = 1'b0,
    ENC_NON_SYSTEMATIC = 1'b1
  } enc_mode_e;

  // Product of two field elements: carry-less multiply, then reduce mod p(X).
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    logic [2*BCH_M-2:0] prod;
    prod = '0;
    for (int i = 0; i < BCH_M; i++)
      if (b[i]) prod ^= (2*BCH_M-1)'(a) << i;
    for (int i = 2*BCH_M-2; i >= BCH_M; i--)
      if (prod[i]) prod ^= (2*BCH_M-1)'(PRIM_POLY) << (i - BCH_M);
    return prod[BCH_M-1:0];
  endfunction

  // alpha^e for any exponent e (taken mod 15).
  function automatic gf_t gf_alpha_pow(int unsigned e);
    gf_t r;
    r = gf_t'(1);
    for (int unsigned i = 0; i < e % BCH_N; i++) r = gf_mul(r, gf_t'(2));
    return r;
  endfunction

  // Multiplicative inverse: a^-1 = a^(2^m - 2) = a^14. Returns 0 for a = 0.
  function automatic gf_t gf_inv(gf_t a);
    gf_t r;
    r = gf_t'(1);
    for (int i = 0; i < BCH_N - 1; i++) r = gf_mul(r, a);
    return r;
  endfunction

  // Remainder of a degree-<15 binary polynomial divided by g(X).
  function automatic parity_t poly_rem_g(codeword_t p);
    codeword_t r;
    r = p;
    for (int i = BCH_N - 1; i >= int'(BCH_NK); i--)
      if (r[i]) r ^= codeword_t'(GEN_POLY) << (i - BCH_NK);
    return r[BCH_NK-1:0];
  endfunction

  // Quotient of a degree-<15 binary polynomial divided by g(X).
  function automatic message_t poly_div_g(codeword_t p);
    codeword_t r;
    message_t  q;
    r = p;
    q = '0;
    for (int i = BCH_N - 1; i >= int'(BCH_NK); i--)
      if (r[i]) begin
        r ^= codeword_t'(GEN_POLY) << (i - BCH_NK);
        q[i - BCH_NK] = 1'b1;
      end
    return q;
  endfunction

endpackage
