// bch_decoder -- receiver-side decoder for the (15,7) double-error-correcting
// BCH code over GF(2^4), p(X) = 1 + X + X^4, g(X) = 1 + X^4 + X^6 + X^7 + X^8.
//
// It corrects any pattern of up to two bit errors in the received word and
// returns the 7-bit message, for either coding scheme. The decoding method
// is this design's own choice (the simplest complete one for t = 2):
//   * syndromes S1 = r(alpha) and S3 = r(alpha^3);
//   * error-locator sigma(X) = 1 + s1 X + s2 X^2 solved in closed form:
//     s1 = S1, s2 = (S3 + S1^3) / S1 (s2 = 0 means a single error);
//   * Chien search over all 15 positions in parallel: bit j is in error when
//     sigma(alpha^-j) = 0, and is flipped;
//   * message recovery: systematic words carry it in bits 14..8; for
//     non-systematic words it is the quotient c(X) / g(X).
// The word is flagged uncorrectable (and left uncorrected) when S1 = 0 but
// S3 != 0, or when the number of locator roots found differs from the
// locator's degree; both mean three or more errors.
//
// Interface and timing: in_valid/rx_word/mode are sampled on a rising clk
// edge; one cycle later out_valid is high for one cycle with msg, the
// corrected word, the number of corrected errors (0..2) and the
// uncorrectable flag. One word per cycle, no back-pressure. rst_n is an
// active-low synchronous reset. An assertion checks that every word passed
// as corrected is divisible by g(X).
module bch_decoder
  import bch15_7_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  codeword_t rx_word,
  input  enc_mode_e mode,
  output logic      out_valid,
  output message_t  msg,
  output codeword_t corrected,
  output errcnt_t   err_count,
  output logic      uncorrectable
);

  gf_t        s1, s3, s1_cubed, sig1, sig2;
  codeword_t  err_loc;
  int unsigned n_roots;
  errcnt_t    sig_deg;
  logic       fail;
  codeword_t  fixed_word;
  message_t   msg_c;

  // Syndromes: S1 = sum r_i alpha^i, S3 = sum r_i alpha^(3i).
  always_comb begin
    s1 = '0;
    s3 = '0;
    for (int unsigned i = 0; i < BCH_N; i++)
      if (rx_word[i]) begin
        s1 ^= gf_alpha_pow(i);
        s3 ^= gf_alpha_pow(3 * i);
      end
  end

  // Error-locator coefficients (Peterson's closed form for t = 2).
  always_comb begin
    s1_cubed = gf_mul(s1, gf_mul(s1, s1));
    sig1     = s1;
    sig2     = (s1 == '0) ? '0 : gf_mul(s3 ^ s1_cubed, gf_inv(s1));
    sig_deg  = (sig2 != '0) ? errcnt_t'(2) : ((sig1 != '0) ? errcnt_t'(1) : errcnt_t'(0));
  end

  // Chien search: position j is in error when sigma(alpha^-j) = 0.
  always_comb begin
    n_roots = 0;
    for (int unsigned j = 0; j < BCH_N; j++) begin
      gf_t v;
      v = gf_t'(1) ^ gf_mul(sig1, gf_alpha_pow(BCH_N - j))
                   ^ gf_mul(sig2, gf_alpha_pow(2 * (BCH_N - j)));
      err_loc[j] = (v == '0);
      n_roots += (v == '0) ? 1 : 0;
    end
  end

  always_comb begin
    fail       = ((s1 == '0) && (s3 != '0)) || (n_roots != int'(sig_deg));
    fixed_word = fail ? rx_word : (rx_word ^ err_loc);
    msg_c      = (mode == ENC_SYSTEMATIC) ? fixed_word[BCH_N-1:BCH_NK]
                                          : poly_div_g(fixed_word);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      msg           <= '0;
      corrected     <= '0;
      err_count     <= '0;
      uncorrectable <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        msg           <= msg_c;
        corrected     <= fixed_word;
        err_count     <= fail ? '0 : sig_deg;
        uncorrectable <= fail;
      end
    end
  end

  // A word the decoder accepts as corrected must be a code word.
  a_corrected_in_code: assert property (
    @(posedge clk) disable iff (!rst_n)
      out_valid && !uncorrectable |-> poly_rem_g(corrected) == '0
  ) else $error("bch_decoder: corrected word is not a code word");

endmodule
