// tb_bch15_7_link -- end-to-end test of the (15,7) BCH link.
//
// Each trial enters a message and a coding scheme on the transmit side,
// takes the transmitted code word, passes it through a bit-level channel
// model that flips a chosen set of bits, feeds the result to the receive
// side with the same scheme, and checks the decoded message.
//   * the result-table trials: m = 1010101 in both schemes, error-free, must
//     transmit 1010101_11100101 and 110111111000101 and decode to 1010101;
//   * every message in both schemes with 0, 1 and 2 random errors: the
//     message must come back and the error count must match;
//   * 3 to 5 random errors: the output must match brute-force
//     nearest-code-word decoding (a wrong but valid correction or a flag).
// The mechanisms counted, each of which must occur: systematic and
// non-systematic coding, clean words, 1-error and 2-error corrections, and
// words flagged uncorrectable. Runs with the design's default sizes.
module tb_bch15_7_link;
  import bch15_7_pkg::*;
  import bch_ref_pkg::*;

  logic      clk, rst_n;
  logic      tx_in_valid;
  message_t  tx_msg;
  enc_mode_e tx_mode;
  logic      tx_valid;
  codeword_t tx_codeword;
  enc_mode_e tx_out_mode;
  logic      rx_valid;
  codeword_t rx_word;
  enc_mode_e rx_mode;
  logic      dec_valid;
  message_t  dec_msg;
  codeword_t dec_corrected;
  errcnt_t   dec_err_count;
  logic      dec_uncorrectable;

  int checks = 0, failures = 0;
  int n_sys = 0, n_nonsys = 0, n_clean = 0, n_fix1 = 0, n_fix2 = 0, n_flag = 0;

  bch15_7_link dut (.*);

  initial begin clk = 1'b0; rst_n = 1'b0; end
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: tx=%b rx=%b msg=%b n=%0d unc=%b", what, tx_codeword,
                 rx_word, dec_msg, dec_err_count, dec_uncorrectable);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Random error pattern of exactly w bits.
  function automatic codeword_t error_pattern(int w);
    codeword_t e;
    e = '0;
    while ($countones(e) < w) e[$urandom_range(14)] = 1'b1;
    return e;
  endfunction

  // One trial through transmitter, channel and receiver.
  task automatic trial(message_t m, enc_mode_e md, codeword_t err);
    codeword_t sent;
    tx_in_valid = 1'b1;
    tx_msg      = m;
    tx_mode     = md;
    @(posedge clk);
    #1;
    tx_in_valid = 1'b0;
    check(tx_valid && tx_out_mode == md, "transmit strobe");
    sent = tx_codeword;
    rx_valid = 1'b1;
    rx_word  = sent ^ err;   // channel
    rx_mode  = md;
    @(posedge clk);
    #1;
    rx_valid = 1'b0;
    check(dec_valid, "receive strobe");
    if (md == ENC_SYSTEMATIC) n_sys++; else n_nonsys++;
    if ($countones(err) <= 2) begin
      check(dec_msg == m && dec_corrected == sent, "message recovered");
      check(!dec_uncorrectable && int'(dec_err_count) == $countones(err),
            "error count");
      case ($countones(err))
        0: n_clean++;
        1: n_fix1++;
        default: n_fix2++;
      endcase
    end else begin
      codeword_t  cw;
      logic [6:0] rm;
      int         d;
      d = ref_nearest(sent ^ err, md == ENC_NON_SYSTEMATIC, cw, rm);
      if (d <= 2)
        check(!dec_uncorrectable && dec_corrected == cw && dec_msg == rm,
              "miscorrection matches nearest word");
      else
        check(dec_uncorrectable, "uncorrectable flagged");
      if (dec_uncorrectable) n_flag++;
    end
  endtask

  initial begin
    tx_in_valid = 1'b0;
    tx_msg      = '0;
    tx_mode     = ENC_SYSTEMATIC;
    rx_valid    = 1'b0;
    rx_word     = '0;
    rx_mode     = ENC_SYSTEMATIC;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    trial(7'b1010101, ENC_SYSTEMATIC, '0);
    check(tx_codeword == 15'b1010101_11100101 && dec_msg == 7'b1010101,
          "result table: systematic");
    trial(7'b1010101, ENC_NON_SYSTEMATIC, '0);
    check(tx_codeword == 15'b110111111000101 && dec_msg == 7'b1010101,
          "result table: non-systematic");

    for (int m = 0; m < 128; m++)
      for (int s = 0; s < 2; s++)
        for (int w = 0; w <= 2; w++)
          trial(message_t'(m), enc_mode_e'(s), error_pattern(w));

    for (int n = 0; n < 2000; n++)
      trial(message_t'($urandom), enc_mode_e'($urandom_range(1)),
            error_pattern(3 + int'($urandom_range(2))));

    check(n_sys > 0,    "systematic coding exercised");
    check(n_nonsys > 0, "non-systematic coding exercised");
    check(n_clean > 0,  "error-free words exercised");
    check(n_fix1 > 0,   "single-error correction exercised");
    check(n_fix2 > 0,   "double-error correction exercised");
    check(n_flag > 0,   "uncorrectable flag exercised");
    $display("systematic %0d, non-systematic %0d, clean %0d, 1-error %0d, 2-error %0d, flagged %0d",
             n_sys, n_nonsys, n_clean, n_fix1, n_fix2, n_flag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
