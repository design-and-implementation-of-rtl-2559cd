// tb_bch_decoder -- self-checking test of the (15,7) BCH decoder.
//
// 1. Every message, both schemes, every error pattern of weight 0, 1 and 2
//    (1 + 15 + 105 patterns): the decoder must return the message, the
//    original code word and the error weight, and must not flag the word.
// 2. Random 15-bit words: compared with brute-force nearest-code-word
//    decoding. Within distance 2 of a code word the decoder must correct to
//    it; otherwise it must flag the word as uncorrectable.
// Words are fed back to back, one per cycle, and each result is checked one
// cycle later.
module tb_bch_decoder;
  import bch15_7_pkg::*;
  import bch_ref_pkg::*;

  logic      clk, rst_n;
  initial begin clk = 1'b0; rst_n = 1'b0; end
  logic      in_valid;
  codeword_t rx_word;
  enc_mode_e mode;
  logic      out_valid;
  message_t  msg;
  codeword_t corrected;
  errcnt_t   err_count;
  logic      uncorrectable;
  int checks = 0, failures = 0;
  int n_by_weight [3] = '{0, 0, 0};
  int n_flagged = 0;

  bch_decoder dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: rx=%b mode=%0d -> msg=%b cw=%b n=%0d unc=%b", what,
                 rx_word, mode, msg, corrected, err_count, uncorrectable);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic decode(codeword_t w, enc_mode_e md);
    in_valid = 1'b1;
    rx_word  = w;
    mode     = md;
    @(posedge clk);
    #1;
    check(out_valid, "latency 1 cycle");
  endtask

  initial begin
    in_valid = 1'b0;
    rx_word  = '0;
    mode     = ENC_SYSTEMATIC;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // Result table: both schemes decode to 1010101.
    decode(15'b1010101_11100101, ENC_SYSTEMATIC);
    check(msg == 7'b1010101 && err_count == 0, "table: systematic");
    decode(15'b110111111000101, ENC_NON_SYSTEMATIC);
    check(msg == 7'b1010101 && err_count == 0, "table: non-systematic");

    for (int m = 0; m < 128; m++) begin
      for (int s = 0; s < 2; s++) begin
        enc_mode_e   md;
        codeword_t   c;
        md = enc_mode_e'(s);
        c  = (md == ENC_SYSTEMATIC) ? ref_sys_encode(7'(m)) : ref_nonsys_encode(7'(m));
        // no error, then every pair of errors (a, b)
        decode(c, md);
        check(msg == 7'(m) && corrected == c, "no error");
        check(err_count == 0 && !uncorrectable, "error count (0 errors)");
        n_by_weight[0]++;
        for (int a = 0; a < 15; a++)
          for (int b = a + 1; b < 15; b++) begin
            decode(c ^ (codeword_t'(1) << a) ^ (codeword_t'(1) << b), md);
            check(msg == 7'(m), "message (2 errors)");
            check(corrected == c, "corrected word (2 errors)");
            check(err_count == 2 && !uncorrectable, "error count (2 errors)");
            n_by_weight[2]++;
          end
        // single errors
        for (int b = 0; b < 15; b++) begin
          decode(c ^ (codeword_t'(1) << b), md);
          check(msg == 7'(m), "message (1 error)");
          check(corrected == c, "corrected word (1 error)");
          check(err_count == 1 && !uncorrectable, "error count (1 error)");
          n_by_weight[1]++;
        end
      end
    end

    // Arbitrary words against brute-force nearest-code-word decoding.
    for (int n = 0; n < 3000; n++) begin
      codeword_t  w, cw;
      logic [6:0] rm;
      enc_mode_e  md;
      int         d;
      w  = codeword_t'($urandom);
      md = enc_mode_e'($urandom_range(1));
      d  = ref_nearest(w, md == ENC_NON_SYSTEMATIC, cw, rm);
      decode(w, md);
      if (d <= 2) begin
        check(!uncorrectable && int'(err_count) == d, "random: weight");
        check(corrected == cw && msg == rm, "random: nearest word");
      end else begin
        check(uncorrectable, "random: flagged");
        n_flagged++;
      end
    end

    check(n_by_weight[0] > 0 && n_by_weight[1] > 0 && n_by_weight[2] > 0
          && n_flagged > 0, "all cases exercised");
    $display("weights 0/1/2: %0d/%0d/%0d, flagged %0d", n_by_weight[0],
             n_by_weight[1], n_by_weight[2], n_flagged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
