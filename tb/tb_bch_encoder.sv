// tb_bch_encoder -- self-checking test of the transmitter-side encoder.
//
// Streams every message in both coding schemes, back to back and in random
// order of scheme, with idle gaps, and checks for each accepted message that
// exactly one cycle later out_valid is high with the word of the selected
// scheme (reference models) and the mode echoed. Also checks the result-table
// words for m = 1010101 and that out_valid stays low in idle cycles.
module tb_bch_encoder;
  import bch15_7_pkg::*;
  import bch_ref_pkg::*;

  logic      clk, rst_n;
  initial begin clk = 1'b0; rst_n = 1'b0; end
  logic      in_valid;
  message_t  msg;
  enc_mode_e mode;
  logic      out_valid;
  codeword_t codeword;
  enc_mode_e out_mode;
  int checks = 0, failures = 0;
  int n_sys = 0, n_nonsys = 0;

  bch_encoder dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: valid=%b word=%b mode=%0d", what, $time,
               out_valid, codeword, out_mode);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive one message for one cycle and check the registered result.
  task automatic send(message_t m, enc_mode_e md);
    codeword_t exp;
    in_valid = 1'b1;
    msg      = m;
    mode     = md;
    @(posedge clk);
    #1;
    in_valid = 1'b0;
    msg      = message_t'($urandom);  // must not disturb the held output
    exp = (md == ENC_SYSTEMATIC) ? ref_sys_encode(m) : ref_nonsys_encode(m);
    check(out_valid, "latency 1 cycle");
    check(codeword == exp, "selected code word");
    check(out_mode == md, "mode echo");
    if (md == ENC_SYSTEMATIC) n_sys++; else n_nonsys++;
  endtask

  initial begin
    in_valid = 1'b0;
    msg      = '0;
    mode     = ENC_SYSTEMATIC;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1 check(!out_valid, "idle after reset");

    // Result-table row for each scheme.
    send(7'b1010101, ENC_SYSTEMATIC);
    check(codeword == 15'b1010101_11100101, "table: systematic");
    send(7'b1010101, ENC_NON_SYSTEMATIC);
    check(codeword == 15'b110111111000101, "table: non-systematic");

    for (int m = 0; m < 128; m++) begin
      send(message_t'(m), ENC_SYSTEMATIC);
      send(message_t'(m), ENC_NON_SYSTEMATIC);
    end
    for (int n = 0; n < 500; n++) begin
      send(message_t'($urandom), enc_mode_e'($urandom_range(1)));
      if ($urandom_range(3) == 0) begin
        codeword_t held;
        held = codeword;
        @(posedge clk);
        #1;
        check(!out_valid, "idle cycle");
        check(codeword == held, "output held when idle");
      end
    end
    check(n_sys > 0 && n_nonsys > 0, "both schemes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
