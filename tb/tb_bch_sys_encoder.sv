// tb_bch_sys_encoder -- self-checking test of the systematic encoder.
//
// Checks the worked example (m = 1010101 gives 1010101_11100101), then all
// 128 messages against a bit-serial division-register model, and that every
// output is a multiple of g(X) with the message in bits 14..8.
module tb_bch_sys_encoder;
  import bch_ref_pkg::*;

  logic [6:0]  msg;
  logic [14:0] codeword;
  int checks = 0, failures = 0;

  bch_sys_encoder dut (.msg(msg), .codeword(codeword));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: msg=%b got=%b", what, msg, codeword);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg = 7'b1010101;
    #1;
    check(codeword == 15'b1010101_11100101, "worked example");
    check(codeword[7:0] == 8'b11100101, "worked example parity");
    for (int m = 0; m < 128; m++) begin
      logic [14:0] q;
      logic [6:0]  qm;
      msg = 7'(m);
      #1;
      check(codeword == ref_sys_encode(msg), "reference");
      check(codeword[14:8] == msg, "message field");
      // A code word of the cyclic code: its nearest code word is itself.
      check(ref_nearest(codeword, 1'b0, q, qm) == 0 && q == codeword && qm == msg, "in code");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
