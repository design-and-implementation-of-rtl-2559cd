// tb_bch_nonsys_encoder -- self-checking test of the non-systematic encoder.
//
// Checks the worked example (m = 1010101 gives 110111111000101), all 128
// messages against a shift-and-add product model, and linearity: the word
// for m1 ^ m2 equals the XOR of the words for m1 and m2.
module tb_bch_nonsys_encoder;
  import bch_ref_pkg::*;

  logic [6:0]  msg;
  logic [14:0] codeword;
  int checks = 0, failures = 0;

  bch_nonsys_encoder dut (.msg(msg), .codeword(codeword));

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
    logic [14:0] words [128];
    msg = 7'b1010101;
    #1;
    check(codeword == 15'b110111111000101, "worked example");
    for (int m = 0; m < 128; m++) begin
      msg = 7'(m);
      #1;
      words[m] = codeword;
      check(codeword == ref_nonsys_encode(msg), "reference");
    end
    for (int n = 0; n < 200; n++) begin
      int a, b;
      a = int'($urandom_range(127));
      b = int'($urandom_range(127));
      check((words[a] ^ words[b]) == words[a ^ b], "linearity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
