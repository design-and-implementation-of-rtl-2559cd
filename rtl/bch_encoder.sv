// bch_encoder -- transmitter-side (15,7) BCH encoder.
//
// The 7-bit message entered at the transmitter drives both a systematic and
// a non-systematic encoder side by side; the coding-scheme Boolean picks the
// word that goes on to the modulator: false (ENC_SYSTEMATIC) selects the
// systematic code word, true (ENC_NON_SYSTEMATIC) the non-systematic one.
//
// Interface and timing: in_valid/msg/mode are sampled on a rising clk edge;
// one cycle later out_valid is high for one cycle with the selected codeword
// and the mode it was coded with. A new message may be accepted every cycle
// (no back-pressure). rst_n is an active-low synchronous reset that clears
// out_valid and the output registers. An assertion checks that
// every word sent out is divisible by g(X). The two encoders and the selector
// follow the described encoder; the clock, valid strobe and output register
// are this design's choice, made so the block can feed a serial modulator.
module bch_encoder
  import bch15_7_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  message_t  msg,
  input  enc_mode_e mode,
  output logic      out_valid,
  output codeword_t codeword,
  output enc_mode_e out_mode
);

  codeword_t cw_sys, cw_nonsys, cw_sel;

  bch_sys_encoder u_sys (
    .msg      (msg),
    .codeword (cw_sys)
  );

  bch_nonsys_encoder u_nonsys (
    .msg      (msg),
    .codeword (cw_nonsys)
  );

  always_comb cw_sel = (mode == ENC_SYSTEMATIC) ? cw_sys : cw_nonsys;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      codeword  <= '0;
      out_mode  <= ENC_SYSTEMATIC;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        codeword <= cw_sel;
        out_mode <= mode;
      end
    end
  end

  // Either scheme yields a word of the cyclic code: a multiple of g(X).
  a_codeword_in_code: assert property (
    @(posedge clk) disable iff (!rst_n) out_valid |-> poly_rem_g(codeword) == '0
  ) else $error("bch_encoder: output is not a code word");

endmodule
