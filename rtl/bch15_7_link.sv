// bch15_7_link -- digital part of a (15,7) BCH-coded radio link.
//
// Transmit side: the user's 7-bit message and coding-scheme Boolean enter
// bch_encoder, which produces the 15-bit systematic or non-systematic code
// word. That word leaves on tx_* towards the modulator and the radio front
// end, which are outside this design. Receive side: the demodulated 15-bit
// hard-decision word from the second radio enters on rx_*; bch_decoder
// corrects up to two bit errors and returns the message on dec_*.
//
// The two halves share only the clock and reset; in a real link they sit on
// different machines, so the receiver gets its own coding-scheme input
// (rx_mode) that must match the transmitter's. Loop tx_codeword back to
// rx_word, through any error pattern, to exercise the whole chain.
//
// Timing: each half has one cycle of latency and accepts a word every cycle.
// rst_n is active-low and synchronous.
module bch15_7_link
  import bch15_7_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // transmitter: user input
  input  logic       tx_in_valid,
  input  message_t   tx_msg,
  input  enc_mode_e  tx_mode,
  // transmitter: to the modulator
  output logic       tx_valid,
  output codeword_t  tx_codeword,
  output enc_mode_e  tx_out_mode,
  // receiver: from the demodulator
  input  logic       rx_valid,
  input  codeword_t  rx_word,
  input  enc_mode_e  rx_mode,
  // receiver: decoded result
  output logic       dec_valid,
  output message_t   dec_msg,
  output codeword_t  dec_corrected,
  output errcnt_t    dec_err_count,
  output logic       dec_uncorrectable
);

  bch_encoder u_encoder (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (tx_in_valid),
    .msg       (tx_msg),
    .mode      (tx_mode),
    .out_valid (tx_valid),
    .codeword  (tx_codeword),
    .out_mode  (tx_out_mode)
  );

  bch_decoder u_decoder (
    .clk           (clk),
    .rst_n         (rst_n),
    .in_valid      (rx_valid),
    .rx_word       (rx_word),
    .mode          (rx_mode),
    .out_valid     (dec_valid),
    .msg           (dec_msg),
    .corrected     (dec_corrected),
    .err_count     (dec_err_count),
    .uncorrectable (dec_uncorrectable)
  );

endmodule
