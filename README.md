# (15,7) BCH encoder and decoder for a radio link

This design protects 7-bit messages sent over a noisy radio channel. It adds
8 check bits to each message, which gives 15-bit code words of the binary
(15,7) BCH code. The receiver can then correct any two bit errors in a word.
The transmitter can build the code word in one of two ways, set by one
control bit:

* **systematic**: the message is sent unchanged, followed by 8 parity bits;
* **non-systematic**: the word is the product of the message polynomial and
  the generator polynomial.

The receiver decodes either kind back to the message. The RTL covers the
digital part of the link: the encoder on the transmit side and the decoder
on the receive side. The modulator, the software-defined radios and the
demodulator are not included. Their connection points are brought out as
ports.

## The code

| quantity | value |
|---|---|
| field | GF(2^4), primitive polynomial p(X) = 1 + X + X^4 |
| block length n | 2^4 - 1 = 15 |
| message length k | 7 |
| parity bits n - k | 8 |
| errors corrected t | 2 (minimum distance 5) |
| generator g(X) | phi1(X)·phi3(X) = (1+X+X^4)(1+X+X^2+X^3+X^4) = 1 + X^4 + X^6 + X^7 + X^8 |

phi1 and phi3 are the minimal polynomials of α and α^3. Here α is a root of
p(X). g(X) has α, α^2, α^3 and α^4 among its roots, which is what makes the
code correct two errors.

**Bit order.** Throughout the RTL, bit *i* of a vector is the coefficient of
X^i. Vectors printed in this README are written most significant bit first.
In that form g(X) is `1_1101_0001` (`GEN_POLY = 9'b111010001`). A systematic
word reads `[message | parity]`.

Reference example, used by every testbench (m = 1010101, i.e.
m(X) = 1 + X^2 + X^4 + X^6):

| scheme | code word (X^14 … X^0) |
|---|---|
| systematic | `1010101` `11100101` |
| non-systematic | `110111111000101` |

Both words decode back to `1010101`.

## Encoding as a matrix of rotated rows

Both encoders build the code word in the same way. They form a 7×15 bit
matrix, keep one row for each message bit that is 1, and XOR the rows
column by column. This is a carry-less multiplication written out as
hardware: one row per partial product, then an XOR tree.

* **`bch_nonsys_encoder`**: g(X) is left-aligned in 15 bits
  (`111010001_000000` = g·X^6). Row *i* (i = 0..6) is that vector rotated
  right *i* places, so it equals g·X^(6-i). Row *i* is kept when message bit
  6-i is set. The XOR of the rows is m(X)·g(X). g has degree 8, so the
  rotations never wrap, and the rotation gives the same result as a plain
  shift.
* **`bch_sys_encoder`**:
  1. Row *i* is the one-hot X^14 rotated right *i* places, which is
     X^(14-i). The XOR of the kept rows is S = X^8·m(X), the message moved
     up into the top 7 positions.
  2. S is divided by g(X). The division is an unrolled long division:
     for bit positions 14 down to 8, if the bit is set, XOR in g shifted to
     that position. This is the usual 8-stage feedback shift register, laid
     out in space instead of time.
  3. The remainder is XORed onto S: c = X^8·m + (X^8·m mod g).

Working the example for step 2 by hand: `X^14+X^12+X^10+X^8` reduces through
the leading terms X^14, X^13, X^12, X^10 and X^8 to the remainder
`1 + X^2 + X^5 + X^6 + X^7`, which is parity `11100101`.

Both encoders are purely combinational and have parameters
`N`, `K` and `GEN`. Their defaults are 15, 7 and g(X). Any binary cyclic
(N,K) code with generator `GEN` of degree N-K works.

**`bch_encoder`** places the two encoders side by side and selects one word.
A `mode` of `ENC_SYSTEMATIC` (0) picks the systematic word and
`ENC_NON_SYSTEMATIC` (1) picks the non-systematic one. The selected word is
then registered.

## Decoding (`bch_decoder`)

For each received word r the decoder finds the error positions, flips them,
and then recovers the message. The method is the direct algebraic method for
t = 2. It runs entirely in parallel within one clock cycle:

1. **Syndromes.** S1 = r(α) and S3 = r(α^3), computed as XORs of constant
   field elements selected by the bits of r.
2. **Error locator.** σ(X) = 1 + σ1·X + σ2·X^2 with σ1 = S1 and
   σ2 = (S3 + S1^3)/S1. The field inverse is computed as a^14. With one
   error, S3 = S1^3, so σ2 = 0 and σ has degree 1. With no error, both
   syndromes are 0.
3. **Chien search.** σ(α^-j) is evaluated for all 15 positions *j* at once.
   Every root marks bit *j* as wrong, and all marked bits are flipped.
4. **Failure detection.** Three or more errors usually produce a
   syndrome pair that matches no pattern of two or fewer errors. This shows
   up in one of two ways: S1 = 0 with S3 ≠ 0, or a number of Chien roots that
   differs from the degree of σ. In either case `uncorrectable` is raised,
   `err_count` is 0 and the word is passed on uncorrected. Like any bounded-
   distance decoder, it cannot see a pattern of three or more errors that
   lands within distance 2 of a different code word. It "corrects" such a
   word to that other code word.
5. **Message recovery.** A systematic word carries the message in bits
   14..8. For a non-systematic word the message is the quotient c(X)/g(X),
   computed by the same unrolled long division.

The receiver cannot tell from the word which scheme the transmitter used
(both schemes produce the same set of code words). It therefore has its own
`mode` input, which must match the transmitter's setting.

The decoder is written for this code: GF(2^4) arithmetic, t = 2 and the
constants come from `bch15_7_pkg`. Unlike the encoders, it does not adapt to
other (N, K, GEN) values.

## Modules and interfaces

| file | contents |
|---|---|
| `rtl/bch15_7_pkg.sv` | constants, types (`message_t`, `codeword_t`, `gf_t`, `errcnt_t`, `enc_mode_e`), GF(2^4) multiply/power/inverse, division by g(X) |
| `rtl/bch_sys_encoder.sv` | systematic encoder (combinational) |
| `rtl/bch_nonsys_encoder.sv` | non-systematic encoder (combinational) |
| `rtl/bch_encoder.sv` | both encoders, scheme selector, output register |
| `rtl/bch_decoder.sv` | syndrome / locator / Chien decoder, output register |
| `rtl/bch15_7_link.sv` | top: encoder and decoder side by side |

**Timing.** `bch_encoder` and `bch_decoder` sample their inputs on a rising
`clk` edge when `in_valid` is high. One cycle later `out_valid` is high for
one cycle with the result. Between valid inputs the outputs hold their last
values. Both blocks accept one word every cycle and have no back-pressure.
`rst_n` is an active-low synchronous reset that clears the valids and the
output registers.

**Top, `bch15_7_link`.**

* `tx_in_valid`, `tx_msg`, `tx_mode` → `tx_valid`, `tx_codeword`,
  `tx_out_mode`: these go to the modulator.
* `rx_valid`, `rx_word`, `rx_mode` → `dec_valid`, `dec_msg`,
  `dec_corrected`, `dec_err_count`, `dec_uncorrectable`: `rx_word` comes from
  the demodulator.

The two halves share only `clk` and `rst_n`. To exercise the whole chain in
simulation, connect `tx_codeword` to `rx_word` through an error pattern.

Each registered block has a concurrent assertion. It checks that every word
the encoder emits, and every word the decoder reports as corrected, is
divisible by g(X).

## Where the design makes its own choices

The source describes the code, the two encoding procedures and the scheme
selection in detail. The following points are this design's own choices:

* **Rotation counts.** The encoding procedure lists the rows as rotations
  "i = 1 to 7". Read literally, each row would sit one position too low, and
  the result would not be X^8·m(X) or m(X)·g(X). The RTL uses rotations 0..6,
  which matches the defining equations and the worked example.
* **Message bit order.** The example message 1010101 reads the same in both
  directions, so it does not fix the bit order. The order follows the other
  printed vectors, where the leftmost bit is the highest power of X.
* **Decoder.** The source says only that the received word is decoded to an
  error-free message and that up to two errors are corrected. The syndrome,
  locator and Chien structure, the quotient-based recovery of non-systematic
  messages, the `uncorrectable` flag and the receiver's `mode` input are all
  chosen here.
* **Clocking.** The source implements the encoder in software, so it has no
  clock. The valid strobes (with no ready signal), one-cycle latency and synchronous
  reset are chosen here.
* **Not included.** The modulation scheme and the radio hardware are not
  specified, so the design has no modulator, demodulator or RF front end.

## Verification

Each block has a self-checking testbench in `tb/`. The reference models are
in `tb/bch_ref_pkg.sv` and are built differently from the RTL:

* the systematic reference is a bit-serial division register;
* the non-systematic reference is a shift-and-add over the exponents of g;
* the decoder reference is a brute-force nearest-code-word search over all
  128 code words.

What each testbench covers:

* `tb_bch_sys_encoder`, `tb_bch_nonsys_encoder`: the reference example, all
  128 messages, the message field, membership in the code, and linearity.
* `tb_bch_encoder`: every message in both schemes, back to back and with idle
  gaps. Checks the one-cycle latency, the selection, the mode echo and that
  the output holds.
* `tb_bch_decoder`: every message × both schemes × every error pattern of
  weight 0, 1 and 2 (30,976 words), plus 3,000 random words checked against
  the brute-force decoder. For those random words, the decoder must either
  correct to the nearest word or raise the flag.
* `tb_bch15_7_link`: end to end through a bit-flipping channel model. Covers
  the reference example in both schemes, every message with 0, 1 and 2
  random errors, and 2,000 words with 3 to 5 errors. It counts each case
  (systematic, non-systematic, clean, 1-error fix, 2-error fix, flagged) and
  fails if any case never occurs. It runs at the design's default sizes.

Each testbench ends with a line `TB_RESULT checks=N failures=M` and has a
watchdog.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
  rtl/bch15_7_pkg.sv tb/bch_ref_pkg.sv tb/tb_bch15_7_link.sv \
  --top-module tb_bch15_7_link -o sim
./obj_dir/sim
```

To run another testbench, substitute its name. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/bch15_7_pkg.sv rtl/<module>.sv`.

## Cost

After generic synthesis, the whole link has 43 flip-flops. The encoder side
is a few dozen word-level cells. Nearly all of the logic is in the decoder:
the 15 parallel Chien evaluators and the GF(2^4) inverse, about 1.7k
word-level cells before technology mapping. If area matters more than
latency, the natural reduction is a serial Chien search: one position per
clock, 15 cycles per word.
