// bch_sys_encoder -- systematic encoder for a binary cyclic (n,k) code,
// by default the (15,7) BCH code with g(X) = 1 + X^4 + X^6 + X^7 + X^8.
//
// Output: c(X) = X^(n-k) m(X) + rem[ X^(n-k) m(X) / g(X) ], so the message
// sits unchanged in code word bits n-1 .. n-k and the parity in bits
// n-k-1 .. 0. For m = 1010101 the word is 1010101_11100101.
//
// The datapath follows the four-step procedure of the encoder:
//   1. build a k x n matrix; row i is the one-hot vector for X^(n-1) rotated
//      right i times, kept when message bit k-1-i is set and zeroed otherwise;
//   2. XOR each column of the matrix, giving S = X^(n-k) m(X);
//   3. divide S by g(X) (an unrolled long division, i.e. the (n-k)-stage
//      feedback shift register laid out in space) and keep the remainder;
//   4. XOR S with the remainder.
// Rotation counts run 0 .. k-1, the reading under which step 2 yields
// X^(n-k) m(X) as the code-word definition requires.
//
// Interface: msg (bit i = coefficient of X^i) in, codeword out. Purely
// combinational, no clock; timing and registering are left to the user of
// the block (bch_encoder registers its output).
module bch_sys_encoder
  import bch15_7_pkg::*;
#(
  parameter int unsigned     N   = BCH_N,
  parameter int unsigned     K   = BCH_K,
  parameter logic [N-K:0]    GEN = GEN_POLY
) (
  input  logic [K-1:0] msg,
  output logic [N-1:0] codeword
);

  localparam int unsigned NK = N - K;

  logic [N-1:0] rows [K];   // step 1: partial products
  logic [N-1:0] s_vec;      // step 2: X^(n-k) m(X)
  logic [N-1:0] rem_vec;    // step 3: remainder (only low n-k bits non-zero)

  // Row i: X^(n-1) rotated right i times (= X^(n-1-i)) if msg[k-1-i] is set.
  always_comb begin
    for (int i = 0; i < int'(K); i++) begin
      logic [N-1:0] base;
      base    = '0;
      base[N-1] = 1'b1;
      rows[i] = msg[K-1-i] ? ((base >> i) | (base << (N - i))) : '0;
    end
  end

  // Column-wise XOR of the matrix.
  always_comb begin
    s_vec = '0;
    for (int i = 0; i < int'(K); i++) s_vec ^= rows[i];
  end

  // Long division of S by g(X): clear bits n-1 .. n-k from the top down.
  always_comb begin
    logic [N-1:0] r;
    r = s_vec;
    for (int i = N - 1; i >= int'(NK); i--)
      if (r[i]) r ^= N'(GEN) << (i - NK);
    rem_vec = r;
  end

  assign codeword = s_vec ^ rem_vec;

endmodule
