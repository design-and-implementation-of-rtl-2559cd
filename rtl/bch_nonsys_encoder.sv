// bch_nonsys_encoder -- non-systematic encoder for a binary cyclic (n,k)
// code, by default the (15,7) BCH code with g(X) = 1 + X^4 + X^6 + X^7 + X^8.
//
// Output: c(X) = m(X) g(X). The product is formed as the encoder procedure
// lays it out: g(X) is left-aligned in an n-bit vector (g << (k-1), for the
// default code 111010001_000000); row i of a k x n matrix is that vector
// rotated right i times when message bit k-1-i is set, all zeros otherwise;
// the code word is the XOR of each column. Because deg g = n-k, the k
// rotations never wrap, so this is exactly the carry-less product.
// For m = 1010101 the word is 110111111000101.
//
// Interface: msg (bit i = coefficient of X^i) in, codeword out. Purely
// combinational, no clock; bch_encoder registers the selected word.
module bch_nonsys_encoder
  import bch15_7_pkg::*;
#(
  parameter int unsigned     N   = BCH_N,
  parameter int unsigned     K   = BCH_K,
  parameter logic [N-K:0]    GEN = GEN_POLY
) (
  input  logic [K-1:0] msg,
  output logic [N-1:0] codeword
);

  localparam logic [N-1:0] G_TOP = N'(GEN) << (K - 1);

  logic [N-1:0] rows [K];

  always_comb begin
    for (int i = 0; i < int'(K); i++)
      rows[i] = msg[K-1-i] ? ((G_TOP >> i) | (G_TOP << (N - i))) : '0;
  end

  always_comb begin
    codeword = '0;
    for (int i = 0; i < int'(K); i++) codeword ^= rows[i];
  end

endmodule
