// bch_ref_pkg -- reference models for the (15,7) BCH testbenches.
//
// These are written independently of the RTL's arithmetic:
//   * ref_sys_encode  runs the classic bit-serial 8-stage division register
//                     (feedback taps from g(X)) over the message, high-order
//                     bit first, and appends the register contents as parity;
//   * ref_nonsys_encode multiplies m(X) by g(X) as a shift-and-add over the
//                     list of g's exponents {0, 4, 6, 7, 8};
//   * ref_nearest     decodes by brute force: it encodes all 128 messages and
//                     returns the code word at the smallest Hamming distance.
// Bit i of every vector is the coefficient of X^i.
package bch_ref_pkg;

  // Exponents of g(X) = 1 + X^4 + X^6 + X^7 + X^8.
  localparam int G_EXP [5] = '{0, 4, 6, 7, 8};

  function automatic logic [14:0] ref_nonsys_encode(logic [6:0] m);
    logic [14:0] c;
    c = '0;
    for (int i = 0; i < 7; i++)
      if (m[i])
        foreach (G_EXP[e]) c[i + G_EXP[e]] ^= 1'b1;
    return c;
  endfunction

  function automatic logic [14:0] ref_sys_encode(logic [6:0] m);
    logic [7:0] r;     // division register, r[7] is the X^7 stage
    logic       fb;
    logic [7:0] taps;  // g(X) without its X^8 term
    taps = '0;
    foreach (G_EXP[e]) if (G_EXP[e] < 8) taps[G_EXP[e]] = 1'b1;
    r = '0;
    for (int i = 6; i >= 0; i--) begin
      fb = m[i] ^ r[7];
      r  = {r[6:0], 1'b0};
      if (fb) r ^= taps;
    end
    return {m, r};
  endfunction

  function automatic int popcount15(logic [14:0] v);
    int n;
    n = 0;
    for (int i = 0; i < 15; i++) n += int'(v[i]);
    return n;
  endfunction

  // Nearest code word (either scheme spans the same code). Returns the
  // distance; cw and the message (as the given scheme carries it) by ref.
  function automatic int ref_nearest(logic [14:0] r, bit nonsys,
                                     output logic [14:0] cw,
                                     output logic [6:0] msg);
    int best;
    best = 99;
    cw   = '0;
    msg  = '0;
    for (int m = 0; m < 128; m++) begin
      logic [14:0] c;
      int d;
      c = nonsys ? ref_nonsys_encode(7'(m)) : ref_sys_encode(7'(m));
      d = popcount15(c ^ r);
      if (d < best) begin
        best = d;
        cw   = c;
        msg  = 7'(m);
      end
    end
    return best;
  endfunction

endpackage
