// tb_ref_pkg: reference models used by the testbenches, written
// independently of the RTL: a bit-serial scrambler, a carry-less
// multiply-then-reduce GF(2^m) product and a polynomial evaluator that
// checks a Reed-Solomon code word by its roots a and a^2.
package tb_ref_pkg;

  function automatic int poly_of(int m);
    case (m)
      3: return 'b1011;
      4: return 'b10011;
      5: return 'b100101;
      default: return 'b100011101;
    endcase
  endfunction

  // Carry-less product, then reduction from the top bit down.
  function automatic int gmul(int a, int b, int m);
    int p = 0;
    for (int i = 0; i < m; i++) if (b[i]) p ^= (a << i);
    for (int i = 2*m-2; i >= m; i--) if (p[i]) p ^= (poly_of(m) << (i - m));
    return p;
  endfunction

  function automatic int gpow(int e, int m);
    int r = 1;
    for (int i = 0; i < e; i++) r = gmul(r, 2, m);
    return r;
  endfunction

  // Evaluate sum sym[j] x^j at x = a^r (Horner, highest degree first).
  function automatic int geval(int sym[$], int r, int m);
    int acc = 0;
    int x = gpow(r, m);
    for (int j = sym.size() - 1; j >= 0; j--) acc = gmul(acc, x, m) ^ sym[j];
    return acc;
  endfunction

  // One bit of a serial multiplicative scrambler; hist[0] is S_(i-1).
  function automatic bit scr_bit(bit d, ref bit hist[$], input int t1, input int t2);
    bit s;
    s = ~(~(d ^ hist[t1-1]) ^ hist[t2-1]);
    hist.push_front(s);
    void'(hist.pop_back());
    return s;
  endfunction

endpackage
