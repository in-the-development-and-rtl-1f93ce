// fpref_pkg: reference model of the 19-bit floating-point format for the
// testbenches, written with real numbers instead of bit manipulation.
//
// A value is decoded to a real, the operation is done in double precision
// (exact for products of 11-bit mantissas, and for sums whenever the
// operands are within 40 binades of each other; further apart the smaller
// operand cannot affect the rounded result), and the real result is rounded
// to the format: to nearest with ties away from zero, saturating above the
// largest magnitude and flushing to zero below the smallest normal.
package fpref_pkg;

  typedef logic [18:0] word_t;             // {s, f[9:0], e[7:0]}

  function automatic real pow2(int k);
    real p = 1.0;
    for (int i = 0; i < k; i++)  p = p * 2.0;
    for (int i = 0; i < -k; i++) p = p / 2.0;
    return p;
  endfunction

  function automatic real to_real(word_t w);
    real v;
    if (w[7:0] == 8'd0) return 0.0;
    v = (1.0 + real'(w[17:8]) / 1024.0) * pow2(int'(w[7:0]) - 127);
    return w[18] ? -v : v;
  endfunction

  function automatic word_t from_real(real r);
    real  v, q;
    int   ex;
    logic s;
    if (r == 0.0) return '0;
    s  = r < 0.0;
    v  = s ? -r : r;
    ex = 0;
    while (v >= 2.0) begin v = v / 2.0; ex++; end
    while (v < 1.0)  begin v = v * 2.0; ex--; end
    q = $floor(v * 1024.0 + 0.5);
    if (q >= 2048.0) begin q = 1024.0; ex++; end
    if (ex > 128)  return {s, 10'h3ff, 8'hff};
    if (ex < -126) return '0;
    return {s, 10'(int'(q) - 1024), 8'(ex + 127)};
  endfunction

  function automatic word_t ref_mul(word_t a, word_t b);
    return from_real(to_real(a) * to_real(b));
  endfunction

  function automatic word_t ref_add(word_t a, word_t b);
    return from_real(to_real(a) + to_real(b));
  endfunction

  function automatic word_t from_int(int unsigned i);
    return from_real(real'(i));
  endfunction

  // random word with exponent in [lo, hi]
  function automatic word_t rand_word(int lo, int hi);
    word_t w;
    w[18]   = 1'($urandom);
    w[17:8] = 10'($urandom);
    w[7:0]  = 8'(lo + int'($urandom_range(hi - lo)));
    return w;
  endfunction

endpackage
