// crc_ref_pkg - bit-serial reference model for the parallel CRC testbenches.
//
// Everything here is computed one message bit at a time with the plain
// dividing shift register: the feedback bit is the register's top bit, the
// register shifts up by one with the new message bit entering at bit 0, and
// the polynomial is XORed in when the feedback bit was one. Matrix elements
// of F^k are obtained by running k zero bits through the register from a
// single-one start state. None of it shares code or structure with the
// matrix-based design under test. Widths up to 64 bits are supported; m is
// passed as an argument.
package crc_ref_pkg;

  typedef logic [63:0] word_t;

  function automatic word_t mask(int unsigned m);
    return (m >= 64) ? '1 : ((word_t'(1) << m) - 1);
  endfunction

  // One bit through the serial register.
  function automatic word_t step(word_t s, word_t poly, int unsigned m, logic b);
    logic fb;
    fb = s[m-1];
    s  = ((s << 1) | word_t'(b)) & mask(m);
    if (fb) s ^= (poly & mask(m));
    return s;
  endfunction

  // Element (row i, column j) of F^k: bit i after k shifts from state e_j.
  function automatic logic fpow_elem(word_t poly, int unsigned m, int unsigned k,
                                     int unsigned i, int unsigned j);
    word_t s;
    s = word_t'(1) << j;
    for (int unsigned n = 0; n < k; n++) s = step(s, poly, m, 1'b0);
    return s[i];
  endfunction

  // Feed an m-bit chunk, most significant bit first.
  function automatic word_t feed_chunk(word_t s, word_t poly, int unsigned m, word_t chunk);
    for (int n = int'(m) - 1; n >= 0; n--) s = step(s, poly, m, chunk[n]);
    return s;
  endfunction

endpackage
