// crc_ref_pkg: reference model of the CRC register used by the CRC testbenches.
//
// Written bit by bit from the polynomial exponents, independently of the RTL:
// new[i] = old[i-1] ^ (i is a polynomial term ? old[31] : 0) ^ data[i].
// Valid bytes: a width code w means bytes 0..w of the (32- or 64-bit) word.
package crc_ref_pkg;

  function automatic bit is_term(int i);
    int terms[14] = '{0, 1, 2, 4, 5, 7, 8, 10, 11, 12, 16, 22, 23, 26};
    foreach (terms[k]) if (terms[k] == i) return 1'b1;
    return 1'b0;
  endfunction

  function automatic logic [31:0] ref_step(logic [31:0] s, logic [31:0] d);
    logic [31:0] n;
    for (int i = 0; i < 32; i++) begin
      n[i] = d[i];
      if (i > 0) n[i] ^= s[i-1];
      if (is_term(i)) n[i] ^= s[31];
    end
    return n;
  endfunction

  // Keep bytes 0..nb-1 of a 32-bit word.
  function automatic logic [31:0] keep_bytes(logic [31:0] d, int nb);
    logic [31:0] r;
    r = '0;
    for (int b = 0; b < nb && b < 4; b++) r[8*b +: 8] = d[8*b +: 8];
    return r;
  endfunction

  function automatic logic [31:0] ref_crc32(logic [31:0] s, logic [31:0] d, logic [2:0] w);
    int nb;
    nb = int'(w) + 1;
    return ref_step(s, keep_bytes(d, nb));
  endfunction

  // 64-bit word {hi, lo}: bytes 0..w valid, the high word is absorbed first.
  function automatic logic [31:0] ref_crc64(logic [31:0] s, logic [31:0] hi, logic [31:0] lo,
                                            logic [2:0] w);
    int nb;
    nb = int'(w) + 1;
    if (nb > 4) return ref_step(ref_step(s, keep_bytes(hi, nb - 4)), lo);
    return ref_step(s, keep_bytes(lo, nb));
  endfunction

endpackage
