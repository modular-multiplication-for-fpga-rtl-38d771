// idea_ref_pkg: behavioural reference model of IDEA used by the
// testbenches. It computes everything with plain integer arithmetic,
// independently of the RTL: multiplication modulo 65537 with 0 standing
// for 65536, the round and output transformation in their textbook form,
// the encryption key schedule (the 128-bit key rotated left by 25 bits
// after every eight subkeys) and the decryption subkeys (multiplicative and
// additive inverses in reverse round order). The key schedule is not part
// of the hardware; the processors receive precomputed subkeys.
package idea_ref_pkg;
  import idea_pkg::*;

  typedef word_t subkeys_t [NSUBKEYS];

  function automatic word_t ref_mul(word_t a, word_t b);
    longint unsigned aa, bb, r;
    aa = (a == 0) ? 65536 : longint'(a);
    bb = (b == 0) ? 65536 : longint'(b);
    r  = (aa * bb) % 65537;
    return (r == 65536) ? word_t'(0) : word_t'(r);
  endfunction

  // Multiplicative inverse modulo 65537 (x^65535), 0 <-> 65536.
  function automatic word_t ref_inv(word_t a);
    word_t r, b;
    int unsigned e;
    r = 16'd1; b = a; e = 65535;
    while (e != 0) begin
      if (e[0]) r = ref_mul(r, b);
      b = ref_mul(b, b);
      e = e >> 1;
    end
    return r;
  endfunction

  // Textbook round: returns (Y1^t1, Y3^t1, Y2^t2, Y4^t2).
  function automatic block_t ref_round(block_t x, word_t k1, word_t k2, word_t k3,
                                       word_t k4, word_t k5, word_t k6);
    word_t y1, y2, y3, y4, t0, t1, t2;
    block_t o;
    y1 = ref_mul(x[0], k1); y2 = x[1] + k2; y3 = x[2] + k3; y4 = ref_mul(x[3], k4);
    t0 = ref_mul(y1 ^ y3, k5);
    t1 = ref_mul(t0 + (y2 ^ y4), k6);
    t2 = t0 + t1;
    o[0] = y1 ^ t1; o[1] = y3 ^ t1; o[2] = y2 ^ t2; o[3] = y4 ^ t2;
    return o;
  endfunction

  function automatic block_t ref_outt(block_t z, word_t k1, word_t k2, word_t k3, word_t k4);
    block_t c;
    c[0] = ref_mul(z[0], k1); c[1] = z[2] + k2; c[2] = z[1] + k3; c[3] = ref_mul(z[3], k4);
    return c;
  endfunction

  function automatic block_t ref_cipher(block_t x, subkeys_t k);
    block_t s;
    s = x;
    for (int r = 0; r < 8; r++)
      s = ref_round(s, k[6*r], k[6*r+1], k[6*r+2], k[6*r+3], k[6*r+4], k[6*r+5]);
    return ref_outt(s, k[48], k[49], k[50], k[51]);
  endfunction

  function automatic subkeys_t ref_enc_keys(logic [127:0] key);
    subkeys_t k;
    logic [127:0] kk;
    kk = key;
    for (int i = 0; i < NSUBKEYS; i++) begin
      if (i != 0 && i % 8 == 0) kk = {kk[102:0], kk[127:103]};
      k[i] = kk[127 - 16*(i % 8) -: 16];
    end
    return k;
  endfunction

  function automatic subkeys_t ref_dec_keys(subkeys_t ek);
    subkeys_t dk;
    dk[0] = ref_inv(ek[48]); dk[1] = -ek[49]; dk[2] = -ek[50]; dk[3] = ref_inv(ek[51]);
    dk[4] = ek[46]; dk[5] = ek[47];
    for (int r = 1; r < 8; r++) begin
      int b;
      b = 48 - 6*r;
      dk[6*r]   = ref_inv(ek[b]);
      dk[6*r+1] = -ek[b+2];
      dk[6*r+2] = -ek[b+1];
      dk[6*r+3] = ref_inv(ek[b+3]);
      dk[6*r+4] = ek[b-2];
      dk[6*r+5] = ek[b-1];
    end
    dk[48] = ref_inv(ek[0]); dk[49] = -ek[1]; dk[50] = -ek[2]; dk[51] = ref_inv(ek[3]);
    return dk;
  endfunction

  function automatic block_t rand_block();
    block_t b;
    for (int i = 0; i < 4; i++) b[i] = word_t'($urandom);
    return b;
  endfunction
endpackage
