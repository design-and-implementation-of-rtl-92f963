// aes_ref_pkg: a behavioural Rijndael model that the testbenches compare the
// RTL against. It is written independently of the RTL: the S-box is built
// from its definition (multiplicative inverse in GF(2^8) followed by the
// affine map), MixColumns uses a general shift-and-add multiplier, and the
// inverse cipher applies the inverse steps one by one.
//
// Blocks and keys are right-aligned in 256-bit vectors: for nb columns the
// block is in bits [nb*32-1:0], byte 0 in the most significant position.
package aes_ref_pkg;

  typedef logic [255:0] vec_t;

  byte unsigned sbox_t [256];
  byte unsigned isbox_t[256];
  bit           ready = 0;

  function automatic byte unsigned mul(byte unsigned a, byte unsigned b);
    byte unsigned r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = (a[7]) ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return r;
  endfunction

  function automatic byte unsigned rotl(byte unsigned x, int s);
    return byte'((x << s) | (x >> (8 - s)));
  endfunction

  function automatic void init();
    if (ready) return;
    for (int a = 0; a < 256; a++) begin
      byte unsigned inv = 0;
      for (int b = 1; b < 256; b++) if (mul(byte'(a), byte'(b)) == 1) inv = byte'(b);
      sbox_t[a] = inv ^ rotl(inv, 1) ^ rotl(inv, 2) ^ rotl(inv, 3) ^ rotl(inv, 4) ^ 8'h63;
    end
    for (int a = 0; a < 256; a++) isbox_t[sbox_t[a]] = byte'(a);
    ready = 1;
  endfunction

  function automatic byte unsigned sbox(byte unsigned a);
    init();
    return sbox_t[a];
  endfunction

  function automatic byte unsigned inv_sbox(byte unsigned a);
    init();
    return isbox_t[a];
  endfunction

  function automatic int nrounds(int nb, int nk);
    return ((nb > nk) ? nb : nk) + 6;
  endfunction

  function automatic int shift_of(int nb, int r);
    int c[4];
    c = (nb == 8) ? '{0, 1, 3, 4} : '{0, 1, 2, 3};
    return c[r];
  endfunction

  // Byte at column c, row r.
  function automatic byte unsigned get(vec_t s, int nb, int c, int r);
    return s[nb*32-1-8*(4*c+r) -: 8];
  endfunction

  function automatic void put(ref vec_t s, input int nb, input int c, input int r,
                              input byte unsigned v);
    s[nb*32-1-8*(4*c+r) -: 8] = v;
  endfunction

  function automatic vec_t sub_bytes(vec_t s, int nb, bit inverse);
    vec_t o = '0;
    for (int c = 0; c < nb; c++)
      for (int r = 0; r < 4; r++)
        put(o, nb, c, r, inverse ? inv_sbox(get(s, nb, c, r)) : sbox(get(s, nb, c, r)));
    return o;
  endfunction

  function automatic vec_t shift_rows(vec_t s, int nb, bit inverse);
    vec_t o = '0;
    for (int c = 0; c < nb; c++)
      for (int r = 0; r < 4; r++)
        if (inverse) put(o, nb, (c + shift_of(nb, r)) % nb, r, get(s, nb, c, r));
        else         put(o, nb, c, r, get(s, nb, (c + shift_of(nb, r)) % nb, r));
    return o;
  endfunction

  function automatic vec_t mix_columns(vec_t s, int nb, bit inverse);
    byte unsigned m[4];
    vec_t o = '0;
    m = inverse ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < nb; c++)
      for (int r = 0; r < 4; r++) begin
        byte unsigned acc = 0;
        for (int k = 0; k < 4; k++) acc ^= mul(get(s, nb, c, k), m[(k - r + 4) % 4]);
        put(o, nb, c, r, acc);
      end
    return o;
  endfunction

  // Expanded key word i.
  function automatic logic [31:0] key_word(vec_t key, int nb, int nk, int i);
    logic [31:0] w[];
    byte unsigned rc = 1;
    w = new[nb * (nrounds(nb, nk) + 1)];
    for (int k = 0; k < nk; k++) w[k] = key[nk*32-1-32*k -: 32];
    for (int k = nk; k < w.size(); k++) begin
      logic [31:0] t = w[k-1];
      if (k % nk == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]) ^ rc, sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
        rc = mul(rc, 2);
      end else if (nk > 6 && k % nk == 4) begin
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
      end
      w[k] = w[k-nk] ^ t;
    end
    return w[i];
  endfunction

  function automatic vec_t round_key(vec_t key, int nb, int nk, int r);
    vec_t o = '0;
    for (int c = 0; c < nb; c++) o[nb*32-1-32*c -: 32] = key_word(key, nb, nk, r * nb + c);
    return o;
  endfunction

  function automatic vec_t encrypt(vec_t pt, vec_t key, int nb, int nk);
    int   nr = nrounds(nb, nk);
    vec_t s  = pt ^ round_key(key, nb, nk, 0);
    for (int r = 1; r <= nr; r++) begin
      s = shift_rows(sub_bytes(s, nb, 0), nb, 0);
      if (r != nr) s = mix_columns(s, nb, 0);
      s ^= round_key(key, nb, nk, r);
    end
    return s;
  endfunction

  function automatic vec_t decrypt(vec_t ct, vec_t key, int nb, int nk);
    int   nr = nrounds(nb, nk);
    vec_t s  = ct;
    for (int r = nr; r >= 1; r--) begin
      s ^= round_key(key, nb, nk, r);
      if (r != nr) s = mix_columns(s, nb, 1);
      s = sub_bytes(shift_rows(s, nb, 1), nb, 1);
    end
    return s ^ round_key(key, nb, nk, 0);
  endfunction

  function automatic vec_t rand_vec();
    vec_t v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

endpackage
