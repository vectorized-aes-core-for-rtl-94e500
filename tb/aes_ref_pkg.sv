// aes_ref_pkg: reference AES-128 model for the testbenches.
//
// Written independently of the RTL helpers: the state is a byte array, the
// S-box comes from log/antilog tables over the generator 3 of GF(2^8), and
// the key schedule is expanded word by word as in FIPS-197 section 5.2.
// Provides whole-block encryption/decryption and single forward/inverse
// rounds for checking the round datapath.
package aes_ref_pkg;

  typedef bit [7:0] b8;
  typedef b8 st_t [16];

  function automatic b8 mul(b8 a, b8 b);
    b8 p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
      b >>= 1;
    end
    return p;
  endfunction

  function automatic b8 sbox(b8 x);
    b8 alog [256];
    b8 lg [256];
    b8 v, inv, s;
    v = 1;
    for (int i = 0; i < 255; i++) begin
      alog[i] = v;
      lg[v] = b8'(i);
      v = mul(v, 8'h03);
    end
    inv = (x == 0) ? 8'h00 : alog[(255 - lg[x]) % 255];
    s = 8'h63;
    for (int i = 0; i < 8; i++)
      s[i] = s[i] ^ inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return s;
  endfunction

  function automatic b8 isbox(b8 y);
    for (int i = 0; i < 256; i++) if (sbox(b8'(i)) == y) return b8'(i);
    return 0;
  endfunction

  function automatic st_t to_st(bit [127:0] v);
    st_t s;
    for (int i = 0; i < 16; i++) s[i] = v[127-8*i -: 8];
    return s;
  endfunction

  function automatic bit [127:0] from_st(st_t s);
    bit [127:0] v;
    for (int i = 0; i < 16; i++) v[127-8*i -: 8] = s[i];
    return v;
  endfunction

  function automatic bit [127:0] fwd_round(bit [127:0] in, bit [127:0] rk, bit last);
    st_t s = to_st(in), t, k = to_st(rk);
    for (int i = 0; i < 16; i++) s[i] = sbox(s[i]);
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) t[4*c+r] = s[4*((c+r)%4)+r];
    if (!last)
      for (int c = 0; c < 4; c++) begin
        b8 a[4];
        for (int r = 0; r < 4; r++) a[r] = t[4*c+r];
        for (int r = 0; r < 4; r++)
          t[4*c+r] = mul(a[r], 2) ^ mul(a[(r+1)%4], 3) ^ a[(r+2)%4] ^ a[(r+3)%4];
      end
    for (int i = 0; i < 16; i++) t[i] ^= k[i];
    return from_st(t);
  endfunction

  function automatic bit [127:0] inv_round(bit [127:0] in, bit [127:0] rk, bit last);
    st_t s = to_st(in), t, k = to_st(rk);
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) t[4*((c+r)%4)+r] = s[4*c+r];
    for (int i = 0; i < 16; i++) t[i] = isbox(t[i]) ^ k[i];
    if (!last)
      for (int c = 0; c < 4; c++) begin
        b8 a[4];
        for (int r = 0; r < 4; r++) a[r] = t[4*c+r];
        for (int r = 0; r < 4; r++)
          t[4*c+r] = mul(a[r], 14) ^ mul(a[(r+1)%4], 11) ^ mul(a[(r+2)%4], 13) ^ mul(a[(r+3)%4], 9);
      end
    return from_st(t);
  endfunction

  typedef bit [127:0] rk_t [11];

  function automatic rk_t expand(bit [127:0] key);
    bit [31:0] w [44];
    b8 rc = 1;
    rk_t rk;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      bit [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]) ^ rc, sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
        rc = mul(rc, 2);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic bit [127:0] encrypt(bit [127:0] key, bit [127:0] pt);
    rk_t rk = expand(key);
    bit [127:0] s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) s = fwd_round(s, rk[r], r == 10);
    return s;
  endfunction

  function automatic bit [127:0] decrypt(bit [127:0] key, bit [127:0] ct);
    rk_t rk = expand(key);
    bit [127:0] s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) s = inv_round(s, rk[r], r == 0);
    return s;
  endfunction

endpackage
