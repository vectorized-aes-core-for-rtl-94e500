// aes_pkg: types, constants and AES-128 helper functions shared by the
// multi-stream AES unit.
//
// Block layout follows FIPS-197: a 128-bit block is 16 bytes, byte 0 in
// bits [127:120]; the state is column-major, so byte (4*c + r) is row r of
// column c. The S-box and its inverse are not typed in as tables: they are
// computed at elaboration time from their definition (multiplicative inverse
// in GF(2^8) modulo x^8+x^4+x^3+x+1, followed by the affine map with constant
// 0x63; the inverse S-box is that permutation inverted) and become constant ROMs, the way the reference core keeps them in
// memory blocks. The mode set (ECB, CBC) and the encrypt/decrypt choice are
// the ones the unit supports; everything else in this file is standard AES.
package aes_pkg;

  localparam int unsigned BLOCK_W = 128;     // AES block size
  localparam int unsigned NROUNDS = 10;      // AES-128 round count

  typedef logic [BLOCK_W-1:0] block_t;
  typedef logic [7:0]         byte_t;
  typedef byte_t              sbox_t [256];

  // Block cipher mode of operation of one stream.
  typedef enum logic { MODE_ECB = 1'b0, MODE_CBC = 1'b1 } mode_e;
  // Direction of one stream.
  typedef enum logic { DIR_ENC = 1'b0, DIR_DEC = 1'b1 } dir_e;

  // Multiply by x in GF(2^8).
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) multiply (shift and add).
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = '0;
    byte_t t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  function automatic byte_t rotl8(byte_t b, int unsigned n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  // S-box from its definition. The multiplicative inverse is found with
  // exponent/logarithm tables over the generator 3 (inverse of 3^k is
  // 3^(255-k)), which keeps elaboration-time evaluation short.
  function automatic sbox_t gen_sbox();
    sbox_t t, alog, lg;
    byte_t v = 8'h01;
    for (int k = 0; k < 255; k++) begin
      alog[k] = v;
      lg[v]   = byte_t'(k);
      v       = xtime(v) ^ v;
    end
    alog[255] = 8'h01;
    lg[0]     = 8'h00;
    for (int i = 0; i < 256; i++) begin
      byte_t inv = (i == 0) ? 8'h00 : alog[255 - int'(lg[i])];
      t[i] = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
    end
    return t;
  endfunction

  // Inverse S-box by inverting the S-box permutation.
  function automatic sbox_t gen_inv_sbox();
    sbox_t fwd = gen_sbox();
    sbox_t t;
    for (int i = 0; i < 256; i++) t[fwd[i]] = byte_t'(i);
    return t;
  endfunction

  localparam sbox_t SBOX     = gen_sbox();
  localparam sbox_t INV_SBOX = gen_inv_sbox();

  function automatic byte_t get_byte(block_t s, int unsigned i);
    return s[BLOCK_W-1-8*i -: 8];
  endfunction

  function automatic block_t sub_bytes(block_t s);
    block_t o;
    for (int i = 0; i < 16; i++) o[BLOCK_W-1-8*i -: 8] = SBOX[get_byte(s, i)];
    return o;
  endfunction

  function automatic block_t inv_sub_bytes(block_t s);
    block_t o;
    for (int i = 0; i < 16; i++) o[BLOCK_W-1-8*i -: 8] = INV_SBOX[get_byte(s, i)];
    return o;
  endfunction

  // Row r is rotated left by r columns.
  function automatic block_t shift_rows(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[BLOCK_W-1-8*(4*c+r) -: 8] = get_byte(s, 4*((c + r) % 4) + r);
    return o;
  endfunction

  function automatic block_t inv_shift_rows(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[BLOCK_W-1-8*(4*((c + r) % 4)+r) -: 8] = get_byte(s, 4*c + r);
    return o;
  endfunction

  function automatic block_t mix_columns(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++) begin
      byte_t a0 = get_byte(s, 4*c), a1 = get_byte(s, 4*c+1);
      byte_t a2 = get_byte(s, 4*c+2), a3 = get_byte(s, 4*c+3);
      o[BLOCK_W-1-8*(4*c)   -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      o[BLOCK_W-1-8*(4*c+1) -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      o[BLOCK_W-1-8*(4*c+2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      o[BLOCK_W-1-8*(4*c+3) -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return o;
  endfunction

  function automatic block_t inv_mix_columns(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++) begin
      byte_t a0 = get_byte(s, 4*c), a1 = get_byte(s, 4*c+1);
      byte_t a2 = get_byte(s, 4*c+2), a3 = get_byte(s, 4*c+3);
      o[BLOCK_W-1-8*(4*c)   -: 8] = gf_mul(a0, 8'h0e) ^ gf_mul(a1, 8'h0b) ^ gf_mul(a2, 8'h0d) ^ gf_mul(a3, 8'h09);
      o[BLOCK_W-1-8*(4*c+1) -: 8] = gf_mul(a0, 8'h09) ^ gf_mul(a1, 8'h0e) ^ gf_mul(a2, 8'h0b) ^ gf_mul(a3, 8'h0d);
      o[BLOCK_W-1-8*(4*c+2) -: 8] = gf_mul(a0, 8'h0d) ^ gf_mul(a1, 8'h09) ^ gf_mul(a2, 8'h0e) ^ gf_mul(a3, 8'h0b);
      o[BLOCK_W-1-8*(4*c+3) -: 8] = gf_mul(a0, 8'h0b) ^ gf_mul(a1, 8'h0d) ^ gf_mul(a2, 8'h09) ^ gf_mul(a3, 8'h0e);
    end
    return o;
  endfunction

  // One step of the AES-128 key expansion: round key i from round key i-1.
  function automatic block_t next_round_key(block_t k, byte_t rcon);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = k;
    t  = {SBOX[w3[23:16]] ^ rcon, SBOX[w3[15:8]], SBOX[w3[7:0]], SBOX[w3[31:24]]};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

endpackage
