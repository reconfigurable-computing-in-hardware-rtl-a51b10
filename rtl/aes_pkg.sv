// aes_pkg: types and GF(2^8) arithmetic shared by the AES-128 blocks.
//
// The 128-bit state follows FIPS-197 byte order: byte 0 is bits [127:120],
// and byte i sits at row (i % 4), column (i / 4) of the 4x4 state matrix.
// The S-box is not stored as a table: sbox() computes the multiplicative
// inverse in GF(2^8) (as a^254) followed by the affine transform, which is
// the definition the standard tables are generated from. inv_sbox() applies
// the inverse affine transform and then the same inversion.
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;


  // Multiply by x (0x02) in GF(2^8) modulo x^8 + x^4 + x^3 + x + 1.
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product, shift-and-add.
  function automatic byte_t gmul(byte_t a, byte_t b);
    byte_t p;
    byte_t aa;
    p  = 8'h00;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // Multiplicative inverse, a^254 (0 maps to 0).
  function automatic byte_t ginv(byte_t a);
    byte_t r;
    byte_t p;
    r = 8'h01;
    p = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gmul(r, p);   // 254 = 0b1111_1110
      p = gmul(p, p);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(byte_t a, int unsigned n);
    return byte_t'((a << n) | (a >> (8 - n)));
  endfunction

  function automatic byte_t sbox(byte_t a);
    byte_t b;
    b = ginv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic byte_t inv_sbox(byte_t a);
    byte_t b;
    b = rotl8(a, 1) ^ rotl8(a, 3) ^ rotl8(a, 6) ^ 8'h05;
    return ginv(b);
  endfunction

  // Byte i of a state (FIPS-197 order).
  function automatic byte_t get_byte(block_t s, int unsigned i);
    return s[127 - 8*i -: 8];
  endfunction

  // One column (4 bytes) through MixColumns.
  function automatic logic [31:0] mix_col(logic [31:0] c);
    byte_t a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3),
            (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  // One column through InvMixColumns (coefficients 0e 0b 0d 09).
  function automatic logic [31:0] inv_mix_col(logic [31:0] c);
    byte_t a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {gmul(a0, 8'h0e) ^ gmul(a1, 8'h0b) ^ gmul(a2, 8'h0d) ^ gmul(a3, 8'h09),
            gmul(a0, 8'h09) ^ gmul(a1, 8'h0e) ^ gmul(a2, 8'h0b) ^ gmul(a3, 8'h0d),
            gmul(a0, 8'h0d) ^ gmul(a1, 8'h09) ^ gmul(a2, 8'h0e) ^ gmul(a3, 8'h0b),
            gmul(a0, 8'h0b) ^ gmul(a1, 8'h0d) ^ gmul(a2, 8'h09) ^ gmul(a3, 8'h0e)};
  endfunction

  function automatic block_t sub_bytes(block_t s);
    block_t r;
    for (int i = 0; i < 16; i++) r[127 - 8*i -: 8] = sbox(s[127 - 8*i -: 8]);
    return r;
  endfunction

  function automatic block_t inv_sub_bytes(block_t s);
    block_t r;
    for (int i = 0; i < 16; i++) r[127 - 8*i -: 8] = inv_sbox(s[127 - 8*i -: 8]);
    return r;
  endfunction

  // Row r is rotated left by r positions: out(r, c) = in(r, (c + r) % 4).
  function automatic block_t shift_rows(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(4*c + row) -: 8] = s[127 - 8*(4*((c + row) % 4) + row) -: 8];
    return r;
  endfunction

  function automatic block_t inv_shift_rows(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(4*((c + row) % 4) + row) -: 8] = s[127 - 8*(4*c + row) -: 8];
    return r;
  endfunction

  function automatic block_t mix_columns(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++) r[127 - 32*c -: 32] = mix_col(s[127 - 32*c -: 32]);
    return r;
  endfunction

  function automatic block_t inv_mix_columns(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++) r[127 - 32*c -: 32] = inv_mix_col(s[127 - 32*c -: 32]);
    return r;
  endfunction

  // Round constant of key-expansion step n (1..10).
  function automatic byte_t rcon(int unsigned n);
    byte_t r;
    r = 8'h01;
    for (int unsigned i = 1; i < n; i++) r = xtime(r);
    return r;
  endfunction

  // SubWord(RotWord(w)) ^ Rcon, the non-linear part of key expansion.
  function automatic logic [31:0] key_core(logic [31:0] w, byte_t rc);
    return {sbox(w[23:16]) ^ rc, sbox(w[15:8]), sbox(w[7:0]), sbox(w[31:24])};
  endfunction

  // Round key n from round key n-1.
  function automatic block_t next_round_key(block_t k, byte_t rc);
    logic [31:0] w0, w1, w2, w3;
    {w0, w1, w2, w3} = k;
    w0 = w0 ^ key_core(w3, rc);
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  // Round key n-1 from round key n (key schedule run backwards).
  function automatic block_t prev_round_key(block_t k, byte_t rc);
    logic [31:0] w0, w1, w2, w3;
    logic [31:0] p0, p1, p2, p3;
    {w0, w1, w2, w3} = k;
    p3 = w3 ^ w2;
    p2 = w2 ^ w1;
    p1 = w1 ^ w0;
    p0 = w0 ^ key_core(p3, rc);
    return {p0, p1, p2, p3};
  endfunction

endpackage
