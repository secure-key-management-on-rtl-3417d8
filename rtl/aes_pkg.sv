// aes_pkg: shared AES-128 (FIPS-197) types, tables and round functions for
// the cipher zone of the security module.
//
// A 128-bit block is held in FIPS-197 byte order: byte 0 is bits [127:120],
// and byte i sits at row i%4, column i/4 of the state. The S-box and its
// inverse are computed at elaboration time from their definition (the
// multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1 followed by the
// affine map), so no table has to be typed in; in hardware each lookup is a
// 256-entry ROM. All round functions are pure combinational functions used by
// the iterative cipher and decipher cores (one round per clock cycle).
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;
  typedef byte_t        sbox_t [256];

  // Multiply by x in GF(2^8).
  function automatic byte_t xtime(input byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) multiply (shift-and-add).
  function automatic byte_t gmul(input byte_t a, input byte_t b);
    byte_t p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0).
  function automatic byte_t ginv(input byte_t a);
    byte_t r, base;
    r    = 8'h01;
    base = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gmul(r, base);  // exponent 254 = 0b11111110
      base = gmul(base, base);
    end
    return r;
  endfunction

  function automatic byte_t affine(input byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8];
    return r ^ 8'h63;
  endfunction

  function automatic sbox_t gen_sbox();
    sbox_t t;
    for (int i = 0; i < 256; i++) t[i] = affine(ginv(byte_t'(i)));
    return t;
  endfunction

  function automatic sbox_t gen_inv_sbox();
    sbox_t f, t;
    f = gen_sbox();
    for (int i = 0; i < 256; i++) t[f[i]] = byte_t'(i);
    return t;
  endfunction

  localparam sbox_t SBOX     = gen_sbox();
  localparam sbox_t INV_SBOX = gen_inv_sbox();

  function automatic byte_t get_byte(input block_t s, input int i);
    return s[127 - 8*i -: 8];
  endfunction

  function automatic block_t sub_bytes(input block_t s);
    block_t r;
    for (int i = 0; i < 16; i++) r[127 - 8*i -: 8] = SBOX[get_byte(s, i)];
    return r;
  endfunction

  function automatic block_t inv_sub_bytes(input block_t s);
    block_t r;
    for (int i = 0; i < 16; i++) r[127 - 8*i -: 8] = INV_SBOX[get_byte(s, i)];
    return r;
  endfunction

  // Row r is rotated left by r columns: new (r,c) = old (r,c+r).
  function automatic block_t shift_rows(input block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(4*c + row) -: 8] = get_byte(s, 4*((c + row) % 4) + row);
    return r;
  endfunction

  function automatic block_t inv_shift_rows(input block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(4*((c + row) % 4) + row) -: 8] = get_byte(s, 4*c + row);
    return r;
  endfunction

  function automatic block_t mix_columns(input block_t s);
    block_t r;
    byte_t a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c); a1 = get_byte(s, 4*c+1);
      a2 = get_byte(s, 4*c+2); a3 = get_byte(s, 4*c+3);
      r[127 - 8*(4*c)   -: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      r[127 - 8*(4*c+1) -: 8] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
      r[127 - 8*(4*c+2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
      r[127 - 8*(4*c+3) -: 8] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
    end
    return r;
  endfunction

  function automatic block_t inv_mix_columns(input block_t s);
    block_t r;
    byte_t a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c); a1 = get_byte(s, 4*c+1);
      a2 = get_byte(s, 4*c+2); a3 = get_byte(s, 4*c+3);
      r[127 - 8*(4*c)   -: 8] = gmul(a0, 8'h0e) ^ gmul(a1, 8'h0b) ^ gmul(a2, 8'h0d) ^ gmul(a3, 8'h09);
      r[127 - 8*(4*c+1) -: 8] = gmul(a0, 8'h09) ^ gmul(a1, 8'h0e) ^ gmul(a2, 8'h0b) ^ gmul(a3, 8'h0d);
      r[127 - 8*(4*c+2) -: 8] = gmul(a0, 8'h0d) ^ gmul(a1, 8'h09) ^ gmul(a2, 8'h0e) ^ gmul(a3, 8'h0b);
      r[127 - 8*(4*c+3) -: 8] = gmul(a0, 8'h0b) ^ gmul(a1, 8'h0d) ^ gmul(a2, 8'h09) ^ gmul(a3, 8'h0e);
    end
    return r;
  endfunction

  // SubWord(RotWord(w)) on a 32-bit word.
  function automatic logic [31:0] sub_rot_word(input logic [31:0] w);
    return {SBOX[w[23:16]], SBOX[w[15:8]], SBOX[w[7:0]], SBOX[w[31:24]]};
  endfunction

  // Next AES-128 round key from the current one and the round constant.
  function automatic block_t next_round_key(input block_t k, input byte_t rcon);
    logic [31:0] w0, w1, w2, w3;
    w0 = k[127:96] ^ sub_rot_word(k[31:0]) ^ {rcon, 24'h0};
    w1 = k[95:64] ^ w0;
    w2 = k[63:32] ^ w1;
    w3 = k[31:0]  ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  // Previous round key from the current one (inverse key schedule);
  // rcon is the constant that was used to derive the current key.
  function automatic block_t prev_round_key(input block_t k, input byte_t rcon);
    logic [31:0] w0, w1, w2, w3;
    w3 = k[31:0]  ^ k[63:32];
    w2 = k[63:32] ^ k[95:64];
    w1 = k[95:64] ^ k[127:96];
    w0 = k[127:96] ^ sub_rot_word(w3) ^ {rcon, 24'h0};
    return {w0, w1, w2, w3};
  endfunction

  // Inverse of xtime, used to step the round constant backwards.
  function automatic byte_t xtime_inv(input byte_t b);
    return {1'b0, b[7:1]} ^ (b[0] ? 8'h8d : 8'h00);
  endfunction

endpackage
