// aes_ref_pkg: software reference model of AES-128 for the testbenches.
//
// Written independently of the RTL: it works on a byte array, builds its
// S-box from log/antilog tables over the generator 3 at run time, and
// expands all eleven round keys up front. Used only for checking.
package aes_ref_pkg;

  typedef logic [7:0] bytes16_t [16];

  byte unsigned sb[256], isb[256];
  bit           ready = 0;

  function automatic byte unsigned mul2(byte unsigned a);
    return byte'((a << 1) ^ (a[7] ? 8'h1b : 8'h00));
  endfunction

  function automatic byte unsigned mul(byte unsigned a, byte unsigned b);
    byte unsigned p = 0;
    while (b != 0) begin
      if (b[0]) p ^= a;
      a = mul2(a);
      b >>= 1;
    end
    return p;
  endfunction

  function automatic void init();
    byte unsigned lg[256], alg[256];
    byte unsigned x, inv, s;
    if (ready) return;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      alg[i] = x;
      lg[x]  = byte'(i);
      x      = mul(x, 3);
    end
    for (int i = 0; i < 256; i++) begin
      inv = (i == 0) ? 8'h00 : alg[(255 - lg[i]) % 255];
      s   = inv;
      for (int k = 1; k < 5; k++) s ^= byte'((inv << k) | (inv >> (8 - k)));
      s ^= 8'h63;
      sb[i]  = s;
      isb[s] = byte'(i);
    end
    ready = 1;
  endfunction

  function automatic bytes16_t to_bytes(logic [127:0] v);
    bytes16_t b;
    for (int i = 0; i < 16; i++) b[i] = v[127-8*i -: 8];
    return b;
  endfunction

  function automatic logic [127:0] from_bytes(bytes16_t b);
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[127-8*i -: 8] = b[i];
    return v;
  endfunction

  function automatic void expand(logic [127:0] key, output bytes16_t rk [11]);
    byte unsigned w[176];
    byte unsigned t[4], tmp, rc;
    bytes16_t kb;
    init();
    kb = to_bytes(key);
    for (int i = 0; i < 16; i++) w[i] = kb[i];
    rc = 1;
    for (int i = 4; i < 44; i++) begin
      for (int j = 0; j < 4; j++) t[j] = w[4*(i-1)+j];
      if (i % 4 == 0) begin
        tmp = t[0]; t[0] = sb[t[1]] ^ rc; t[1] = sb[t[2]]; t[2] = sb[t[3]]; t[3] = sb[tmp];
        rc = mul2(rc);
      end
      for (int j = 0; j < 4; j++) w[4*i+j] = w[4*(i-4)+j] ^ t[j];
    end
    for (int r = 0; r < 11; r++)
      for (int j = 0; j < 16; j++) rk[r][j] = w[16*r+j];
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] key, logic [127:0] pt);
    bytes16_t rk [11];
    bytes16_t s, t;
    byte unsigned a0, a1, a2, a3;
    expand(key, rk);
    s = to_bytes(pt);
    for (int j = 0; j < 16; j++) s[j] ^= rk[0][j];
    for (int r = 1; r <= 10; r++) begin
      for (int j = 0; j < 16; j++) s[j] = sb[s[j]];
      for (int c = 0; c < 4; c++)
        for (int row = 0; row < 4; row++) t[4*c+row] = s[4*((c+row)%4)+row];
      s = t;
      if (r != 10)
        for (int c = 0; c < 4; c++) begin
          a0 = s[4*c]; a1 = s[4*c+1]; a2 = s[4*c+2]; a3 = s[4*c+3];
          s[4*c]   = mul(a0,2) ^ mul(a1,3) ^ a2 ^ a3;
          s[4*c+1] = a0 ^ mul(a1,2) ^ mul(a2,3) ^ a3;
          s[4*c+2] = a0 ^ a1 ^ mul(a2,2) ^ mul(a3,3);
          s[4*c+3] = mul(a0,3) ^ a1 ^ a2 ^ mul(a3,2);
        end
      for (int j = 0; j < 16; j++) s[j] ^= rk[r][j];
    end
    return from_bytes(s);
  endfunction

  function automatic logic [127:0] decrypt(logic [127:0] key, logic [127:0] ct);
    bytes16_t rk [11];
    bytes16_t s, t;
    byte unsigned a0, a1, a2, a3;
    expand(key, rk);
    s = to_bytes(ct);
    for (int r = 10; r >= 1; r--) begin
      for (int j = 0; j < 16; j++) s[j] ^= rk[r][j];
      if (r != 10)
        for (int c = 0; c < 4; c++) begin
          a0 = s[4*c]; a1 = s[4*c+1]; a2 = s[4*c+2]; a3 = s[4*c+3];
          s[4*c]   = mul(a0,14) ^ mul(a1,11) ^ mul(a2,13) ^ mul(a3,9);
          s[4*c+1] = mul(a0,9) ^ mul(a1,14) ^ mul(a2,11) ^ mul(a3,13);
          s[4*c+2] = mul(a0,13) ^ mul(a1,9) ^ mul(a2,14) ^ mul(a3,11);
          s[4*c+3] = mul(a0,11) ^ mul(a1,13) ^ mul(a2,9) ^ mul(a3,14);
        end
      for (int c = 0; c < 4; c++)
        for (int row = 0; row < 4; row++) t[4*((c+row)%4)+row] = s[4*c+row];
      for (int j = 0; j < 16; j++) s[j] = isb[t[j]];
    end
    for (int j = 0; j < 16; j++) s[j] ^= rk[0][j];
    return from_bytes(s);
  endfunction

endpackage
