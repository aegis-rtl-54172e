// aes_ref_pkg -- reference AES-128 encryption for testbenches.
//
// Straightforward FIPS-197 model: full key expansion first, then ten rounds
// on a 4x4 byte state. The S-box is built once from its definition (inverse
// by search, then the affine map), independently of the RTL's formulation.
package aes_ref_pkg;

  function automatic byte unsigned mul(byte unsigned a, byte unsigned b);
    byte unsigned p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b & 1) p ^= a;
      a = (a & 8'h80) ? ((a << 1) ^ 8'h1b) : (a << 1);
      b >>= 1;
    end
    return p;
  endfunction

  function automatic byte unsigned sb(byte unsigned x);
    byte unsigned inv = 0, r;
    if (x != 0)
      for (int c = 1; c < 256; c++)
        if (mul(x, byte'(c)) == 1) inv = byte'(c);
    r = 8'h63;
    for (int i = 0; i < 8; i++) begin
      bit v;
      v = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
      r[i] = r[i] ^ v;
    end
    return r;
  endfunction

  function automatic logic [127:0] aes128(logic [127:0] key, logic [127:0] pt);
    byte unsigned sbox [256];
    byte unsigned w [176];
    byte unsigned s [16], t [16];
    byte unsigned rc;
    logic [127:0] out;
    for (int i = 0; i < 256; i++) sbox[i] = sb(byte'(i));
    for (int i = 0; i < 16; i++) w[i] = key[127-8*i -: 8];
    rc = 1;
    for (int i = 16; i < 176; i += 4) begin
      byte unsigned a0, a1, a2, a3;
      a0 = w[i-4]; a1 = w[i-3]; a2 = w[i-2]; a3 = w[i-1];
      if (i % 16 == 0) begin
        byte unsigned tmp;
        tmp = a0;
        a0 = sbox[a1] ^ rc; a1 = sbox[a2]; a2 = sbox[a3]; a3 = sbox[tmp];
        rc = mul(rc, 2);
      end
      w[i] = w[i-16] ^ a0; w[i+1] = w[i-15] ^ a1; w[i+2] = w[i-14] ^ a2; w[i+3] = w[i-13] ^ a3;
    end
    for (int i = 0; i < 16; i++) s[i] = pt[127-8*i -: 8] ^ w[i];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) t[i] = sbox[s[i]];
      for (int c = 0; c < 4; c++)
        for (int row = 0; row < 4; row++)
          s[4*c + row] = t[4*((c + row) % 4) + row];
      if (r != 10)
        for (int c = 0; c < 4; c++) begin
          byte unsigned a [4];
          for (int k = 0; k < 4; k++) a[k] = s[4*c + k];
          for (int k = 0; k < 4; k++)
            s[4*c + k] = mul(a[k], 2) ^ mul(a[(k+1)%4], 3) ^ a[(k+2)%4] ^ a[(k+3)%4];
        end
      for (int i = 0; i < 16; i++) s[i] ^= w[16*r + i];
    end
    for (int i = 0; i < 16; i++) out[127-8*i -: 8] = s[i];
    return out;
  endfunction

endpackage
