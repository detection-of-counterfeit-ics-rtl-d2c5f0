`timescale 1ns/1ps
// aes_ref_pkg: software-style AES-128 reference for the testbenches. The
// S-box is built from exponent/logarithm tables of the generator 3, a
// different construction from the RTL's, and the cipher works on a byte
// array with a fully expanded key schedule.
package aes_ref_pkg;

  function automatic byte unsigned mul2(byte unsigned a);
    return byte'((a << 1) ^ ((a & 8'h80) != 0 ? 8'h1b : 8'h00));
  endfunction

  function automatic void make_sbox(output byte unsigned sb[256]);
    byte unsigned ex[256], lg[256], x, inv, b;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      ex[i] = x; lg[x] = byte'(i);
      x = x ^ mul2(x);                         // multiply by 3
    end
    for (int v = 0; v < 256; v++) begin
      inv = (v == 0) ? 8'h00 : ex[(255 - lg[v]) % 255];
      b = inv;
      for (int k = 1; k <= 4; k++) b ^= byte'((inv << k) | (inv >> (8 - k)));
      sb[v] = b ^ 8'h63;
    end
  endfunction

  function automatic bit [127:0] encrypt(bit [127:0] key, bit [127:0] pt);
    byte unsigned sb[256], w[176], st[16], t[16], tmp[4], rot[4], rc;
    make_sbox(sb);
    for (int i = 0; i < 16; i++) w[i] = key[127 - 8*i -: 8];
    rc = 1;
    for (int i = 16; i < 176; i += 4) begin
      for (int j = 0; j < 4; j++) tmp[j] = w[i - 4 + j];
      if (i % 16 == 0) begin
        for (int j = 0; j < 4; j++) rot[j] = sb[tmp[(j + 1) % 4]];
        rot[0] ^= rc;
        tmp = rot;
        rc = mul2(rc);
      end
      for (int j = 0; j < 4; j++) w[i + j] = w[i - 16 + j] ^ tmp[j];
    end
    for (int i = 0; i < 16; i++) st[i] = pt[127 - 8*i -: 8] ^ w[i];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) t[i] = sb[st[i]];
      for (int c = 0; c < 4; c++)                  // ShiftRows
        for (int row = 0; row < 4; row++) st[4*c + row] = t[4*((c + row) % 4) + row];
      if (r != 10)
        for (int c = 0; c < 4; c++) begin          // MixColumns
          byte unsigned a0, a1, a2, a3;
          a0 = st[4*c]; a1 = st[4*c+1]; a2 = st[4*c+2]; a3 = st[4*c+3];
          st[4*c]   = mul2(a0) ^ mul2(a1) ^ a1 ^ a2 ^ a3;
          st[4*c+1] = a0 ^ mul2(a1) ^ mul2(a2) ^ a2 ^ a3;
          st[4*c+2] = a0 ^ a1 ^ mul2(a2) ^ mul2(a3) ^ a3;
          st[4*c+3] = mul2(a0) ^ a0 ^ a1 ^ a2 ^ mul2(a3);
        end
      for (int i = 0; i < 16; i++) st[i] ^= w[16*r + i];
    end
    for (int i = 0; i < 16; i++) encrypt[127 - 8*i -: 8] = st[i];
  endfunction

endpackage
