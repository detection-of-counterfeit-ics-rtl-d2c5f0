`timescale 1ns/1ps
// aes_pkg: AES-128 helper functions for the load circuits, plus the
// seed-mixing function that gives every load circuit its own key, plaintext
// and LFSR seed.
//
// The S-box is not pasted as a table: gen_sbox() computes it at elaboration
// time from its definition, S(x) = A * x^-1 + 0x63 in GF(2^8) with the AES
// polynomial x^8+x^4+x^3+x+1 (0^-1 taken as 0), where A is the affine map
// b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4). Blocks are 128-bit
// vectors whose bits [127:120] are byte 0 (FIPS-197 order); the state is
// column-major, byte r+4c in row r, column c.
package aes_pkg;

  typedef logic [255:0][7:0] sbox_t;

  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1B : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p = '0;
    logic [7:0] aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] b, input int n);
    return (b << n) | (b >> (8 - n));
  endfunction

  function automatic sbox_t gen_sbox();
    sbox_t      t;
    logic [7:0] inv, sq;
    for (int x = 0; x < 256; x++) begin
      // x^254 = x^-1: square-and-multiply over the exponent 11111110b
      inv = 8'h01;
      sq  = 8'(x);
      for (int e = 0; e < 8; e++) begin
        if (e != 0) inv = gmul(inv, sq);
        sq = gmul(sq, sq);
      end
      if (x == 0) inv = 8'h00;
      t[x] = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
    end
    return t;
  endfunction

  localparam sbox_t SBOX = gen_sbox();

  function automatic logic [31:0] sub_word(input logic [31:0] w);
    return {SBOX[w[31:24]], SBOX[w[23:16]], SBOX[w[15:8]], SBOX[w[7:0]]};
  endfunction

  // Next round key from the current one (AES-128 key schedule).
  function automatic logic [127:0] next_round_key(input logic [127:0] rk,
                                                  input logic [7:0]   rcon);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = rk;
    t  = sub_word({w3[23:0], w3[31:24]}) ^ {rcon, 24'h0};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  // SubBytes + ShiftRows (+ MixColumns unless last), without AddRoundKey.
  function automatic logic [127:0] round_fn(input logic [127:0] st, input logic last);
    logic [15:0][7:0] b, sr;
    logic [127:0]     out;
    for (int i = 0; i < 16; i++) b[15 - i] = SBOX[st[127 - 8*i -: 8]];   // b[15-i] = byte i
    // ShiftRows: row r of column c comes from column (c + r) mod 4
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sr[15 - (r + 4*c)] = b[15 - (r + 4*((c + r) % 4))];
    for (int c = 0; c < 4; c++) begin
      logic [7:0] a0, a1, a2, a3;
      a0 = sr[15 - 4*c]; a1 = sr[14 - 4*c]; a2 = sr[13 - 4*c]; a3 = sr[12 - 4*c];
      if (last) out[127 - 32*c -: 32] = {a0, a1, a2, a3};
      else      out[127 - 32*c -: 32] = {xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3,
                                         a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3,
                                         a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3),
                                         (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3)};
    end
    return out;
  endfunction

  // 64-bit mixer (SplitMix64 finaliser) used to derive per-instance seeds.
  function automatic logic [63:0] mix64(input logic [63:0] z0);
    logic [63:0] z = z0 + 64'h9E3779B97F4A7C15;
    z = (z ^ (z >> 30)) * 64'hBF58476D1CE4E5B9;
    z = (z ^ (z >> 27)) * 64'h94D049BB133111EB;
    return z ^ (z >> 31);
  endfunction

  function automatic logic [127:0] seed128(input int unsigned idx, input int unsigned which);
    logic [63:0] base = {32'(which), 32'(idx)};
    return {mix64(base), mix64(base ^ 64'h5555_AAAA_0F0F_F0F0)};
  endfunction

endpackage
