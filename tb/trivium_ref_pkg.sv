`timescale 1ns/1ps
// trivium_ref_pkg: reference model of Trivium for the testbenches, written
// straight from the cipher's specification with 1-based state indices
// s[1..288], one bit at a time, independent of the RTL's packed vectors.
package trivium_ref_pkg;

  class trivium_ref;
    bit s[1:288];

    // key[i-1] = K_i, iv[i-1] = IV_i; runs the 4*288 warm-up rounds
    function void init(bit [79:0] key, bit [79:0] iv, int warmup = 1152);
      bit z;
      foreach (s[i]) s[i] = 0;
      for (int i = 1; i <= 80; i++) s[i] = key[i-1];
      for (int i = 1; i <= 80; i++) s[93 + i] = iv[i-1];
      s[286] = 1; s[287] = 1; s[288] = 1;
      for (int r = 0; r < warmup; r++) z = next();
    endfunction

    function bit next();
      bit t1, t2, t3, z;
      t1 = s[66] ^ s[93];
      t2 = s[162] ^ s[177];
      t3 = s[243] ^ s[288];
      z  = t1 ^ t2 ^ t3;
      t1 = t1 ^ (s[91] & s[92]) ^ s[171];
      t2 = t2 ^ (s[175] & s[176]) ^ s[264];
      t3 = t3 ^ (s[286] & s[287]) ^ s[69];
      for (int i = 93; i >= 2; i--)   s[i] = s[i-1];
      s[1] = t3;
      for (int i = 177; i >= 95; i--) s[i] = s[i-1];
      s[94] = t1;
      for (int i = 288; i >= 179; i--) s[i] = s[i-1];
      s[178] = t2;
      return z;
    endfunction
  endclass

endpackage
