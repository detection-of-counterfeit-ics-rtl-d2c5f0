`timescale 1ns/1ps
// trivium: the Trivium stream cipher (80-bit key, 80-bit IV, 288-bit state),
// producing one keystream bit per enabled clock.
//
// The 288 state bits are kept as s[287:0] with s[i-1] holding the cipher's
// s_i. A pulse on `load` writes key and IV into the state (K_i = key[i-1],
// IV_i = iv[i-1]) and clears the round counter. Every cycle with `en` high
// performs one state update. The first WARMUP updates (4 x 288) produce no
// output; after them `ks_valid` is high and `ks_bit` is the keystream bit z
// of the current state, combinationally, so keystream bit k is presented in
// the cycle after k further enabled updates.
//
// The cipher itself is the published Trivium design: its use as the crypto
// engine follows the document; the load/enable interface, the warm-up counter
// and one update per clock are this implementation's choices.
module trivium
  import cid_pkg::*;
#(
  parameter int unsigned WARMUP = TRIV_WARMUP
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,      // write key/IV into the state, restart warm-up
  input  key_t  key,
  input  iv_t   iv,
  input  logic  en,        // perform one state update this cycle
  output logic  ks_bit,    // keystream bit z (valid when ks_valid)
  output logic  ks_valid   // warm-up finished
);

  localparam int unsigned CW = $clog2(WARMUP + 1);

  logic [TRIV_STATE-1:0] s;
  logic [CW-1:0]         rounds;
  logic                  t1, t2, t3, n1, n2, n3;

  // s_i is s[i-1]
  always_comb begin
    t1 = s[65]  ^ s[92];
    t2 = s[161] ^ s[176];
    t3 = s[242] ^ s[287];
    n1 = t1 ^ (s[90]  & s[91])  ^ s[170];
    n2 = t2 ^ (s[174] & s[175]) ^ s[263];
    n3 = t3 ^ (s[285] & s[286]) ^ s[68];
  end

  assign ks_bit   = t1 ^ t2 ^ t3;
  assign ks_valid = (rounds == CW'(WARMUP));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s      <= '0;
      rounds <= '0;
    end else if (load) begin
      s              <= '0;
      s[79:0]        <= key;             // s_1..s_80   = K_1..K_80
      s[172:93]      <= iv;              // s_94..s_173 = IV_1..IV_80
      s[287:285]     <= 3'b111;          // s_286..s_288 = 1
      rounds         <= '0;
    end else if (en) begin
      s[92:0]    <= {s[91:0],    n3};    // s_1   <- t3
      s[176:93]  <= {s[175:93],  n1};    // s_94  <- t1
      s[287:177] <= {s[286:177], n2};    // s_178 <- t2
      if (!ks_valid) rounds <= rounds + 1'b1;
    end
  end

endmodule
