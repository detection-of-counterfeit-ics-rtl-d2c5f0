`timescale 1ns/1ps
// lfsr128: 128-bit Fibonacci linear-feedback shift register.
//
// Shifts left by one on every clock with `en` high; the bit shifted in is
// the XOR of bits 127, 125, 100 and 98 (taps 128, 126, 101, 99, a maximal-
// length polynomial x^128 + x^126 + x^101 + x^99 + 1). Reset loads SEED, which
// must not be zero. `out` is bit 127, a pseudo-random on/off pattern.
// The document asks for a dedicated 128-bit LFSR with a random seed per load
// circuit; the polynomial and the output bit are this design's choices.
module lfsr128 #(
  parameter logic [127:0] SEED = 128'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3210
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [127:0] state,
  output logic         out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {state[126:0], state[127] ^ state[125] ^ state[100] ^ state[98]};
  end

  assign out = state[127];

  initial assert (SEED != '0) else $error("lfsr128: SEED must not be zero");

endmodule
