`timescale 1ns/1ps
// aes128_core: iterative AES-128 encryption, one round per enabled clock.
//
// With `ce` high and the core idle, `start` captures din ^ key (the initial
// AddRoundKey) and the key. Each following `ce` cycle performs one round and
// derives the next round key on the fly; the tenth round leaves MixColumns
// out. After ten rounds `dout` holds the ciphertext and `done` is high for
// one cycle. Cycles with `ce` low freeze the core, which is how a load
// circuit is paused. A block takes 11 enabled cycles, start included.
//
// The document only names AES-128 cores as load generators; this
// round-per-cycle structure is this design's own choice.
module aes128_core
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] din,
  output logic         busy,
  output logic         done,
  output logic [127:0] dout
);

  logic [127:0] st, rk, rk_next;
  logic [3:0]   round;
  logic [7:0]   rcon;

  always_comb begin
    unique case (round)
      4'd1: rcon = 8'h01;  4'd2: rcon = 8'h02;  4'd3: rcon = 8'h04;
      4'd4: rcon = 8'h08;  4'd5: rcon = 8'h10;  4'd6: rcon = 8'h20;
      4'd7: rcon = 8'h40;  4'd8: rcon = 8'h80;  4'd9: rcon = 8'h1B;
      4'd10: rcon = 8'h36;
      default: rcon = 8'h00;
    endcase
  end

  assign rk_next = next_round_key(rk, rcon);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= '0;
      rk    <= '0;
      round <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      dout  <= '0;
    end else begin
      done <= 1'b0;
      if (ce) begin
        if (!busy) begin
          if (start) begin
            st    <= din ^ key;
            rk    <= key;
            round <= 4'd1;
            busy  <= 1'b1;
          end
        end else begin
          st <= round_fn(st, round == 4'd10) ^ rk_next;
          rk <= rk_next;
          if (round == 4'd10) begin
            dout  <= round_fn(st, 1'b1) ^ rk_next;
            busy  <= 1'b0;
            done  <= 1'b1;
            round <= '0;
          end else begin
            round <= round + 1'b1;
          end
        end
      end
    end
  end

endmodule
