`timescale 1ns/1ps
// load_circuit: background load made of one AES-128 core in CBC mode that
// keeps encrypting, paused and resumed at random by its own 128-bit LFSR.
//
// While `enable` is high the AES core runs in the cycles where the LFSR
// output is 1 and freezes in the others, so the cores of different load
// circuits drift apart. Block i is E_K(PT ^ C_{i-1}) with C_{-1} = 0: the
// fixed plaintext PT is chained with the previous ciphertext as in CBC.
// `blocks` counts finished blocks and `ct` is the last ciphertext. The LFSR
// runs whenever the circuit is out of reset, and the load circuits ignore
// the auto-reset of the cipher under test.
// KEY, PT and LFSR_SEED default to values derived from INDEX through a
// 64-bit mixing function, so every instance is different.
//
// From the document: AES-128 in CBC mode on random initial plaintexts,
// paused/enabled by a dedicated 128-bit LFSR with a random seed, one common
// enable. How the plaintext stream continues after the first block and the
// seed derivation are this design's choices.
module load_circuit
  import aes_pkg::*;
#(
  parameter int unsigned  INDEX     = 0,
  parameter logic [127:0] KEY       = seed128(INDEX, 1),
  parameter logic [127:0] PT        = seed128(INDEX, 2),
  parameter logic [127:0] LFSR_SEED = seed128(INDEX, 3) | 128'h1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enable,   // common enable of all load circuits
  output logic         active,   // AES core clocked this cycle
  output logic [127:0] ct,
  output logic [31:0]  blocks
);

  logic         gate, busy, done;
  logic [127:0] chain, dout;
  logic [127:0] lfsr_state;

  lfsr128 #(.SEED(LFSR_SEED)) u_lfsr (
    .clk, .rst_n,
    .en    (1'b1),
    .state (lfsr_state),
    .out   (gate)
  );

  assign active = enable && gate;

  aes128_core u_aes (
    .clk, .rst_n,
    .ce    (active),
    .start (!done),
    .key   (KEY),
    .din   (PT ^ chain),
    .busy, .done, .dout
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chain  <= '0;
      blocks <= '0;
    end else if (done) begin
      chain  <= dout;
      blocks <= blocks + 1'b1;
    end
  end

  assign ct = chain;

  logic unused;
  assign unused = ^{lfsr_state[126:0], busy};

endmodule
