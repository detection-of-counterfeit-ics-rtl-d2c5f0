`timescale 1ns/1ps
// cid_pkg: types and constants shared by the counterfeit-identification
// circuit (antifuse-initialised Trivium that leaks its keystream through
// leakage circuits) and by the FPGA proof-of-concept system around it.
//
// Key and IV are 80 bits each, as Trivium requires. The antifuse memory holds
// one "initialised" flag at address 0, the key at addresses 1..80 and the IV
// at addresses 81..160. Bit i-1 of the key/IV vector is Trivium's K_i / IV_i.
// The UART command codes of the proof-of-concept system are this design's own
// choice (ASCII letters).
package cid_pkg;

  localparam int unsigned KEY_BITS = 80;
  localparam int unsigned IV_BITS  = 80;
  localparam int unsigned AF_DEPTH = 1 + KEY_BITS + IV_BITS;   // 161 fuse bits
  localparam int unsigned AF_AW    = $clog2(AF_DEPTH);         // 8 address bits

  typedef logic [KEY_BITS-1:0] key_t;
  typedef logic [IV_BITS-1:0]  iv_t;

  // Trivium: 288-bit state, 4 x 288 warm-up rounds before the first output.
  localparam int unsigned TRIV_STATE  = 288;
  localparam int unsigned TRIV_WARMUP = 4 * TRIV_STATE;

  // Initialisation controller (Algorithm 1).
  typedef enum logic [2:0] {
    FS_CHECK   = 3'd0,  // read the "IC initialised" fuse
    FS_WAIT    = 3'd1,  // uninitialised: wait for the start '1' on the pin
    FS_PROGRAM = 3'd2,  // burn n+m key/IV bits taken from the pin
    FS_FINAL   = 3'd3,  // burn the "IC initialised" fuse
    FS_DONE    = 3'd4,  // programmed, idle until the next reset
    FS_LOAD    = 3'd5,  // initialised: copy key/IV fuses into registers
    FS_RUN     = 3'd6   // crypto engine enabled
  } fsmd_state_e;

  // What the crypto engine is sending to the leakage circuits.
  typedef enum logic [2:0] {
    CE_IDLE = 3'd0,     // not enabled
    CE_CAL  = 3'd1,     // calibration sequence 1010...
    CE_WAIT = 3'd2,     // calibration over, Trivium still warming up
    CE_KS   = 3'd3,     // keystream, one bit per clock
    CE_OFF  = 3'd4      // switched off after KS_BITS keystream bits
  } ce_phase_e;

  // UART commands of the proof-of-concept system.
  localparam logic [7:0] CMD_KEY  = 8'h4B;  // 'K' + 10 key bytes, K1..K8 first
  localparam logic [7:0] CMD_IV   = 8'h49;  // 'I' + 10 IV bytes, IV1..IV8 first
  localparam logic [7:0] CMD_NLC  = 8'h4E;  // 'N' + 1 byte: n, LCs 0..n active
  localparam logic [7:0] CMD_LOAD = 8'h4C;  // 'L' + 1 byte: bit 0 enables loads

endpackage
