`timescale 1ns/1ps
// crypto_engine: decides, cycle by cycle, which bit drives the leakage
// circuits of the protection circuit.
//
// When `crypto_en` rises out of reset the engine loads key and IV into its
// Trivium instance (cycle 0 follows) and from then on counts cycles:
//   cycles 0 .. CAL_LEN-1   calibration sequence 1,0,1,0,... (CE_CAL)
//   until warm-up is over   leakage held at 0                (CE_WAIT)
//   from cycle WARMUP on    Trivium keystream, one bit/clock (CE_KS)
//   after KS_BITS keystream bits everything stops, leakage 0 (CE_OFF)
// Keystream bit k is therefore leaked in cycle WARMUP+k (1152+k by default),
// which is the offset a published identification sequence refers to.
// KS_BITS = 0 never switches off. A `restart` pulse (synchronous) starts
// over: Trivium is reloaded and the cycle after the pulse is cycle 0 again
// (or the engine goes idle if crypto_en is low).
//
// From the document: one keystream bit per clock, a calibration sequence of
// alternating ones and zeros during the first L = 1000 cycles, and switching
// the circuit off after one second, once the 50 million keystream bits the
// manufacturer draws its sequences from have been sent (50 M cycles at
// 50 MHz, plus the warm-up). The overlap of
// calibration with Trivium's warm-up, the idle gap between them and the
// cycle numbering are this design's choices.
module crypto_engine
  import cid_pkg::*;
#(
  parameter int unsigned CAL_LEN    = 1000,
  parameter int unsigned KS_BITS    = 50_000_000,
  parameter int unsigned WARMUP     = TRIV_WARMUP
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      restart,     // synchronous return to idle
  input  logic      crypto_en,   // start (level)
  input  key_t      key,
  input  iv_t       iv,
  output logic      leakage_en,  // bit fed to the leakage circuits
  output logic      ks_bit,      // raw keystream bit
  output logic      ks_valid,    // keystream is being leaked
  output ce_phase_e phase
);

  typedef enum logic [1:0] {ST_IDLE, ST_RUN, ST_OFF} st_e;

  st_e         st;
  logic [31:0] cyc;
  logic        triv_load, triv_en, triv_valid;

  assign triv_load = crypto_en && ((st == ST_IDLE) || restart);
  assign triv_en   = (st == ST_RUN);

  trivium #(.WARMUP(WARMUP)) u_trivium (
    .clk, .rst_n,
    .load     (triv_load),
    .key, .iv,
    .en       (triv_en),
    .ks_bit,
    .ks_valid (triv_valid)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= ST_IDLE;
      cyc <= '0;
    end else if (restart) begin
      st  <= crypto_en ? ST_RUN : ST_IDLE;
      cyc <= '0;
    end else begin
      unique case (st)
        ST_IDLE: if (crypto_en) begin
          st  <= ST_RUN;
          cyc <= '0;
        end
        ST_RUN: begin
          cyc <= cyc + 1'b1;
          if (KS_BITS != 0 && cyc == 32'(WARMUP + KS_BITS - 1)) st <= ST_OFF;
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    if (st == ST_IDLE)               phase = CE_IDLE;
    else if (st == ST_OFF)           phase = CE_OFF;
    else if (cyc < 32'(CAL_LEN))     phase = CE_CAL;
    else if (triv_valid)             phase = CE_KS;
    else                             phase = CE_WAIT;
  end

  assign ks_valid = (phase == CE_KS);

  always_comb begin
    unique case (phase)
      CE_CAL:  leakage_en = ~cyc[0];           // 1,0,1,0,... from cycle 0
      CE_KS:   leakage_en = ks_bit;
      default: leakage_en = 1'b0;
    endcase
  end

endmodule
