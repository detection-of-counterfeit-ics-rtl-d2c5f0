`timescale 1ns/1ps
// ic_protection: the counterfeit-protection circuit that sits in every IC.
//
// It holds a chip-unique Trivium key/IV pair in antifuse memory and, after
// every reset, leaks that chip's keystream through a bank of leakage circuits
// so that anyone with an EM probe can correlate it with the identification
// sequences the manufacturer publishes.
//   init_fsmd   programs the fuses once from `pin` / loads them after reset
//   af_counter  fuse address
//   af_memory   flag + key + IV fuses
//   key_iv_reg  key and IV registers
//   crypto_engine  calibration pattern, then keystream (leakage_en)
//   leakage_array  N_LC leakage circuits, all following leakage_en
// Programming: after reset on a fresh part, drive `pin` high for one cycle
// (start bit), then K_1..K_80, IV_1..IV_80, one bit per clock; reset again.
// After that reset: 161 cycles of loading, then CAL_LEN calibration cycles,
// keystream bit k on leakage_en in cycle 1152+k after crypto_en rose, and
// everything off once KS_BITS keystream bits have been sent.
//
// No fuse can be blown while rst_n is low: at power-up the FSMD outputs are
// undefined until reset has acted, and a stray write could not be undone.
// This guard is a choice of this design.
//
// The block structure follows the document's protection-circuit diagram.
// Ten leakage circuits is the count the document uses for its area estimate;
// the document fixes no count for the IC.
module ic_protection
  import cid_pkg::*;
#(
  parameter int unsigned N_LC       = 10,
  parameter int unsigned CAL_LEN    = 1000,
  parameter int unsigned KS_BITS = 50_000_000
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            pin,
  output logic            initialized,  // flag fuse as read at address 0
  output logic            crypto_en,
  output logic            leakage_en,
  output ce_phase_e       phase,
  output logic [N_LC-1:0] lc_en,        // inputs of the leakage circuits
  output logic [N_LC-1:0] lc_out
);

  localparam int unsigned CNT_W = (N_LC > 1) ? $clog2(N_LC) : 1;

  logic [AF_AW-1:0] addr;
  logic             af_we, af_wdata, af_rdata;
  logic             cnt_en, cnt_clr, key_we;
  fsmd_state_e      fs_state;
  key_t             key;
  iv_t              iv;

  init_fsmd u_fsmd (
    .clk, .rst_n, .pin,
    .af_rdata, .addr,
    .af_we, .af_wdata,
    .cnt_en, .cnt_clr, .key_we,
    .crypto_en,
    .state (fs_state)
  );

  af_counter #(.WIDTH(AF_AW)) u_counter (
    .clk, .rst_n,
    .clr (cnt_clr), .en (cnt_en),
    .count (addr)
  );

  af_memory u_afmem (
    .clk, .addr,
    .we (af_we && rst_n), .wdata (af_wdata),
    .rdata (af_rdata)
  );

  key_iv_reg u_keyiv (
    .clk, .rst_n,
    .we (key_we), .addr, .din (af_rdata),
    .key, .iv
  );

  crypto_engine #(.CAL_LEN(CAL_LEN), .KS_BITS(KS_BITS)) u_engine (
    .clk, .rst_n,
    .restart (1'b0),
    .crypto_en,
    .key, .iv,
    .leakage_en,
    .ks_bit (), .ks_valid (),
    .phase
  );

  leakage_array #(.N_LC(N_LC)) u_lcs (
    .leak_in  (leakage_en),
    .n_active (CNT_W'(N_LC - 1)),    // all circuits in use
    .lc_en,
    .lc_out
  );

  assign initialized = (fs_state == FS_CHECK) ? af_rdata : (fs_state inside {FS_LOAD, FS_RUN});

endmodule
