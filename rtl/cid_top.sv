`timescale 1ns/1ps
// cid_top: counterfeit-IC identification through public identification
// sequences leaked over the EM side channel: both hardware designs, side by
// side on one clock.
//
//  ic_*   ic_protection: the circuit each protected IC carries. A one-time
//         programming sequence on `ic_pin` writes the chip's key/IV into
//         antifuse memory; after every reset the chip leaks a calibration
//         pattern and then its Trivium keystream through leakage circuits.
//  poc_*  poc_system: the FPGA evaluation platform, whose key/IV, number of
//         active leakage circuits and AES load are set over a UART, and which
//         restarts the cipher periodically with a scope trigger.
// The two share nothing but the clock and reset (both run at 50 MHz in the
// document). Parameters are passed down unchanged; their defaults are the
// document's numbers where it gives any.
module cid_top
  import cid_pkg::*;
#(
  parameter int unsigned IC_N_LC           = 10,
  parameter int unsigned CAL_LEN           = 1000,
  parameter int unsigned IC_KS_BITS     = 50_000_000,
  parameter int unsigned POC_N_LOAD        = 40,
  parameter int unsigned POC_N_LC          = 64,
  parameter int unsigned CLKS_PER_BIT      = 434,
  parameter int unsigned AUTO_RESET_PERIOD = 550_000_000
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // protected IC
  input  logic                  ic_pin,
  output logic                  ic_initialized,
  output logic                  ic_crypto_en,
  output logic                  ic_leakage_en,
  output ce_phase_e             ic_phase,
  output logic [IC_N_LC-1:0]    ic_lc_en,
  output logic [IC_N_LC-1:0]    ic_lc_out,
  // proof-of-concept system
  input  logic                  poc_uart_rx,
  output logic                  poc_trigger,
  output logic                  poc_leakage_en,
  output ce_phase_e             poc_phase,
  output logic [POC_N_LC-1:0]   poc_lc_en,
  output logic [POC_N_LC-1:0]   poc_lc_out,
  output logic [POC_N_LOAD-1:0] poc_load_active,
  output logic [127:0]          poc_load_digest
);

  ic_protection #(
    .N_LC       (IC_N_LC),
    .CAL_LEN    (CAL_LEN),
    .KS_BITS (IC_KS_BITS)
  ) u_ic (
    .clk, .rst_n,
    .pin         (ic_pin),
    .initialized (ic_initialized),
    .crypto_en   (ic_crypto_en),
    .leakage_en  (ic_leakage_en),
    .phase       (ic_phase),
    .lc_en       (ic_lc_en),
    .lc_out      (ic_lc_out)
  );

  poc_system #(
    .N_LOAD            (POC_N_LOAD),
    .N_LC              (POC_N_LC),
    .CLKS_PER_BIT      (CLKS_PER_BIT),
    .CAL_LEN           (CAL_LEN),
    .AUTO_RESET_PERIOD (AUTO_RESET_PERIOD)
  ) u_poc (
    .clk, .rst_n,
    .uart_rx     (poc_uart_rx),
    .trigger     (poc_trigger),
    .leakage_en  (poc_leakage_en),
    .phase       (poc_phase),
    .lc_en       (poc_lc_en),
    .lc_out      (poc_lc_out),
    .load_active (poc_load_active),
    .load_digest (poc_load_digest)
  );

endmodule
