`timescale 1ns/1ps
// poc_system: the FPGA proof-of-concept system used to evaluate the scheme.
//
// A UART receiver feeds the command interpreter, which holds the Trivium key
// and IV, the number of active leakage circuits (6 bits: circuits 0..n of 64)
// and the common enable of the load circuits. The auto-reset block restarts
// the crypto engine every AUTO_RESET_PERIOD cycles and pulses `trigger` in
// the same cycle. After each trigger in cycle T the engine sends the
// calibration sequence 1,0,1,0,... in cycles T+1 .. T+CAL_LEN, and keystream
// bit k in cycle T+1+1152+k, into the 64 leakage circuits. A key or IV sent
// over UART is used from the next trigger on; the LC count and the load
// enable act at once. N_LOAD AES-128 load circuits (40 by default, the count
// of the largest board) run independently of the auto-reset.
// `load_digest` (XOR of all load ciphertexts) keeps the load logic
// observable; it has no other purpose.
//
// The block diagram (UART, command interpreter, key, IV, Trivium, auto-reset
// with trigger, 64 leakage circuits, N load circuits) is the document's. The
// keystream is not switched off here because the document's measurements run
// up to 10 s after reset. Everything the interpreter and auto-reset headers
// call their own choices is this design's.
module poc_system
  import cid_pkg::*;
#(
  parameter int unsigned N_LOAD            = 40,
  parameter int unsigned N_LC              = 64,
  parameter int unsigned CLKS_PER_BIT      = 434,
  parameter int unsigned CAL_LEN           = 1000,
  parameter int unsigned AUTO_RESET_PERIOD = 550_000_000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              uart_rx,
  output logic              trigger,
  output logic              leakage_en,   // ID sequence bit into the LCs
  output ce_phase_e         phase,
  output logic [N_LC-1:0]   lc_en,
  output logic [N_LC-1:0]   lc_out,
  output logic [N_LOAD-1:0] load_active,
  output logic [127:0]      load_digest
);

  localparam int unsigned NLC_W = (N_LC > 1) ? $clog2(N_LC) : 1;

  logic [7:0]       rx_data;
  logic             rx_valid;
  key_t             key;
  iv_t              iv;
  logic [NLC_W-1:0] n_active;
  logic             load_en, cmd_updated;
  logic             ar_reset;
  logic             ks_bit, ks_valid;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .rst_n,
    .rx    (uart_rx),
    .data  (rx_data),
    .valid (rx_valid)
  );

  cmd_interpreter #(.NLC_W(NLC_W)) u_cmd (
    .clk, .rst_n,
    .rx_data, .rx_valid,
    .key, .iv, .n_active, .load_en,
    .updated (cmd_updated)
  );

  auto_reset #(.PERIOD(AUTO_RESET_PERIOD)) u_ar (
    .clk, .rst_n,
    .reset_o (ar_reset),
    .trigger
  );

  crypto_engine #(.CAL_LEN(CAL_LEN), .KS_BITS(0)) u_engine (
    .clk, .rst_n,
    .restart   (ar_reset),
    .crypto_en (1'b1),
    .key, .iv,
    .leakage_en,
    .ks_bit, .ks_valid,
    .phase
  );

  leakage_array #(.N_LC(N_LC)) u_lcs (
    .leak_in (leakage_en),
    .n_active,
    .lc_en,
    .lc_out
  );

  logic [N_LOAD-1:0][127:0] cts;

  for (genvar i = 0; i < N_LOAD; i++) begin : g_load
    logic [31:0] blocks;
    load_circuit #(.INDEX(i)) u_load (
      .clk, .rst_n,
      .enable (load_en),
      .active (load_active[i]),
      .ct     (cts[i]),
      .blocks (blocks)
    );
  end

  always_comb begin
    load_digest = '0;
    for (int i = 0; i < N_LOAD; i++) load_digest ^= cts[i];
  end

  logic unused;
  assign unused = ^{ks_bit, ks_valid, cmd_updated};

endmodule
