`timescale 1ns/1ps
// tb_cid_top_full: one complete operation of the top level with every
// parameter at its default (10 IC leakage circuits, 64 PoC leakage circuits,
// 40 load circuits, 115200 baud at 50 MHz, 1000 calibration cycles).
//   IC: program a random key/IV over the pin, reset, and compare the leaked
//   bits with calibration + reference keystream for 3000 cycles.
//   PoC: from the same reset, compare the leaked bits with calibration +
//   keystream of the power-up key/IV (zero), then set key, IV, LC count and
//   load enable over the UART at full bit time and check their effect. The
//   new key would only be used after the 550 M-cycle auto-reset period,
//   which is not simulated here; the register contents are checked instead.
module tb_cid_top_full;
  import trivium_ref_pkg::*;
  import cid_pkg::*;
  localparam int CPB = 434;

  logic clk = 0, rst_n = 0, ic_pin = 0, poc_uart_rx = 1;
  logic ic_initialized, ic_crypto_en, ic_leakage_en, poc_trigger, poc_leakage_en;
  ce_phase_e ic_phase, poc_phase;
  logic [9:0]  ic_lc_en, ic_lc_out;
  logic [63:0] poc_lc_en, poc_lc_out;
  logic [39:0] poc_load_active;
  logic [127:0] poc_load_digest;
  int checks = 0, failures = 0;
  int n_loads_seen = 0;

  cid_top dut (.*);

  always #10 clk = ~clk;
  always @(posedge clk) if (rst_n && poc_load_active != 0) n_loads_seen++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input string what, input bit cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic uart_byte(input logic [7:0] b);
    poc_uart_rx = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin poc_uart_rx = b[i]; repeat (CPB) @(negedge clk); end
    poc_uart_rx = 1; repeat (CPB) @(negedge clk);
  endtask

  initial begin
    key_t k, pk; iv_t v, pv;
    trivium_ref ri = new();
    trivium_ref rp = new();
    logic ei, ep;
    int ci = -1;
    k  = {$urandom(), $urandom(), 16'($urandom())};
    v  = {$urandom(), $urandom(), 16'($urandom())};
    pk = {$urandom(), $urandom(), 16'($urandom())};
    pv = {$urandom(), $urandom(), 16'($urandom())};
    ri.init(k, v);
    rp.init('0, '0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    ic_pin = 1; @(negedge clk);
    for (int i = 0; i < 80; i++) begin ic_pin = k[i]; @(negedge clk); end
    for (int i = 0; i < 80; i++) begin ic_pin = v[i]; @(negedge clk); end
    ic_pin = 0;
    repeat (3) @(negedge clk);
    rst_n = 0; @(negedge clk); rst_n = 1;
    expect_true("PoC trigger after reset", poc_trigger);
    @(negedge clk);
    // PoC cycle c = 0.., IC cycle ci counts from the cycle after crypto_en
    for (int c = 0; c < 3400; c++) begin
      ep = (c < 1000) ? (c % 2 == 0) : (c < 1152) ? 1'b0 : rp.next();
      expect_true($sformatf("PoC leak cycle %0d", c), poc_leakage_en === ep);
      if (ci >= 0) begin
        ei = (ci < 1000) ? (ci % 2 == 0) : (ci < 1152) ? 1'b0 : ri.next();
        expect_true($sformatf("IC leak cycle %0d", ci), ic_leakage_en === ei);
        expect_true("IC LCs", ic_lc_en === {10{ei}});
        ci++;
      end else if (ic_crypto_en) ci = 0;
      @(negedge clk);
    end
    expect_true("IC reached keystream", ci > 2000 && ic_phase == CE_KS);
    uart_byte(CMD_NLC); uart_byte(8'd63);
    for (int c = 0; c < 40; c++) begin
      expect_true("PoC all 64 LCs", poc_lc_en === {64{poc_leakage_en}});
      @(negedge clk);
    end
    uart_byte(CMD_LOAD); uart_byte(8'd1);
    uart_byte(CMD_KEY); for (int j = 0; j < 10; j++) uart_byte(pk[8*j +: 8]);
    uart_byte(CMD_IV);  for (int j = 0; j < 10; j++) uart_byte(pv[8*j +: 8]);
    expect_true("PoC key/IV registers", dut.u_poc.key == pk && dut.u_poc.iv == pv);
    expect_true("load circuits ran", n_loads_seen > 1000 && poc_load_digest != 0);
    expect_true("no auto-reset yet", !poc_trigger);
    $display("IC keystream cycles checked=%0d, load-active cycles=%0d", ci - 1152, n_loads_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
