`timescale 1ns/1ps
// tb_cid_top: end-to-end run of both designs in the top level, with short
// keystream length, auto-reset period and UART bit time and two load circuits.
//   IC: a fresh part is programmed over its pin, reset, and must leak
//   calibration, then the reference keystream of its key/IV, then switch
//   off; a part whose key differs (a counterfeit) must not match.
//   PoC: key/IV, LC count and load enable are sent over the UART; after the
//   next trigger the leaked bits must follow the new key/IV.
// Every mechanism is counted and must have happened at least once.
module tb_cid_top;
  import trivium_ref_pkg::*;
  import cid_pkg::*;
  localparam int RUN = 3000, CPB = 8, PERIOD = 7000, NL = 2;

  logic clk = 0, rst_n = 0, ic_pin = 0, poc_uart_rx = 1;
  logic ic_initialized, ic_crypto_en, ic_leakage_en, poc_trigger, poc_leakage_en;
  ce_phase_e ic_phase, poc_phase;
  logic [9:0]  ic_lc_en, ic_lc_out;
  logic [63:0] poc_lc_en, poc_lc_out;
  logic [NL-1:0] poc_load_active;
  logic [127:0] poc_load_digest;
  int checks = 0, failures = 0;
  // mechanism counters
  int m_program = 0, m_load = 0, m_cal = 0, m_wait = 0, m_ks = 0, m_off = 0;
  int m_trigger = 0, m_uart = 0, m_nlc = 0, m_loads = 0, m_pause = 0, m_newkey = 0, m_mismatch = 0;

  cid_top #(.IC_KS_BITS(RUN - 1152), .POC_N_LOAD(NL), .CLKS_PER_BIT(CPB),
            .AUTO_RESET_PERIOD(PERIOD)) dut (.*);

  always #10 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ic.u_fsmd.state == FS_PROGRAM) m_program++;
    if (dut.u_ic.u_fsmd.state == FS_LOAD)    m_load++;
    if (ic_phase == CE_CAL)  m_cal++;
    if (ic_phase == CE_WAIT) m_wait++;
    if (ic_phase == CE_KS)   m_ks++;
    if (ic_phase == CE_OFF)  m_off++;
    if (poc_trigger)         m_trigger++;
    if (dut.u_poc.rx_valid)  m_uart++;
    if (poc_load_active != 0) m_loads++;
    if (dut.u_poc.load_en && poc_load_active != {NL{1'b1}}) m_pause++;
  end

  initial begin
    repeat (60000) @(posedge clk);
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
    poc_uart_rx = 1; repeat (2 * CPB) @(negedge clk);
  endtask

  // IC side, run as its own thread after the reset that follows programming
  task automatic ic_check(input key_t k, input iv_t v, input key_t fake);
    trivium_ref r = new();
    trivium_ref f = new();
    logic e, ef;
    int diff = 0;
    r.init(k, v);
    f.init(fake, v);
    while (!ic_crypto_en) @(negedge clk);
    @(negedge clk);
    for (int c = 0; c < RUN + 20; c++) begin
      if (c < 1000)      e = (c % 2 == 0);
      else if (c < 1152) e = 1'b0;
      else if (c < RUN)  begin e = r.next(); ef = f.next(); if (ef != e) diff++; end
      else               e = 1'b0;
      expect_true($sformatf("IC leak cycle %0d", c), ic_leakage_en === e);
      expect_true("IC LCs follow", ic_lc_en === {10{e}});
      @(negedge clk);
    end
    // a chip with another key would leak a different stream: about half the
    // bits differ, so correlation with the published sequence fails
    expect_true("counterfeit stream differs", diff > (RUN - 1152) / 3);
    if (diff > (RUN - 1152) / 3) m_mismatch++;
  endtask

  task automatic poc_check(input key_t k, input iv_t v);
    trivium_ref r = new();
    logic e;
    r.init(k, v);
    while (!poc_trigger) @(negedge clk);
    @(negedge clk);
    for (int c = 0; c < 1600; c++) begin
      if (c < 1000)      e = (c % 2 == 0);
      else if (c < 1152) e = 1'b0;
      else               e = r.next();
      expect_true($sformatf("PoC leak cycle %0d", c), poc_leakage_en === e);
      @(negedge clk);
    end
    m_newkey++;
  endtask

  initial begin
    key_t k, pk, fake; iv_t v, pv;
    k    = {$urandom(), $urandom(), 16'($urandom())};
    v    = {$urandom(), $urandom(), 16'($urandom())};
    fake = k ^ 80'h1;
    pk   = {$urandom(), $urandom(), 16'($urandom())};
    pv   = {$urandom(), $urandom(), 16'($urandom())};
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    expect_true("fresh IC", !ic_initialized && !ic_crypto_en);
    ic_pin = 1; @(negedge clk);
    for (int i = 0; i < 80; i++) begin ic_pin = k[i]; @(negedge clk); end
    for (int i = 0; i < 80; i++) begin ic_pin = v[i]; @(negedge clk); end
    ic_pin = 0;
    repeat (3) @(negedge clk);
    rst_n = 0; @(negedge clk); rst_n = 1;           // power cycle / reset
    fork
      ic_check(k, v, fake);
      begin
        uart_byte(CMD_KEY); for (int j = 0; j < 10; j++) uart_byte(pk[8*j +: 8]);
        uart_byte(CMD_IV);  for (int j = 0; j < 10; j++) uart_byte(pv[8*j +: 8]);
        uart_byte(CMD_NLC); uart_byte(8'd3);
        repeat (5) @(negedge clk);
        for (int c = 0; c < 40; c++) begin
          expect_true("PoC 4 LCs", poc_lc_en === (poc_leakage_en ? 64'hF : 64'h0));
          if (poc_leakage_en) m_nlc++;
          @(negedge clk);
        end
        uart_byte(CMD_LOAD); uart_byte(8'd1);
        poc_check(pk, pv);
      end
    join
    expect_true("load digest nonzero", poc_load_digest != 0);
    $display("program=%0d load=%0d cal=%0d wait=%0d keystream=%0d off=%0d trigger=%0d uart=%0d lc_count=%0d loads=%0d paused=%0d newkey=%0d counterfeit=%0d",
             m_program, m_load, m_cal, m_wait, m_ks, m_off, m_trigger, m_uart, m_nlc, m_loads, m_pause, m_newkey, m_mismatch);
    expect_true("every mechanism happened",
                m_program > 0 && m_load > 0 && m_cal > 0 && m_wait > 0 && m_ks > 0 && m_off > 0 &&
                m_trigger > 1 && m_uart > 0 && m_nlc > 0 && m_loads > 0 && m_pause > 0 &&
                m_newkey > 0 && m_mismatch > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
