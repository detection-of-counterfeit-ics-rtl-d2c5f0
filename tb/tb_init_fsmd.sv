`timescale 1ns/1ps
// tb_init_fsmd: drives the FSMD with a testbench counter and fuse array.
// Fresh part: nothing happens while the pin is 0; after the start bit the
// next 160 pin bits must be written to fuses 1..160 in order, then the flag
// fuse, and crypto_en must stay low. After a reset on the programmed part the
// FSMD must read fuses 1..160 in order, never write, and raise crypto_en
// 161 cycles after reset.
module tb_init_fsmd;
  import cid_pkg::*;
  logic clk = 0, rst_n = 0, pin = 0;
  logic af_rdata, af_we, af_wdata, cnt_en, cnt_clr, key_we, crypto_en;
  logic [AF_AW-1:0] addr = '0;
  fsmd_state_e state;
  bit fuse [AF_DEPTH];
  bit sent [1:160];
  int checks = 0, failures = 0;

  init_fsmd dut (.*);

  always #10 clk = ~clk;

  // testbench counter and antifuse model
  assign af_rdata = fuse[addr];
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) addr <= '0;
    else begin
      if (af_we && af_wdata) fuse[addr] <= 1'b1;
      if (cnt_clr) addr <= '0; else if (cnt_en) addr <= addr + 1'b1;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input string what, input bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    int n;
    foreach (sent[i]) sent[i] = 1'($urandom());
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (20) begin
      @(negedge clk);
      expect_true("idle while pin low", !af_we && !crypto_en && state == FS_WAIT);
    end
    pin = 1;                                   // start bit
    @(negedge clk);
    for (int i = 1; i <= 160; i++) begin
      pin = sent[i];
      #1;
      expect_true($sformatf("program write %0d", i), af_we && addr == AF_AW'(i) && af_wdata == sent[i]);
      @(negedge clk);
    end
    pin = 0;
    expect_true("flag write", af_we && af_wdata && addr == '0 && state == FS_FINAL);
    @(negedge clk);
    repeat (10) begin
      expect_true("done and quiet", state == FS_DONE && !af_we && !crypto_en);
      @(negedge clk);
    end
    expect_true("flag fuse blown", fuse[0] == 1);
    for (int i = 1; i <= 160; i++) expect_true($sformatf("fuse %0d", i), fuse[i] == sent[i]);
    // reset: load path
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    n = 0;
    while (!crypto_en && n < 400) begin
      #1;
      expect_true("no write while loading", !af_we);
      if (state == FS_LOAD)
        expect_true($sformatf("load read %0d", n), key_we && addr == AF_AW'(n));
      @(negedge clk);
      n++;
    end
    expect_true($sformatf("crypto_en after 161 cycles (got %0d)", n), n == 161);
    repeat (10) begin
      @(negedge clk);
      expect_true("stays running", crypto_en && state == FS_RUN);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
