`timescale 1ns/1ps
// tb_crypto_engine: follows the leaked bit cycle by cycle after crypto_en
// rises: calibration 1,0,1,0 for 1000 cycles, 0 until the warm-up is over,
// then the reference keystream from cycle 1152 on, and 0 for good once the
// keystream length (shortened to 1848 bits, off from cycle 3000) has passed.
// A second engine that never switches off is restarted mid-stream and must start over.
module tb_crypto_engine;
  import trivium_ref_pkg::*;
  import cid_pkg::*;

  localparam int RUN = 3000;

  logic clk = 0, rst_n = 0, crypto_en = 0, restart = 0;
  key_t key;
  iv_t  iv;
  logic leak, ks_bit, ks_valid;
  ce_phase_e phase;
  logic leak2, ks_bit2, ks_valid2;
  ce_phase_e phase2;
  int checks = 0, failures = 0;
  int n_cal = 0, n_wait = 0, n_ks = 0, n_off = 0;

  crypto_engine #(.KS_BITS(RUN - 1152)) dut (
    .clk, .rst_n, .restart (1'b0), .crypto_en, .key, .iv,
    .leakage_en (leak), .ks_bit, .ks_valid, .phase);

  crypto_engine #(.KS_BITS(0)) dut2 (
    .clk, .rst_n, .restart, .crypto_en, .key, .iv,
    .leakage_en (leak2), .ks_bit (ks_bit2), .ks_valid (ks_valid2), .phase (phase2));

  always #10 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input string what, input int cyc, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s cycle %0d: got %b expected %b", what, cyc, got, exp);
    end
  endtask

  initial begin
    trivium_ref r1 = new();
    trivium_ref r2 = new();
    logic e;
    key = {$urandom(), $urandom(), 16'($urandom())};
    iv  = {$urandom(), $urandom(), 16'($urandom())};
    r1.init(key, iv);
    r2.init(key, iv);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (phase != CE_IDLE || leak !== 1'b0) begin failures++; $display("FAIL not idle"); end
    crypto_en = 1;
    @(negedge clk);                        // this is cycle 0
    for (int c = 0; c < RUN + 200; c++) begin
      if (c < 1000) begin
        e = (c % 2 == 0);
        n_cal++;
        expect_bit("phase cal", c, phase == CE_CAL, 1'b1);
      end else if (c < 1152) begin
        e = 1'b0;
        n_wait++;
        expect_bit("phase wait", c, phase == CE_WAIT, 1'b1);
      end else if (c < RUN) begin
        e = r1.next();
        n_ks++;
        expect_bit("phase ks", c, phase == CE_KS, 1'b1);
      end else begin
        e = 1'b0;
        n_off++;
        expect_bit("phase off", c, phase == CE_OFF, 1'b1);
      end
      expect_bit("leak", c, leak, e);
      // second engine: restart at cycle 1500, then compare the restarted run
      if (c == 1500) restart = 1;
      if (c == 1501) restart = 0;
      if (c < 1152)
        expect_bit("leak2", c, leak2, e);
      else if (c > 1500 && c - 1501 < 1000)
        expect_bit("leak2 cal after restart", c, leak2, ((c - 1501) % 2 == 0));
      else if (c >= 1501 + 1152)
        expect_bit("leak2 ks after restart", c, leak2, r2.next());
      @(negedge clk);
    end
    checks++;
    if (n_cal == 0 || n_wait == 0 || n_ks == 0 || n_off == 0) begin
      failures++; $display("FAIL a phase never happened");
    end
    $display("phases: cal=%0d wait=%0d keystream=%0d off=%0d", n_cal, n_wait, n_ks, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
