`timescale 1ns/1ps
// tb_poc_system: the proof-of-concept system with 3 load circuits, 8 clocks
// per UART bit and an auto-reset period of 6000 cycles. After power-up the
// leaked bits must be calibration + keystream of key = IV = 0. Then key, IV,
// LC count and load enable are sent over the UART: the LC count and load
// enable must act at once, the new key/IV only from the next trigger, after
// which the leaked bits must be calibration + keystream of the new pair.
// Each mechanism (trigger, calibration, keystream, each UART command, LC
// count change, load activity and pausing) is counted and must occur.
module tb_poc_system;
  import trivium_ref_pkg::*;
  import cid_pkg::*;
  localparam int CPB = 8, PERIOD = 6000, NL = 3;
  logic clk = 0, rst_n = 0, uart_rx = 1, trigger, leakage_en;
  ce_phase_e phase;
  logic [63:0] lc_en, lc_out;
  logic [NL-1:0] load_active;
  logic [127:0] load_digest;
  int checks = 0, failures = 0;
  int n_trig = 0, n_cal = 0, n_ks = 0, n_cmd = 0, n_lc_checks = 0, n_load_on = 0, n_load_off = 0;

  poc_system #(.N_LOAD(NL), .CLKS_PER_BIT(CPB), .AUTO_RESET_PERIOD(PERIOD)) dut (.*);

  always #10 clk = ~clk;
  always @(posedge clk) if (rst_n && trigger) n_trig++;
  always @(posedge clk) if (rst_n) begin
    if (load_active != 0) n_load_on++;
    if (dut.load_en && load_active != {NL{1'b1}}) n_load_off++;
  end

  initial begin
    repeat (40000) @(posedge clk);
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
    uart_rx = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin uart_rx = b[i]; repeat (CPB) @(negedge clk); end
    uart_rx = 1; repeat (2 * CPB) @(negedge clk);
  endtask

  // check the leaked bit for `len` cycles starting `start` cycles after trigger
  task automatic check_stream(input key_t k, input iv_t v, input int len);
    trivium_ref r = new();
    logic e;
    r.init(k, v);
    while (!trigger) @(negedge clk);
    @(negedge clk);                                // cycle 0
    for (int c = 0; c < len; c++) begin
      if (c < 1000)      begin e = (c % 2 == 0); n_cal++; end
      else if (c < 1152) e = 1'b0;
      else               begin e = r.next(); n_ks++; end
      expect_true($sformatf("leak cycle %0d", c), leakage_en === e);
      @(negedge clk);
    end
  endtask

  initial begin
    key_t k; iv_t v;
    logic [63:0] mask;
    logic [127:0] d0;
    k = {$urandom(), $urandom(), 16'($urandom())};
    v = {$urandom(), $urandom(), 16'($urandom())};
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_stream('0, '0, 1400);                     // power-up: key = IV = 0
    // default LC count 15: circuits 0..15
    for (int c = 0; c < 50; c++) begin
      expect_true("16 LCs by default", lc_en === (leakage_en ? 64'h0000_0000_0000_FFFF : 64'h0));
      @(negedge clk);
    end
    uart_byte(CMD_KEY); for (int j = 0; j < 10; j++) uart_byte(k[8*j +: 8]); n_cmd++;
    uart_byte(CMD_IV);  for (int j = 0; j < 10; j++) uart_byte(v[8*j +: 8]); n_cmd++;
    uart_byte(CMD_NLC); uart_byte(8'd9); n_cmd++;
    mask = 64'h3FF;
    for (int c = 0; c < 50; c++) begin
      expect_true("10 LCs after N command", lc_en === (leakage_en ? mask : 64'h0));
      n_lc_checks++;
      @(negedge clk);
    end
    expect_true("loads idle before L command", load_active == 0 && load_digest == 0);
    uart_byte(CMD_LOAD); uart_byte(8'd1); n_cmd++;
    repeat (300) @(negedge clk);
    d0 = load_digest;
    expect_true("loads produced ciphertext", d0 != 0);
    expect_true("still before the next trigger", n_trig == 1);
    check_stream(k, v, 2500);                       // new key from next trigger
    expect_true("two triggers", n_trig == 2);
    expect_true("loads kept running across the auto-reset", load_digest != d0);
    expect_true("calibration seen", n_cal >= 2000);
    expect_true("keystream seen", n_ks > 1000);
    expect_true("all four commands", n_cmd == 4);
    expect_true("LC count change seen", n_lc_checks > 0);
    expect_true("loads active and paused", n_load_on > 0 && n_load_off > 0);
    $display("triggers=%0d cal=%0d keystream=%0d commands=%0d load_on=%0d load_paused=%0d",
             n_trig, n_cal, n_ks, n_cmd, n_load_on, n_load_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
