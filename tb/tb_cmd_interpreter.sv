`timescale 1ns/1ps
// tb_cmd_interpreter: feeds command bytes directly (no UART) and checks the
// settings: reset values, key and IV with the byte/bit layout K_1 = bit 0 of
// the first payload byte, the LC count, the load enable, that an unknown
// code byte is skipped, and that a half-sent key leaves the key unchanged.
module tb_cmd_interpreter;
  import cid_pkg::*;
  logic clk = 0, rst_n = 0, rx_valid = 0, load_en, updated;
  logic [7:0] rx_data = '0;
  key_t key;
  iv_t  iv;
  logic [5:0] n_active;
  int checks = 0, failures = 0, n_upd = 0;

  cmd_interpreter dut (.*);

  always #10 clk = ~clk;
  always @(posedge clk) if (rst_n && updated) n_upd++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input logic [7:0] b);
    rx_data = b; rx_valid = 1;
    @(negedge clk);
    rx_valid = 0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  task automatic expect_true(input string what, input bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    key_t k; iv_t v;
    k = {$urandom(), $urandom(), 16'($urandom())};
    v = {$urandom(), $urandom(), 16'($urandom())};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_true("reset values", key == '0 && iv == '0 && n_active == 6'd15 && !load_en);
    put(8'h00);                                  // unknown code: skipped
    put(CMD_KEY);
    for (int j = 0; j < 10; j++) begin
      expect_true("key not yet changed", key == '0);
      put(k[8*j +: 8]);
    end
    expect_true("key", key == k);
    put(CMD_IV);
    for (int j = 0; j < 10; j++) put(v[8*j +: 8]);
    expect_true("iv", iv == v && key == k);
    put(CMD_NLC); put(8'd9);
    expect_true("n_active 9", n_active == 6'd9);
    put(CMD_NLC); put(8'd63);
    expect_true("n_active 63", n_active == 6'd63);
    put(CMD_LOAD); put(8'h01);
    expect_true("load on", load_en);
    put(CMD_LOAD); put(8'h00);
    expect_true("load off", !load_en);
    put(CMD_KEY); put(8'hFF); put(8'hFF);       // incomplete key ...
    rst_n = 0; @(negedge clk); rst_n = 1;       // ... then reset
    expect_true("reset clears", key == '0 && n_active == 6'd15);
    put(CMD_KEY);
    for (int j = 0; j < 10; j++) put(k[8*j +: 8]);
    expect_true("key after reset", key == k);
    repeat (2) @(negedge clk);                  // last pulse reaches the counter
    expect_true("updated pulses", n_upd == 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
