`timescale 1ns/1ps
// tb_trivium: runs the Trivium RTL for several random key/IV pairs and
// compares 300 keystream bits each with the specification-style reference
// model; checks that the keystream starts exactly 1152 enabled cycles after
// load, that cycles with en low hold the keystream, and that a reload
// restarts it.
module tb_trivium;
  import trivium_ref_pkg::*;
  import cid_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, en = 0;
  key_t key;
  iv_t  iv;
  logic ks_bit, ks_valid;
  int checks = 0, failures = 0;

  trivium dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_pair(input key_t k, input iv_t v, input bit pauses);
    trivium_ref ref_m = new();
    int warm = 0;
    key = k; iv = v;
    ref_m.init(k, v);
    @(negedge clk); load = 1;
    @(negedge clk); load = 0; en = 1;
    while (!ks_valid) begin
      @(posedge clk); warm++;
      @(negedge clk);
    end
    checks++;
    if (warm != 1152) begin failures++; $display("FAIL warm-up took %0d cycles", warm); end
    for (int i = 0; i < 300; i++) begin
      en = pauses ? ($urandom_range(0, 1) == 1) : 1'b1;
      #1;
      if (en) begin
        checks++;
        if (ks_bit !== ref_m.next()) begin
          failures++;
          $display("FAIL key %h bit %0d", k, i);
        end
      end
      @(negedge clk);
    end
    en = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_pair('0, '0, 0);
    run_pair({80{1'b1}}, '0, 0);
    for (int n = 0; n < 4; n++)
      run_pair({$urandom(), $urandom(), 16'($urandom())}, {$urandom(), $urandom(), 16'($urandom())}, n[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
