`timescale 1ns/1ps
// tb_load_circuit: with the FIPS-197 key and plaintext the first block must
// be the FIPS-197 ciphertext; the next blocks must follow CBC chaining
// C_i = E(PT ^ C_{i-1}) computed with the reference AES. The core may only
// run in cycles where the LFSR gate is 1 and the enable is on, and with the
// enable off nothing may change.
module tb_load_circuit;
  import aes_ref_pkg::*;
  localparam logic [127:0] K = 128'h000102030405060708090a0b0c0d0e0f;
  localparam logic [127:0] P = 128'h00112233445566778899aabbccddeeff;
  logic clk = 0, rst_n = 0, enable = 0, active;
  logic [127:0] ct;
  logic [31:0] blocks;
  int checks = 0, failures = 0, act_cycles = 0, idle_cycles = 0;

  load_circuit #(.INDEX(3), .KEY(K), .PT(P)) dut (.*);

  always #10 clk = ~clk;
  always @(posedge clk) if (enable) begin
    if (active) act_cycles++; else idle_cycles++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] chain = '0, e;
    int last = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (50) @(negedge clk);
    checks++;
    if (blocks != 0 || active) begin failures++; $display("FAIL runs while disabled"); end
    enable = 1;
    while (blocks < 20) begin
      @(negedge clk);
      if (blocks != last) begin
        e = encrypt(K, P ^ chain);
        checks++;
        if (blocks == 1 && ct !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin
          failures++; $display("FAIL first block %h", ct);
        end
        if (ct !== e) begin failures++; $display("FAIL block %0d: %h expected %h", blocks, ct, e); end
        chain = ct;
        last = blocks;
      end
    end
    checks++;
    if (idle_cycles == 0 || act_cycles < 20 * 11) begin
      failures++; $display("FAIL gating: active %0d idle %0d", act_cycles, idle_cycles);
    end
    enable = 0;
    repeat (100) @(negedge clk);
    checks++;
    if (blocks != 20 || ct !== chain) begin failures++; $display("FAIL changed while disabled"); end
    $display("blocks=20 active cycles=%0d paused cycles=%0d", act_cycles, idle_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
