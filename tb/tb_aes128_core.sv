`timescale 1ns/1ps
// tb_aes128_core: checks the AES-128 core against the FIPS-197 example
// vectors (Appendix B and C.1), checks that a block takes 11 enabled cycles,
// and that cycles with ce low freeze the core without changing the result.
module tb_aes128_core;
  logic clk = 0, rst_n = 0, ce = 0, start = 0;
  logic [127:0] key, din, dout;
  logic busy, done;
  int checks = 0, failures = 0;

  aes128_core dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // encrypt; pause_mask bit i low = ce low in enabled-cycle i's slot
  task automatic encrypt(input logic [127:0] k, input logic [127:0] p,
                         input logic pauses, output logic [127:0] c, output int en_cycles);
    int n = 0;
    key = k; din = p;
    @(negedge clk); ce = 1; start = 1;
    @(posedge clk); n++;
    @(negedge clk); start = 0;
    while (!done) begin
      if (pauses) ce = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (ce) n++;
      @(negedge clk);
    end
    ce = 0;
    c = dout;
    en_cycles = n;
  endtask

  initial begin
    logic [127:0] c;
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, 0, c, n);
    check("FIPS-197 C.1", c, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    checks++; if (n != 11) begin failures++; $display("FAIL latency %0d enabled cycles", n); end
    encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734, 0, c, n);
    check("FIPS-197 B", c, 128'h3925841d02dc09fbdc118597196a0b32);
    encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734, 1, c, n);
    check("FIPS-197 B with pauses", c, 128'h3925841d02dc09fbdc118597196a0b32);
    checks++; if (n != 11) begin failures++; $display("FAIL paused latency %0d", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
