`timescale 1ns/1ps
// tb_lfsr128: compares 3000 steps (with random enable) against a bit-array
// model of the recurrence x^128 + x^126 + x^101 + x^99 + 1, checks the seed
// after reset and that the state never becomes zero.
module tb_lfsr128;
  localparam logic [127:0] SEED = 128'h8000_0000_0000_0000_0000_0000_0000_0001;
  logic clk = 0, rst_n = 0, en = 0, out;
  logic [127:0] state;
  bit m [1:128];                   // m[i] = stage i, stage 128 is the output
  int checks = 0, failures = 0;

  lfsr128 #(.SEED(SEED)) dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit fb;
    for (int i = 1; i <= 128; i++) m[i] = SEED[i - 1];
    repeat (2) @(negedge clk);
    checks++;
    if (state !== SEED) begin failures++; $display("FAIL seed"); end
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      en = ($urandom_range(0, 4) != 0);
      @(posedge clk);
      if (en) begin
        fb = m[128] ^ m[126] ^ m[101] ^ m[99];
        for (int i = 128; i >= 2; i--) m[i] = m[i - 1];
        m[1] = fb;
      end
      @(negedge clk);
      checks++;
      if (out !== m[128] || state == '0) begin failures++; $display("FAIL step %0d", k); end
      for (int i = 1; i <= 128; i++) if (state[i - 1] !== m[i]) begin
        failures++; $display("FAIL step %0d stage %0d", k, i); break;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
