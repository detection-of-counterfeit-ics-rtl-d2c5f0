`timescale 1ns/1ps
// tb_leakage_circuit: the output must stay at 1 with no edges while the
// input is 0, and must glitch many times per 20 ns clock period while the
// input is 1 (the oscillators run and their edges reach the AND gate at
// different times). Checked over several on/off intervals.
module tb_leakage_circuit;
  logic en = 0, lc_out;
  int checks = 0, failures = 0;
  int edges = 0;

  leakage_circuit dut (.en, .lc_out);

  always @(lc_out) edges++;

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0;
    #5ns;
    for (int k = 0; k < 6; k++) begin
      en = 0;
      #2ns e0 = edges;
      #18ns;
      checks++;
      if (edges != e0 || lc_out !== 1'b1) begin
        failures++; $display("FAIL off interval %0d: %0d edges, out %b", k, edges - e0, lc_out);
      end
      en = 1;
      e0 = edges;
      #20ns;
      checks++;
      if (edges - e0 < 4) begin
        failures++; $display("FAIL on interval %0d: only %0d edges", k, edges - e0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
