`timescale 1ns/1ps
// tb_leakage_array: for every count n of a 64-circuit array, circuits 0..n
// must follow the input bit and the others must stay off, and the outputs
// of exactly the enabled circuits must switch during a high input.
module tb_leakage_array;
  localparam int N = 64;
  logic leak_in = 0;
  logic [5:0] n_active = '0;
  logic [N-1:0] lc_en, lc_out, seen;
  int unsigned edges [N];
  int checks = 0, failures = 0;

  leakage_array #(.N_LC(N)) dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_mon
    always @(lc_out[i]) edges[i]++;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp;
    for (int n = 0; n < N; n++) begin
      n_active = 6'(n);
      exp = '0;
      for (int i = 0; i <= n; i++) exp[i] = 1'b1;
      leak_in = 0;
      #10ns;
      checks++;
      if (lc_en !== '0) begin failures++; $display("FAIL n=%0d enables with input 0", n); end
      foreach (edges[i]) edges[i] = 0;
      leak_in = 1;
      #1ns;
      checks++;
      if (lc_en !== exp) begin failures++; $display("FAIL n=%0d enables %h", n, lc_en); end
      #19ns;
      foreach (edges[i]) seen[i] = (edges[i] != 0);
      checks++;
      if (seen !== exp) begin failures++; $display("FAIL n=%0d switching %h", n, seen); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
