`timescale 1ns/1ps
// tb_af_counter: random enable/clear sequence against a software counter,
// including wrap-around at 2^WIDTH.
module tb_af_counter;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [7:0] count;
  int model = 0;
  int checks = 0, failures = 0;

  af_counter #(.WIDTH(8)) dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      clr = ($urandom_range(0, 99) == 0);
      en  = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (clr) model = 0; else if (en) model = (model + 1) % 256;
      @(negedge clk);
      checks++;
      if (count !== 8'(model)) begin
        failures++; $display("FAIL step %0d: got %0d expected %0d", k, count, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
