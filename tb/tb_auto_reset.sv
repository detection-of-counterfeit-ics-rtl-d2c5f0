`timescale 1ns/1ps
// tb_auto_reset: with a period of 37 cycles the reset/trigger pulse must
// come in the first cycle after reset and then exactly every 37 cycles,
// one cycle long, with trigger and reset together.
module tb_auto_reset;
  localparam int P = 37;
  logic clk = 0, rst_n = 0, reset_o, trigger;
  int checks = 0, failures = 0;

  auto_reset #(.PERIOD(P)) dut (.*);

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
    for (int c = 0; c < 10 * P + 5; c++) begin
      checks++;
      if (reset_o !== (c % P == 0) || trigger !== reset_o) begin
        failures++; $display("FAIL cycle %0d: reset %b trigger %b", c, reset_o, trigger);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
