`timescale 1ns/1ps
// auto_reset: periodic reset of the cipher under test, with a trigger for
// the oscilloscope.
//
// A free-running counter counts 0 .. PERIOD-1. In every cycle where it is 0
// (the first cycle after the system reset, then every PERIOD cycles)
// `reset_o` and `trigger` are high for exactly one cycle; the cipher restarts
// on that pulse and the scope starts recording on the trigger.
// The document states an auto-reset after a fixed number of cycles with a
// one-cycle trigger. It does not give the period; the default of 550 M cycles
// (11 s at 50 MHz) is this design's choice, long enough for the measurements
// at up to 10 s after reset that the document reports.
module auto_reset #(
  parameter int unsigned PERIOD = 550_000_000
) (
  input  logic clk,
  input  logic rst_n,
  output logic reset_o,
  output logic trigger
);

  localparam int unsigned CW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          cnt <= '0;
    else if (cnt == CW'(PERIOD - 1))     cnt <= '0;
    else                                 cnt <= cnt + 1'b1;
  end

  assign reset_o = (cnt == '0);
  assign trigger = reset_o;

endmodule
