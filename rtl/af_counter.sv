`timescale 1ns/1ps
// af_counter: address counter of the antifuse memory.
//
// Counts up by one on each clock with `en` high; `clr` (synchronous, takes
// priority) returns it to 0; reset clears it. The count is the memory
// address, so the counter walks the fuses 0, 1, ..., n+m.
// The document shows the counter and its enable; clear and reset are this
// design's choices.
module af_counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   count <= '0;
    else if (clr) count <= '0;
    else if (en)  count <= count + 1'b1;
  end

endmodule
