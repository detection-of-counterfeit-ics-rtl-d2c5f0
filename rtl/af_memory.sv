`timescale 1ns/1ps
// af_memory: BEHAVIOURAL MODEL of the one-time-programmable antifuse memory
// that stores the "IC initialised" flag, the key and the IV.
//
// One bit per address. Reads are combinational (`rdata` follows `addr`).
// A write with `we` high on a rising clock edge can only blow a fuse: writing
// 1 sets the bit for good, writing 0 leaves it as it is. The contents are not
// touched by any reset: a fresh part reads all zeros, and programmed bits
// survive power cycles and resets. A real antifuse macro also needs a
// programming voltage and timing that a logic model does not have; they are
// left out.
//
// From the document: a tamper-resistant, one-time-programmable antifuse
// memory written over a pin, with the flag at address 0, key at 1..n and IV
// at n+1..n+m. Port names and single-bit width are this model's choices.
module af_memory
  import cid_pkg::*;
#(
  parameter int unsigned DEPTH = AF_DEPTH,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,     // program (blow) the addressed fuse
  input  logic          wdata,  // 1 blows the fuse, 0 leaves it
  output logic          rdata
);

  logic [DEPTH-1:0] fuse;

  initial fuse = '0;            // unprogrammed part

  always @(posedge clk) begin
    if (we && wdata && int'(addr) < DEPTH) fuse[addr] <= 1'b1;
  end

  assign rdata = (int'(addr) < DEPTH) ? fuse[addr] : 1'b0;

endmodule
