`timescale 1ns/1ps
// tb_af_memory: a fresh antifuse memory reads all zeros; writing 1 blows a
// fuse for good, writing 0 changes nothing, a blown fuse cannot be cleared,
// and every address reads back what a bit-level reference model predicts.
module tb_af_memory;
  import cid_pkg::*;
  logic clk = 0, we = 0, wdata = 0, rdata;
  logic [AF_AW-1:0] addr = '0;
  bit   model [AF_DEPTH];
  int checks = 0, failures = 0;

  af_memory dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all(input string what);
    for (int a = 0; a < AF_DEPTH; a++) begin
      addr = AF_AW'(a);
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++; $display("FAIL %s addr %0d: got %b expected %b", what, a, rdata, model[a]);
      end
    end
  endtask

  initial begin
    @(negedge clk);
    read_all("fresh");
    for (int k = 0; k < 600; k++) begin
      @(negedge clk);
      addr  = AF_AW'($urandom_range(0, AF_DEPTH - 1));
      wdata = 1'($urandom());
      we    = 1;
      if (wdata) model[addr] = 1;
      @(negedge clk);
      we = 0;
    end
    read_all("after writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
