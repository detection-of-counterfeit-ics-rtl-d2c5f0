`timescale 1ns/1ps
// tb_key_iv_reg: writes random bits at random antifuse addresses (flag
// address 0 and out-of-range addresses included) and checks key and IV
// against the memory map: address a in 1..80 is key[a-1], 81..160 is
// iv[a-81], everything else is ignored.
module tb_key_iv_reg;
  import cid_pkg::*;
  logic clk = 0, rst_n = 0, we = 0, din = 0;
  logic [AF_AW-1:0] addr = '0;
  key_t key, mk = '0;
  iv_t  iv, mi = '0;
  int checks = 0, failures = 0;

  key_iv_reg dut (.*);

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
    for (int k = 0; k < 1500; k++) begin
      addr = AF_AW'($urandom_range(0, 200));
      din  = 1'($urandom());
      we   = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (we) begin
        if (addr >= 1 && addr <= 80) mk[addr - 1] = din;
        else if (addr >= 81 && addr <= 160) mi[addr - 81] = din;
      end
      @(negedge clk);
      checks++;
      if (key !== mk || iv !== mi) begin
        failures++; $display("FAIL step %0d addr %0d", k, addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
