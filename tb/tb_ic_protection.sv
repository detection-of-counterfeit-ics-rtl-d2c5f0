`timescale 1ns/1ps
// tb_ic_protection: the whole protection circuit of one IC. A fresh part is
// programmed over the pin with a random key/IV and reset; then the leaked bit
// must be the calibration pattern, a gap, and the reference keystream of that
// key/IV from cycle 1152 after crypto_en, until the (shortened) keystream ends.
// All ten leakage circuits must follow the bit. Pin activity after the
// initialisation must not change anything, and a further reset must give
// the same keystream again.
module tb_ic_protection;
  import trivium_ref_pkg::*;
  import cid_pkg::*;
  localparam int RUN = 2500;
  logic clk = 0, rst_n = 0, pin = 0;
  logic initialized, crypto_en, leakage_en;
  ce_phase_e phase;
  logic [9:0] lc_en, lc_out;
  int checks = 0, failures = 0;
  int lc_edges = 0;

  ic_protection #(.KS_BITS(RUN - 1152)) dut (.*);

  always #10 clk = ~clk;
  always @(lc_out) lc_edges++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input string what, input bit cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic run_after_reset(input key_t k, input iv_t v, input bit noisy_pin);
    trivium_ref r = new();
    logic e;
    int n = 0;
    r.init(k, v);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    while (!crypto_en && n < 400) begin
      if (noisy_pin) pin = 1'($urandom());
      @(negedge clk);
      n++;
    end
    expect_true("crypto_en after 161 cycles", n == 161);
    expect_true("initialized", initialized);
    @(negedge clk);                              // engine loads, cycle 0 next
    for (int c = 0; c < RUN + 50; c++) begin
      if (noisy_pin) pin = 1'($urandom());
      #1;
      if (c < 1000)      e = (c % 2 == 0);
      else if (c < 1152) e = 1'b0;
      else if (c < RUN)  e = r.next();
      else               e = 1'b0;
      expect_true($sformatf("leak cycle %0d", c), leakage_en === e);
      expect_true("all LCs follow", lc_en === {10{e}});
      @(negedge clk);
    end
    expect_true("off at the end", phase == CE_OFF);
  endtask

  initial begin
    key_t k;
    iv_t  v;
    k = {$urandom(), $urandom(), 16'($urandom())};
    v = {$urandom(), $urandom(), 16'($urandom())};
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    expect_true("fresh part not initialised", !initialized && !crypto_en && leakage_en == 0);
    pin = 1;
    @(negedge clk);
    for (int i = 0; i < 80; i++) begin pin = k[i]; @(negedge clk); end
    for (int i = 0; i < 80; i++) begin pin = v[i]; @(negedge clk); end
    pin = 0;
    repeat (5) @(negedge clk);
    expect_true("no crypto before the next reset", !crypto_en);
    run_after_reset(k, v, 0);
    expect_true("leakage circuits switched", lc_edges > 1000);
    run_after_reset(k, v, 1);                    // pin noise must not matter
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
