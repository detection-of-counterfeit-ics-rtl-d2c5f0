`timescale 1ns/1ps
// tb_uart_rx: sends 60 random bytes as 8N1 frames at 16 clocks per bit with
// random idle gaps; each must come out once, in order. A frame with a broken
// stop bit and a short glitch on the idle line must produce nothing.
module tb_uart_rx;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0, rx = 1;
  logic [7:0] data;
  logic valid;
  byte unsigned q[$];
  int checks = 0, failures = 0, got = 0;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && valid) begin
    got++;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL unexpected byte %h", data); end
    else begin
      byte unsigned e;
      e = q.pop_front();
      if (data !== e) begin failures++; $display("FAIL got %h expected %h", data, e); end
    end
  end

  task automatic send(input byte unsigned b, input bit good_stop);
    rx = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (CPB) @(negedge clk); end
    rx = good_stop; repeat (CPB) @(negedge clk);
    rx = 1; repeat ($urandom_range(CPB, 3 * CPB)) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    rx = 0; repeat (3) @(negedge clk); rx = 1;      // glitch
    repeat (3 * CPB) @(negedge clk);
    send(8'hA5, 0);                                  // framing error
    for (int k = 0; k < 60; k++) begin
      byte unsigned b;
      b = byte'($urandom());
      q.push_back(b);
      send(b, 1);
    end
    repeat (4 * CPB) @(negedge clk);
    checks++;
    if (got != 60 || q.size() != 0) begin failures++; $display("FAIL received %0d bytes", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
