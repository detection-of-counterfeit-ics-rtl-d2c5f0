`timescale 1ns/1ps
// uart_rx: UART receiver, 8 data bits, no parity, one stop bit, LSB first.
//
// The line is synchronised with two flip-flops. A falling edge (high, then
// low) starts a frame, so a line held low after a bad frame starts nothing; the start bit is checked half a bit later, then each data bit and
// the stop bit are sampled in the middle of their bit time, CLKS_PER_BIT
// clocks apart. A frame whose stop bit is 1 gives `valid` for one cycle with
// the byte on `data`; a frame with a bad stop bit is dropped.
// The document only names a UART carrying 8-bit command/data; the frame
// format and the default of 434 clocks per bit (115200 baud at 50 MHz) are
// this design's choices.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_st_e;

  rx_st_e         st;
  logic [1:0]     sync;
  logic [CW-1:0]  tick;
  logic [2:0]     nbit;
  logic [7:0]     shreg;
  logic           line, prev;

  assign line = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync  <= 2'b11;
      prev  <= 1'b1;
      st    <= RX_IDLE;
      tick  <= '0;
      nbit  <= '0;
      shreg <= '0;
      data  <= '0;
      valid <= 1'b0;
    end else begin
      sync  <= {sync[0], rx};
      prev  <= line;
      valid <= 1'b0;
      unique case (st)
        RX_IDLE: if (prev && !line) begin
          st   <= RX_START;
          tick <= CW'(CLKS_PER_BIT / 2);
        end
        RX_START: if (tick == 0) begin
          if (!line) begin
            st   <= RX_DATA;
            tick <= CW'(CLKS_PER_BIT - 1);
            nbit <= '0;
          end else begin
            st <= RX_IDLE;                       // glitch, not a start bit
          end
        end else tick <= tick - 1'b1;
        RX_DATA: if (tick == 0) begin
          shreg <= {line, shreg[7:1]};
          tick  <= CW'(CLKS_PER_BIT - 1);
          if (nbit == 3'd7) st <= RX_STOP;
          nbit  <= nbit + 1'b1;
        end else tick <= tick - 1'b1;
        RX_STOP: if (tick == 0) begin
          st <= RX_IDLE;
          if (line) begin
            data  <= shreg;
            valid <= 1'b1;
          end
        end else tick <= tick - 1'b1;
        default: st <= RX_IDLE;
      endcase
    end
  end

endmodule
