`timescale 1ns/1ps
// init_fsmd: the finite state machine with datapath that initialises the IC
// once and starts the crypto engine on every later reset.
//
// After reset the counter is at 0 and the FSMD reads the "IC initialised"
// fuse (FS_CHECK).
//   Uninitialised: wait for a '1' on the pin (FS_WAIT). The n+m bits that
//   follow on the pin, one per clock, are burnt into fuses 1..n+m
//   (FS_PROGRAM), then the flag fuse at address 0 is burnt (FS_FINAL) and the
//   FSMD stays idle (FS_DONE) until the next reset.
//   Initialised: fuses 1..n+m are copied into the key and IV registers, one
//   per clock (FS_LOAD), then crypto_en is raised for good (FS_RUN).
// Timing: with the start bit seen in cycle c, key bit K_1 is sampled in cycle
// c+1 and IV_m in cycle c+n+m. After reset, crypto_en rises n+m+1 cycles
// (161 by default) after the first clock.
//
// Algorithm and memory map follow the document. The FSMD supplies the memory
// write data: the pin while programming and a constant 1 for the flag, which
// the pin alone could not provide; the state encoding is this design's own.
module init_fsmd
  import cid_pkg::*;
#(
  parameter int unsigned N_KEY = KEY_BITS,
  parameter int unsigned M_IV  = IV_BITS,
  parameter int unsigned AW    = AF_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pin,        // serial programming input
  input  logic          af_rdata,   // data_out of the antifuse memory
  input  logic [AW-1:0] addr,       // counter value = memory address
  output logic          af_we,      // read/write of the antifuse memory
  output logic          af_wdata,
  output logic          cnt_en,     // counter_en
  output logic          cnt_clr,
  output logic          key_we,     // store af_rdata into key/IV at addr
  output logic          crypto_en,
  output fsmd_state_e   state
);

  localparam logic [AW-1:0] LAST = AW'(N_KEY + M_IV);

  fsmd_state_e nxt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= FS_CHECK;
    else        state <= nxt;
  end

  always_comb begin
    nxt       = state;
    af_we     = 1'b0;
    af_wdata  = pin;
    cnt_en    = 1'b0;
    cnt_clr   = 1'b0;
    key_we    = 1'b0;
    crypto_en = 1'b0;
    unique case (state)
      FS_CHECK: begin
        cnt_en = 1'b1;                       // move to address 1 either way
        nxt    = af_rdata ? FS_LOAD : FS_WAIT;
        if (!af_rdata) cnt_en = 1'b0;        // stay at 0 until the start bit
      end
      FS_WAIT: if (pin) begin
        cnt_en = 1'b1;
        nxt    = FS_PROGRAM;
      end
      FS_PROGRAM: begin
        af_we = 1'b1;                        // AFmem[counter] := pin
        if (addr == LAST) begin
          cnt_clr = 1'b1;
          nxt     = FS_FINAL;
        end else begin
          cnt_en = 1'b1;
        end
      end
      FS_FINAL: begin
        af_we    = 1'b1;                     // AFmem[0] := 1
        af_wdata = 1'b1;
        nxt      = FS_DONE;
      end
      FS_DONE: ;
      FS_LOAD: begin
        key_we = 1'b1;                       // key/IV[counter] := AFmem[counter]
        if (addr == LAST) begin
          cnt_clr = 1'b1;
          nxt     = FS_RUN;
        end else begin
          cnt_en = 1'b1;
        end
      end
      FS_RUN:  crypto_en = 1'b1;
      default: nxt = FS_CHECK;
    endcase
  end

  // The fuses are only written before the IC is initialised, and the flag
  // only at address 0.
  a_no_write_after_init: assert property (@(posedge clk) disable iff (!rst_n)
    (state inside {FS_LOAD, FS_RUN}) |-> !af_we);
  a_flag_at_zero: assert property (@(posedge clk) disable iff (!rst_n)
    (state == FS_FINAL) |-> (addr == '0));

endmodule
