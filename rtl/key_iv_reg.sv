`timescale 1ns/1ps
// key_iv_reg: the key and IV registers that the crypto engine is started
// from, filled one bit at a time from the antifuse memory.
//
// With `we` high the bit `din` is stored at antifuse address `addr`:
// addresses 1..KEY_BITS go to key[addr-1], addresses KEY_BITS+1 ..
// KEY_BITS+IV_BITS go to iv[addr-KEY_BITS-1]; address 0 (the flag) is
// ignored. Both registers clear on reset, so nothing stale survives a reset.
// The mapping follows the document's memory map; the clearing on reset is
// this design's choice.
module key_iv_reg
  import cid_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AF_AW-1:0] addr,
  input  logic             din,
  output key_t             key,
  output iv_t              iv
);

  localparam int unsigned KW = $clog2(KEY_BITS);
  localparam int unsigned IW = $clog2(IV_BITS);

  logic [AF_AW-1:0] koff, ioff;
  assign koff = addr - AF_AW'(1);
  assign ioff = addr - AF_AW'(KEY_BITS + 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key <= '0;
      iv  <= '0;
    end else if (we) begin
      if (addr >= 1 && addr <= AF_AW'(KEY_BITS))
        key[koff[KW-1:0]] <= din;
      else if (addr > AF_AW'(KEY_BITS) && addr <= AF_AW'(KEY_BITS + IV_BITS))
        iv[ioff[IW-1:0]] <= din;
    end
  end

endmodule
