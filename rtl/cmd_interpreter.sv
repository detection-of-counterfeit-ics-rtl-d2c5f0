`timescale 1ns/1ps
// cmd_interpreter: turns UART bytes into the run-time settings of the
// proof-of-concept system: Trivium key and IV, the number of active leakage
// circuits and the enable of the load circuits.
//
// A command is one code byte followed by its payload:
//   'K' (0x4B) + 10 bytes  key; byte j holds K_{8j+1}..K_{8j+8}, LSB = K_{8j+1}
//   'I' (0x49) + 10 bytes  IV, same layout
//   'N' (0x4E) + 1 byte    bits [5:0] = n, leakage circuits 0..n on
//   'L' (0x4C) + 1 byte    bit 0 = load circuits enabled
// Unknown code bytes are ignored. A setting changes only when its last byte
// has arrived (`updated` pulses then). The key and IV reach the cipher at its
// next (auto-)reset. After reset: key = IV = 0, n = 15 (16 circuits, the
// count used in most of the document's measurements), loads off.
//
// The document says these four settings are controlled at run time over
// UART; the command format and the reset values are this design's choices.
module cmd_interpreter
  import cid_pkg::*;
#(
  parameter int unsigned NLC_W     = 6,
  parameter int unsigned NLC_RESET = 15
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [7:0]       rx_data,
  input  logic             rx_valid,
  output key_t             key,
  output iv_t              iv,
  output logic [NLC_W-1:0] n_active,
  output logic             load_en,
  output logic             updated
);

  localparam int unsigned KBYTES = KEY_BITS / 8;

  logic [7:0]    cmd;
  logic [3:0]    remaining;
  logic [KEY_BITS-1:0] shadow;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd       <= '0;
      remaining <= '0;
      shadow    <= '0;
      key       <= '0;
      iv        <= '0;
      n_active  <= NLC_W'(NLC_RESET);
      load_en   <= 1'b0;
      updated   <= 1'b0;
    end else begin
      updated <= 1'b0;
      if (rx_valid) begin
        if (remaining == 0) begin
          cmd <= rx_data;
          unique case (rx_data)
            CMD_KEY, CMD_IV:   remaining <= 4'(KBYTES);
            CMD_NLC, CMD_LOAD: remaining <= 4'd1;
            default:           remaining <= 4'd0;
          endcase
        end else begin
          remaining <= remaining - 1'b1;
          // first byte ends up in bits [7:0]
          shadow    <= {rx_data, shadow[KEY_BITS-1:8]};
          if (remaining == 4'd1) begin
            updated <= 1'b1;
            unique case (cmd)
              CMD_KEY:  key      <= {rx_data, shadow[KEY_BITS-1:8]};
              CMD_IV:   iv       <= {rx_data, shadow[KEY_BITS-1:8]};
              CMD_NLC:  n_active <= rx_data[NLC_W-1:0];
              CMD_LOAD: load_en  <= rx_data[0];
              default: ;
            endcase
          end
        end
      end
    end
  end

endmodule
