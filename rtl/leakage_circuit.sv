`timescale 1ns/1ps
// leakage_circuit: BEHAVIOURAL MODEL (not synthesizable) of one leakage
// circuit, the analog-by-design amplifier that turns a logic level into
// extra electromagnetic emission.
//
// Structure, as drawn in the document: four 2-input NAND gates, each with one
// input on the common input `en` and the other on its own output; NANDs 0/1
// feed one OR gate, NANDs 2/3 the other, and both ORs feed an AND gate whose
// output is `lc_out`. While `en` is 0 every NAND output is 1, so nothing
// moves. While `en` is 1 every NAND with its feedback is a ring oscillator.
// The four oscillators run at slightly different rates, so their edges reach
// the ORs at different times and the OR/AND outputs glitch several times per
// oscillation; that switching activity is what the EM probe sees.
//
// Real oscillation depends on gate delays; here each NAND gets its own delay
// (parameters, this model's own values) so the simulation oscillates. The
// model needs a simulator with timing support. On silicon this cell must be
// placed as hand-instantiated gates that synthesis does not optimise away.
module leakage_circuit #(
  parameter int unsigned NAND0_PS = 1100,  // NAND delays in picoseconds
  parameter int unsigned NAND1_PS = 1300,
  parameter int unsigned NAND2_PS = 1700,
  parameter int unsigned NAND3_PS = 1900
) (
  input  logic en,       // leakage enable (keystream bit)
  output logic lc_out    // AND output: glitches while en is 1
);

  logic [3:0] nand_q = 4'b1111;
  logic       or0, or1;

  localparam realtime D0 = NAND0_PS * 1ps;
  localparam realtime D1 = NAND1_PS * 1ps;
  localparam realtime D2 = NAND2_PS * 1ps;
  localparam realtime D3 = NAND3_PS * 1ps;

  // NAND with its own output fed back: a ring oscillator while en is 1.
  always begin
    if (!en) begin nand_q[0] = 1'b1; @(posedge en); end
    else     begin #(D0) nand_q[0] = ~(en & nand_q[0]); end
  end
  always begin
    if (!en) begin nand_q[1] = 1'b1; @(posedge en); end
    else     begin #(D1) nand_q[1] = ~(en & nand_q[1]); end
  end
  always begin
    if (!en) begin nand_q[2] = 1'b1; @(posedge en); end
    else     begin #(D2) nand_q[2] = ~(en & nand_q[2]); end
  end
  always begin
    if (!en) begin nand_q[3] = 1'b1; @(posedge en); end
    else     begin #(D3) nand_q[3] = ~(en & nand_q[3]); end
  end

  assign or0    = nand_q[0] | nand_q[1];
  assign or1    = nand_q[2] | nand_q[3];
  assign lc_out = or0 & or1;

endmodule
