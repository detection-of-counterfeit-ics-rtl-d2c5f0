`timescale 1ns/1ps
// leakage_array: N_LC leakage circuits in parallel, driven by one bit.
//
// Circuit i is driven by `leak_in` when i <= n_active and held at 0
// otherwise, so n_active = 0 turns on one circuit and the all-ones value turns
// on all of them. More active circuits give a stronger EM signal. `lc_en`
// shows each circuit's input, `lc_out` each circuit's output.
//
// From the document: the bit is fed into several leakage circuits in
// parallel; the proof-of-concept system has 64 of them and a 6-bit count of
// active ones. Reading that count as "circuits 0..n" (so that all 64 can be
// on) is this design's choice.
module leakage_array #(
  parameter int unsigned N_LC  = 64,
  parameter int unsigned CNT_W = (N_LC > 1) ? $clog2(N_LC) : 1
) (
  input  logic             leak_in,
  input  logic [CNT_W-1:0] n_active,
  output logic [N_LC-1:0]  lc_en,
  output logic [N_LC-1:0]  lc_out
);

  for (genvar i = 0; i < N_LC; i++) begin : g_lc
    assign lc_en[i] = leak_in && (i <= int'(n_active));
    leakage_circuit u_lc (
      .en     (lc_en[i]),
      .lc_out (lc_out[i])
    );
  end

endmodule
