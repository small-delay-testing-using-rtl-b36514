`timescale 1ns/1ps
// ring_oscillator: behavioural model of the DVMC's gated inverter ring.
// This is a behavioural model, not synthesizable logic: each stage is a
// transport delay of TD_PS picoseconds.
//
// Stage 0 is the gating element: it outputs ~(en & taps[TAPS-1]), so with
// en = 0 it is held at 1 and the ring rests in the pattern 1,0,1,0,...
// (taps[k] = 1 for even k). Stages 1..TAPS-1 are inverters. With TAPS odd the
// loop inverts and, once en rises, a wavefront runs round the ring: after m
// stage delays the first (m mod TAPS) taps have toggled, and the whole ring
// oscillates with a period of 2*TAPS*TD_PS. taps[TAPS-1] is the output the
// round counter counts.
//
// The ring, its output taps and the counter it drives follow the DVMC of the
// design; the number of stages (7) and the stage delay are this model's
// choice, and a real ring's delay would come from the cell library.
//
// Tool warnings: the ring is a combinational loop on purpose (that is what an
// oscillator is), so synthesis and lint report a loop through the stages, and
// the `initial` rest values and `#` delays are simulation-only. In silicon
// this block is a hand-placed cell chain, not synthesized logic.
module ring_oscillator #(
  parameter int unsigned TAPS  = 7,
  parameter int unsigned TD_PS = 50
) (
  input  logic            en,
  output logic [TAPS-1:0] taps
);
  for (genvar k = 0; k < TAPS; k++) begin : g_stage
    logic s;
    initial s = (k % 2 == 0);
    assign taps[k] = s;
    if (k == 0) begin : g_gate
      always @(en or taps[TAPS-1]) s <= #(TD_PS * 1ps) ~(en & taps[TAPS-1]);
    end else begin : g_inv
      always @(taps[k-1]) s <= #(TD_PS * 1ps) ~taps[k-1];
    end
  end
endmodule
