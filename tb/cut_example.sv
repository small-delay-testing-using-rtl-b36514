`timescale 1ns/1ps
// cut_example: behavioural model, with gate delays, of a small circuit under
// test used by the system testbenches; not part of the design.
//
// It is the four-flip-flop example used to explain segmented scan and test
// points: FF1 and FF2 feed gate B (line a) and gate A, A's inverted output is
// FF3's input, FF3's output is line c, and a and c meet at an OR gate whose
// output is FF4's input. B and A are modelled as AND gates (the example's
// values, (FF1,FF2) going (1,1) -> (0,1) makes a fall, fit that). Line c
// passes through a control point (cp_in out, cp_out back) and line a is an
// observation point. FF1's input is ~FF1 and FF2's input is FF2, so that an
// LOC launch from (FF1,FF2) = (0,1) raises a; any other flip-flop holds.
// Delays: A 333 ps, B 420 ps, OR 305 ps, others 150 ps.
// The connections follow the published example circuit; the gate types and
// all delays are this model's own. Interface: the chain's flip-flop outputs
// in, their next-state lines out, purely combinational with delays.
module cut_example #(
  parameter int unsigned LEN = 4,
  parameter int unsigned I_FF4 = 0,
  parameter int unsigned I_FF3 = 1,
  parameter int unsigned I_FF2 = 2,
  parameter int unsigned I_FF1 = 3
) (
  input  logic [LEN-1:0] q,
  output logic [LEN-1:0] d,
  output logic           cp_in,
  input  logic           cp_out,
  output logic           obs_a
);
  logic a, nand_a;
  assign #0.420 a      = q[I_FF1] & q[I_FF2];
  assign #0.333 nand_a = ~(q[I_FF1] & q[I_FF2]);
  assign cp_in = q[I_FF3];
  assign obs_a = a;
  for (genvar k = 0; k < LEN; k++) begin : g_d
    if (k == I_FF4)      begin : g4 assign #0.305 d[k] = a | cp_out;  end
    else if (k == I_FF3) begin : g3 assign d[k] = nand_a;             end
    else if (k == I_FF1) begin : g1 assign #0.150 d[k] = ~q[k];       end
    else                 begin : go assign #0.150 d[k] = q[k];        end
  end
endmodule
