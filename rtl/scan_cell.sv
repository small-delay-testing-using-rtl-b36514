`timescale 1ns/1ps
// scan_cell: mux-D scan flip-flop with a hold enable.
//
// On a rising clk edge the cell loads the scan input si when se = 1 and the
// functional input d when se = 0; when hold = 1 it keeps its value. The mux-D
// cell is the usual scan cell of the scan chains the design is built on; the
// hold input is this design's way of stopping the CUT flip-flops while the
// delay measurement result is read out, so that they keep the transition
// pattern (equivalent to gating their clock). Reset is asynchronous, active
// high, to 0.
module scan_cell (
  input  logic clk,
  input  logic rst,
  input  logic se,
  input  logic hold,
  input  logic d,
  input  logic si,
  output logic q
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)        q <= 1'b0;
    else if (!hold) q <= se ? si : d;
  end
endmodule
