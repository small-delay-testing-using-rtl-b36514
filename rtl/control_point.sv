`timescale 1ns/1ps
// control_point: test point that lets a dedicated scan flip-flop drive a CUT
// node.
//
// A selector sits on the node: node_out = cp_en ? ff value : node_in. The
// dedicated flip-flop is an ordinary scan cell, clocked by the system clock
// and linked into the scan chain through si/so, so its value (normally the
// non-controlling value of the gate the node feeds) is loaded by scan. Its
// functional input is its own output, so outside scan shifts it keeps what
// was shifted in. Placing the selector on the node and the flip-flop in the
// scan chain follows the control point of the design; driving the selector
// from a separate test-mode enable, rather than from the scan enable, is this
// design's choice, so that the forced value also holds through an LOC launch
// (where scan enable is low). The node path is combinational.
module control_point (
  input  logic clk,
  input  logic rst,
  input  logic se,
  input  logic hold,
  input  logic cp_en,
  input  logic si,
  output logic so,
  input  logic node_in,
  output logic node_out
);
  logic ff_q;

  scan_cell u_ff (
    .clk  (clk),
    .rst  (rst),
    .se   (se),
    .hold (hold),
    .d    (ff_q),
    .si   (si),
    .q    (ff_q)
  );

  assign so       = ff_q;
  assign node_out = cp_en ? ff_q : node_in;
endmodule
