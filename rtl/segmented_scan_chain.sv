`timescale 1ns/1ps
// segmented_scan_chain: scan chain of LEN mux-D cells cut into NSEG segments,
// each controlled by its own scan enable.
//
// Cells are numbered from the scan-out end: cell 0 drives so, cell LEN-1 takes
// si, and on a shift cell k loads cell k+1. Written as a bit vector this puts
// the scan-out end on the left, as in the printed pattern examples, where a
// one-bit shift turns X1101XX into 1101XXX. Segment g holds cells
// g*SEG_LEN .. g*SEG_LEN+SEG_LEN-1 with SEG_LEN = ceil(LEN/NSEG) (the segment
// length L = L0/N_S of the segmented-scan procedure, rounded up; the last
// segment may be shorter). se[g] = 1 makes segment g shift, se[g] = 0 makes it
// capture its functional inputs d. Driving different values on the segment
// enables in the launch cycle is what lets segmented scan launch patterns
// that a single one-bit shift cannot. hold = 1 freezes every cell.
// All timing is single-cycle: one clk edge, one shift or capture.
// Segments with their own scan enables follow the design; the mux-D cell,
// the hold input, the bit numbering and rounding the segment length up are
// this design's choices.
module segmented_scan_chain #(
  parameter int unsigned LEN  = 214,
  parameter int unsigned NSEG = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [NSEG-1:0] se,
  input  logic            hold,
  input  logic            si,
  input  logic [LEN-1:0]  d,
  output logic [LEN-1:0]  q,
  output logic            so
);
  localparam int unsigned SEG_LEN = (LEN + NSEG - 1) / NSEG;

  logic [LEN-1:0] scan_in;

  always_comb begin
    scan_in = {si, q[LEN-1:1]};
  end

  for (genvar k = 0; k < LEN; k++) begin : g_cell
    scan_cell u_cell (
      .clk  (clk),
      .rst  (rst),
      .se   (se[k / SEG_LEN]),
      .hold (hold),
      .d    (d[k]),
      .si   (scan_in[k]),
      .q    (q[k])
    );
  end

  assign so = q[0];
endmodule
