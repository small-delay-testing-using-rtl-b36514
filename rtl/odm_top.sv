`timescale 1ns/1ps
// odm_top: on-chip path delay measurement system around a circuit under test.
//
// The CUT's combinational logic stays outside: its LEN flip-flops are the
// cells of a segmented scan chain (cut_q out, cut_d in), its NC control
// points are wired through cp_node_in/cp_node_out, and its NO observation
// points come in on obs_node. The stop signal generator (SSG) selects one of
// cut_d[0..LEN-1] or obs_node[0..NO-1]; its output is the stop of the DVMC,
// whose start is the CUT clock itself, so a measurement is the time from the
// launch edge to the transition at the selected flip-flop input or
// observation point. The controller sequences the LOS/LOC launches, the
// compacted test data shifts and the 14-bit DVMC readout; dvmc_decoder turns
// each result word into a delay in ring stage delays.
//
// Scan order, from tdi: chain cell LEN-1 ... cell 0, then control-point
// flip-flops 0 .. NC-1, then tdo. Written as a vector with the scan-out end on
// the left a full pattern is cp[NC-1] .. cp[0], cell 0 .. cell LEN-1, which is
// TOTAL = LEN + NC bits, and a full load is s_i = TOTAL. The control-point
// flip-flops shift only in the shift phase, so they keep their values through
// a launch. test_mode enables the control points.
//
// Timing: everything runs on clk. A measurement takes s_i + 1 + 14 clk
// periods from the cycle its descriptor is taken, and its result appears one
// cycle after the last readout bit (see odm_controller). rst is asynchronous,
// active high, and also clears the DVMC (this design's choice).
//
// Default sizes are the published s5378 configuration of the combined
// LOS/LOC system (8 segments, 10 control points, 20 observation points). The
// chain length of 214 (179 flip-flops plus one for each of the 35 primary
// inputs) is this design's assumption from the benchmark's size; it is not
// given with the design.
module odm_top
  import odm_pkg::*;
#(
  parameter int unsigned LEN   = 214,
  parameter int unsigned NSEG  = 8,
  parameter int unsigned NC    = 10,
  parameter int unsigned NO    = 20,
  parameter int unsigned TD_PS = 50,
  parameter int unsigned NSSG  = LEN + NO,
  parameter int unsigned SW    = $clog2(NSSG),
  parameter int unsigned TOTAL = LEN + NC,
  parameter int unsigned CW    = $clog2(TOTAL + 1),
  parameter int unsigned DW    = TRC_BITS + $clog2(2 * RING_TAPS)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 test_mode,
  // measurement descriptors (mode, d_i, s_i, launch segment enables)
  input  logic                 desc_valid,
  output logic                 desc_ready,
  input  launch_mode_e         desc_mode,
  input  logic [SW-1:0]        desc_sel,
  input  logic [CW-1:0]        desc_shift,
  input  logic [NSEG-1:0]      desc_launch_se,
  // compacted test data stream V
  input  logic                 tdi,
  output logic                 tdi_req,
  output logic                 tdo,
  // circuit under test
  output logic [LEN-1:0]       cut_q,
  input  logic [LEN-1:0]       cut_d,
  input  logic [NC-1:0]        cp_node_in,
  output logic [NC-1:0]        cp_node_out,
  input  logic [NO-1:0]        obs_node,
  // measurement results
  output logic                 result_valid,
  output logic [DVMC_BITS-1:0] result,
  output logic [SW-1:0]        result_sel,
  output logic [DW-1:0]        result_delay,
  output logic                 result_delay_ok,
  output logic                 busy
);
  logic [NSEG-1:0] chain_se;
  logic            chain_hold;
  logic            cp_se;
  logic [SW-1:0]   ssg_sel;
  logic            dvmc_rst;
  logic            dvmc_se;
  logic            dvmc_so;
  logic            chain_so;
  logic            stop;
  logic [NC:0]     cp_chain;

  odm_controller #(.NSEG(NSEG), .SW(SW), .CW(CW), .TD(DVMC_BITS)) u_ctrl (
    .clk            (clk),
    .rst            (rst),
    .desc_valid     (desc_valid),
    .desc_ready     (desc_ready),
    .desc_mode      (desc_mode),
    .desc_sel       (desc_sel),
    .desc_shift     (desc_shift),
    .desc_launch_se (desc_launch_se),
    .tdi_req        (tdi_req),
    .chain_se       (chain_se),
    .chain_hold     (chain_hold),
    .cp_se          (cp_se),
    .ssg_sel        (ssg_sel),
    .dvmc_rst       (dvmc_rst),
    .dvmc_se        (dvmc_se),
    .dvmc_so        (dvmc_so),
    .result_valid   (result_valid),
    .result         (result),
    .result_sel     (result_sel),
    .busy           (busy)
  );

  segmented_scan_chain #(.LEN(LEN), .NSEG(NSEG)) u_chain (
    .clk  (clk),
    .rst  (rst),
    .se   (chain_se),
    .hold (chain_hold),
    .si   (tdi),
    .d    (cut_d),
    .q    (cut_q),
    .so   (chain_so)
  );

  assign cp_chain[0] = chain_so;
  for (genvar c = 0; c < NC; c++) begin : g_cp
    control_point u_cp (
      .clk      (clk),
      .rst      (rst),
      .se       (cp_se),
      .hold     (chain_hold),
      .cp_en    (test_mode),
      .si       (cp_chain[c]),
      .so       (cp_chain[c+1]),
      .node_in  (cp_node_in[c]),
      .node_out (cp_node_out[c])
    );
  end
  assign tdo = cp_chain[NC];

  ssg #(.N(NSSG), .SW(SW)) u_ssg (
    .ssg_in  ({obs_node, cut_d}),
    .sel     (ssg_sel),
    .ssg_out (stop)
  );

  dvmc #(.TAPS(RING_TAPS), .NCNT(TRC_BITS), .TD_PS(TD_PS)) u_dvmc (
    .start (clk),
    .stop  (stop),
    .clk0  (~clk),
    .se    (dvmc_se),
    .rst   (dvmc_rst | rst),
    .si    (1'b0),
    .so    (dvmc_so)
  );

  dvmc_decoder #(.TAPS(RING_TAPS), .NCNT(TRC_BITS), .DW(DW)) u_dec (
    .word  (result),
    .delay (result_delay),
    .valid (result_delay_ok)
  );
endmodule
