`timescale 1ns/1ps
// odm_pkg: types and constants shared by the on-chip path delay measurement
// (ODM) system.
//
// The DVMC result register is 14 bits wide and is read out in 14 clock cycles,
// as in the reference configuration. How those 14 bits split between ring
// taps and the round counter (7 + 7) is this design's choice. A measurement
// is described to the controller by a descriptor holding the LOS/LOC launch
// mode, the SSG control data d_i, the shift count s_i and the per-segment
// scan enables used on the launch edge.
package odm_pkg;

  // DVMC result register: RING_TAPS tap flip-flops followed by TRC_BITS
  // counter bits, shifted out tap 0 first.
  localparam int unsigned DVMC_BITS = 14;
  localparam int unsigned RING_TAPS = 7;
  localparam int unsigned TRC_BITS  = DVMC_BITS - RING_TAPS;

  // Launch mode of one measurement.
  typedef enum logic {
    LAUNCH_LOS = 1'b0,   // launch off shift: last scan shift launches
    LAUNCH_LOC = 1'b1    // launch off capture: functional launch, then capture
  } launch_mode_e;

  // Controller sequencing states.
  typedef enum logic [1:0] {
    ST_IDLE    = 2'd0,
    ST_SHIFT   = 2'd1,   // s_i scan shifts of new test data
    ST_LAUNCH  = 2'd2,   // period whose closing edge is the launch edge
    ST_READ    = 2'd3    // T_D readout cycles of the DVMC
  } ctrl_state_e;

endpackage
