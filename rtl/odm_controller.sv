`timescale 1ns/1ps
// odm_controller: sequencer of the on-chip delay measurement test flow.
//
// Each measurement is given by a descriptor (mode, d_i, s_i, launch segment
// enables) and by s_i+1 (LOS) or s_i (LOC) bits of the compacted test data
// stream V, which the controller takes from tdi one bit per cycle while
// tdi_req = 1. One measurement takes exactly s_i + 1 + T_D clock periods:
//   SHIFT  : s_i periods, every segment and the control-point flip-flops
//            shift (chain_se all ones, cp_se = 1), DVMC held in reset;
//   LAUNCH : 1 period whose closing edge is the launch edge. LOS: the
//            segments shift or capture as launch_se says and the last test
//            data bit enters; LOC: every segment captures its functional
//            input (chain_se = 0). The DVMC reset is released, so the launch
//            edge, which is also the DVMC start, arms the DVMC;
//   READ   : T_D periods. During the first one the transition runs through
//            the path to stop. For LOS the chain is frozen at once (the
//            capture of a conventional LOS test is not needed, so the
//            flip-flops keep the transition pattern); for LOC the closing
//            edge of this first period is the conventional capture. From
//            then on the chain is frozen and the DVMC is in shift mode; the
//            controller samples dvmc_so on each of the T_D rising edges and
//            the DVMC shifts on the falling edges (its clk0 is ~clk).
// The DVMC reset is released only in the LAUNCH period and the first READ
// period. result/result_valid give the T_D-bit word and result_sel the d_i
// it was measured with, one cycle after the last bit. A new descriptor is
// taken in IDLE or in the last READ period, so back-to-back measurements add
// up to T = sum(s_i + 1 + T_D), the test application time of the design.
// The test flow, the S/D/V data and that formula are the design's; the
// descriptor handshake (valid/ready), the hold-based freeze, the clk0 phase
// and the per-segment launch enables as descriptor bits are this design's
// choice.
module odm_controller
  import odm_pkg::*;
#(
  parameter int unsigned NSEG = 8,
  parameter int unsigned SW   = 8,          // SSG control data width
  parameter int unsigned CW   = 8,          // shift count width
  parameter int unsigned TD   = DVMC_BITS   // DVMC readout cycles T_D
) (
  input  logic            clk,
  input  logic            rst,
  // measurement descriptors
  input  logic            desc_valid,
  output logic            desc_ready,
  input  launch_mode_e    desc_mode,
  input  logic [SW-1:0]   desc_sel,
  input  logic [CW-1:0]   desc_shift,
  input  logic [NSEG-1:0] desc_launch_se,
  // test data stream
  output logic            tdi_req,
  // to the scan chain, control points, SSG and DVMC
  output logic [NSEG-1:0] chain_se,
  output logic            chain_hold,
  output logic            cp_se,
  output logic [SW-1:0]   ssg_sel,
  output logic            dvmc_rst,
  output logic            dvmc_se,
  input  logic            dvmc_so,
  // results
  output logic            result_valid,
  output logic [TD-1:0]   result,
  output logic [SW-1:0]   result_sel,
  output logic            busy
);
  localparam int unsigned RW = (TD > 1) ? $clog2(TD) : 1;

  ctrl_state_e     state;
  launch_mode_e    mode;
  logic [CW-1:0]   shift_left;
  logic [NSEG-1:0] launch_se;
  logic [RW-1:0]   rd_cnt;
  logic [TD-1:0]   word;

  logic take;
  assign desc_ready = (state == ST_IDLE) || (state == ST_READ && rd_cnt == RW'(TD - 1));
  assign take       = desc_valid && desc_ready;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state        <= ST_IDLE;
      mode         <= LAUNCH_LOS;
      shift_left   <= '0;
      launch_se    <= '0;
      ssg_sel      <= '0;
      rd_cnt       <= '0;
      word         <= '0;
      result       <= '0;
      result_sel   <= '0;
      result_valid <= 1'b0;
    end else begin
      result_valid <= 1'b0;
      case (state)
        ST_SHIFT: begin
          shift_left <= shift_left - 1'b1;
          if (shift_left == CW'(1)) state <= ST_LAUNCH;
        end
        ST_LAUNCH: begin
          state      <= ST_READ;
          rd_cnt     <= '0;
          result_sel <= ssg_sel;
        end
        ST_READ: begin
          word[rd_cnt] <= dvmc_so;
          rd_cnt       <= rd_cnt + 1'b1;
          if (rd_cnt == RW'(TD - 1)) begin
            result       <= word;
            result[TD-1] <= dvmc_so;
            result_valid <= 1'b1;
            state        <= ST_IDLE;
          end
        end
        default: ;
      endcase
      if (take) begin
        mode       <= desc_mode;
        ssg_sel    <= desc_sel;
        shift_left <= desc_shift;
        launch_se  <= desc_launch_se;
        state      <= (desc_shift == '0) ? ST_LAUNCH : ST_SHIFT;
      end
    end
  end

  always_comb begin
    chain_se   = '0;
    chain_hold = 1'b1;
    cp_se      = 1'b0;
    tdi_req    = 1'b0;
    dvmc_rst   = 1'b1;
    dvmc_se    = 1'b0;
    busy       = (state != ST_IDLE);
    case (state)
      ST_SHIFT: begin
        chain_se   = '1;
        chain_hold = 1'b0;
        cp_se      = 1'b1;
        tdi_req    = 1'b1;
      end
      ST_LAUNCH: begin
        chain_hold = 1'b0;
        dvmc_rst   = 1'b0;
        if (mode == LAUNCH_LOS) begin
          chain_se = launch_se;
          tdi_req  = 1'b1;
        end
      end
      ST_READ: begin
        if (rd_cnt == '0) begin
          dvmc_rst   = 1'b0;
          chain_hold = (mode == LAUNCH_LOS);
        end else begin
          dvmc_se    = 1'b1;
        end
      end
      default: ;
    endcase
  end

  // A descriptor must stay stable while it waits to be taken.
  property p_desc_stable;
    @(posedge clk) disable iff (rst)
      desc_valid && !desc_ready |=> desc_valid && $stable(desc_shift) && $stable(desc_sel);
  endproperty
  a_desc_stable: assert property (p_desc_stable);

  // The chain never shifts or captures while the DVMC result is read out.
  a_frozen_read: assert property (@(posedge clk) disable iff (rst)
    state == ST_READ && rd_cnt != '0 |-> chain_hold);
endmodule
