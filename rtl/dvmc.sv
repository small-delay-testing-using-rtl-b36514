`timescale 1ns/1ps
// dvmc: delay value measurement circuit, a ring-oscillator time-to-digital
// converter.
//
// A rising edge on start (the CUT clock) sets the arm flip-flop, which enables
// the ring oscillator; rst clears the arm flip-flop and the round counter and
// so stops the ring. The arm edge also records the level of stop, so that
// stop_edge = stop ^ stop_init rises on the first transition of stop of
// either direction: this is the selector of the design that chooses between
// stop and its inverted copy, here chosen automatically. With se = 0 the
// capture clock stck is stop_edge: its rising edge makes the TAPS tap
// flip-flops take the state of the ring stages and the TRC take its count.
// With se = 1 stck is clk0 and the 14-bit result shifts out on so, one bit per
// rising clk0 edge: first the count (least significant bit first), then the
// taps from TAPS-1 down to 0; si enters behind them.
//
// The measured time is (2*TAPS*count + phase) stage delays, with phase decoded
// from the taps (see dvmc_decoder). Structure and names (start, stop, SE,
// rst, TRC, sd, stck, SO, clk0) follow the DVMC of the design; the 7/7 split
// of the 14 register bits, the automatic stop polarity and the bit order are
// this design's choice. The original drawing marks the arm flip-flop with
// clk0; here it is clocked by start itself, as the written description has
// the start transition trigger the measurement. The ring is a behavioural
// model.
//
// Tool warnings: the ring output taps[TAPS-1] clocks the counter while all
// taps are also sampled as data by the tap flip-flops, and the arm flip-flop
// is reset asynchronously and also gates the ring; lint reports these nets as
// used both synchronously and asynchronously. That mixing is the
// measurement principle of a ring-oscillator TDC and stands as it is.
module dvmc
  import odm_pkg::*;
#(
  parameter int unsigned TAPS  = RING_TAPS,
  parameter int unsigned NCNT  = TRC_BITS,
  parameter int unsigned TD_PS = 50
) (
  input  logic start,
  input  logic stop,
  input  logic clk0,
  input  logic se,
  input  logic rst,
  input  logic si,
  output logic so
);
  logic            armed;
  logic            stop_init;
  logic            stop_edge;
  logic            stck;
  logic [TAPS-1:0] taps;
  logic [TAPS-1:0] cap;

  always_ff @(posedge start or posedge rst) begin
    if (rst) armed <= 1'b0;
    else     armed <= 1'b1;
  end

  always_ff @(posedge start) begin
    if (!armed) stop_init <= stop;
  end

  assign stop_edge = stop ^ stop_init;
  assign stck      = se ? clk0 : stop_edge;

  ring_oscillator #(.TAPS(TAPS), .TD_PS(TD_PS)) u_ring (
    .en   (armed),
    .taps (taps)
  );

  always_ff @(posedge stck) begin
    if (se) cap <= {cap[TAPS-2:0], si};
    else    cap <= taps;
  end

  trc #(.N(NCNT)) u_trc (
    .rst      (rst),
    .ring_clk (taps[TAPS-1]),
    .stck     (stck),
    .se       (se),
    .sd       (cap[TAPS-1]),
    .so       (so)
  );
endmodule
