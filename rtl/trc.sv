`timescale 1ns/1ps
// trc: round counter of the DVMC, with its capture/shift register.
//
// cnt is an N-bit up counter clocked by the ring oscillator output ring_clk;
// it counts the completed rounds of the oscillation and is cleared by rst
// (asynchronous, active high). The register r is clocked by stck, the DVMC's
// capture/shift clock: with se = 0 an edge of stck (the stop transition)
// copies cnt into r; with se = 1 an edge shifts r one place towards so, taking
// sd in at the top (r <= {sd, r[N-1:1]}, so = r[0]), so the count leaves
// least significant bit first, followed by whatever was chained into sd.
// The counter, the capture on stop and the serial readout are the design's;
// the separate capture register and the bit order are this design's choice.
module trc #(
  parameter int unsigned N = 7
) (
  input  logic rst,
  input  logic ring_clk,
  input  logic stck,
  input  logic se,
  input  logic sd,
  output logic so
);
  logic [N-1:0] cnt;
  logic [N-1:0] r;

  always_ff @(posedge ring_clk or posedge rst) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt + 1'b1;
  end

  always_ff @(posedge stck) begin
    if (se) r <= {sd, r[N-1:1]};
    else    r <= cnt;
  end

  assign so = r[0];
endmodule
