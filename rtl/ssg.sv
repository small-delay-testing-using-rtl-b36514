`timescale 1ns/1ps
// ssg: stop signal generator, an N-to-1 multiplexer.
//
// Its inputs are the D inputs of the CUT flip-flops (ssg_in_i) followed by the
// observation points. The control data sel (d_i, log2 N bits) picks the one
// line whose transition is forwarded on ssg_out to the stop input of the
// DVMC. A select beyond N-1 gives 0. Purely combinational.
module ssg #(
  parameter int unsigned N  = 234,
  parameter int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  ssg_in,
  input  logic [SW-1:0] sel,
  output logic          ssg_out
);
  always_comb begin
    ssg_out = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      if (sel == SW'(k)) ssg_out = ssg_in[k];
    end
  end
endmodule
