`timescale 1ns/1ps
// tb_odm_top: end-to-end test of the delay measurement system at a reduced
// size (4-cell chain in 2 segments, 1 control point, 1 observation point).
//
// Self-checking, no ports: it prints one TB_RESULT line and calls $finish;
// a watchdog ends it with a failure if it hangs.
// The scenario and the example CUT are described in odm_top_env.
module tb_odm_top;
  odm_top_env #(.FULL(0), .LEN(4), .NSEG(2), .NC(1), .NO(1)) u_env ();
endmodule
