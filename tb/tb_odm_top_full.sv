`timescale 1ns/1ps
// tb_odm_top_full: the same end-to-end test with the top at its default
// size (214-cell chain in 8 segments, 10 control points, 20 observation
// points).
//
// Self-checking, no ports: it prints one TB_RESULT line and calls $finish;
// a watchdog ends it with a failure if it hangs.
// No parameter is overridden on the top.
module tb_odm_top_full;
  odm_top_env #(.FULL(1), .LEN(214), .NSEG(8), .NC(10), .NO(20)) u_env ();
endmodule
