`timescale 1ns/1ps
// tb_pattern_merging: replays the two worked examples of test pattern
// merging (a 7-cell chain with three LOS patterns, and a 6-cell chain with
// three LOS and two LOC patterns) through the controller and scan chain, see
// merge_rig. Both run side by side; the test ends when both are done.
//
// Self-checking, no ports: it prints one TB_RESULT line and calls $finish;
// a watchdog ends it with a failure if it hangs.
// The examples, their published orders, shift counts and stream come from the
// published description of the method.
module tb_pattern_merging;
  logic done0, done1;
  int   c0, f0, c1, f1;
  merge_rig #(.EX(0)) u_ex0 (.done(done0), .checks(c0), .failures(f0));
  merge_rig #(.EX(1)) u_ex1 (.done(done1), .checks(c1), .failures(f1));
  initial begin
    #30000;
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end
  initial begin
    #1 wait (done0 && done1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end
endmodule
