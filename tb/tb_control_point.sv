`timescale 1ns/1ps
// tb_control_point: loads the dedicated flip-flop by scan and checks that the
// node is forced to it only when the control point is enabled, that the
// flip-flop keeps its value outside scan shifts and on hold, and that so
// passes it on.
//
// Self-checking, no ports: it prints one TB_RESULT line and calls $finish;
// a watchdog ends it with a failure if it hangs.
// The scenarios are this testbench's own; the selector behaviour checked is
// that of the control point described for the design.
module tb_control_point;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, se, hold, cp_en, si, so, node_in, node_out;
  logic ref_ff;
  control_point dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    se = 0; hold = 0; cp_en = 0; si = 0; node_in = 0; ref_ff = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int cyc = 0; cyc < 300; cyc++) begin
      @(negedge clk);
      se = $urandom; hold = ($urandom % 4) == 0; si = $urandom;
      @(posedge clk);
      if (!hold && se) ref_ff = si;
      #1;
      for (int t = 0; t < 4; t++) begin
        cp_en = t[0]; node_in = t[1]; #0.1;
        check(node_out == (cp_en ? ref_ff : node_in), $sformatf("node_out cyc %0d", cyc));
      end
      check(so == ref_ff, "so");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
