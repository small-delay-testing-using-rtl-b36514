`timescale 1ns/1ps
// tb_ssg: drives random inputs and selects into a 10-input SSG and checks that
// the selected line, and only that, reaches ssg_out; selects past N-1 give 0.
//
// Self-checking, no ports: it prints one TB_RESULT line and calls $finish;
// a watchdog ends it with a failure if it hangs.
// Expected values come from direct indexing in the testbench.
module tb_ssg;
  localparam int unsigned N = 10, SW = 4;
  int checks = 0, failures = 0;
  logic [N-1:0] ssg_in; logic [SW-1:0] sel; logic ssg_out;
  ssg #(.N(N), .SW(SW)) dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 500; i++) begin
      ssg_in = N'($urandom); sel = SW'($urandom); #1;
      checks++;
      if (ssg_out !== ((sel < N) ? ssg_in[sel] : 1'b0)) begin
        failures++; $display("FAIL: sel=%0d in=%b out=%b", sel, ssg_in, ssg_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
