`timescale 1ns/1ps
// tb_trc: counts random numbers of ring pulses, captures the count on a stck
// edge with se = 0, shifts it out with se = 1 (least significant bit first,
// followed by the sd bits) and checks the asynchronous clear.
//
// Self-checking, no ports: it prints one TB_RESULT line and calls $finish;
// a watchdog ends it with a failure if it hangs.
// The bit order checked is this design's own choice.
module tb_trc;
  localparam int unsigned N = 7;
  int checks = 0, failures = 0;
  logic rst = 1, ring_clk = 0, stck = 0, se = 0, sd = 0, so;
  trc #(.N(N)) dut (.*);
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic pulse_ring(); #1 ring_clk = 1; #1 ring_clk = 0; endtask
  task automatic pulse_st();   #1 stck = 1;     #1 stck = 0;     endtask
  initial begin
    #2 rst = 0; #1;
    for (int t = 0; t < 30; t++) begin
      int n; logic [N-1:0] got; logic [2:0] sdv;
      n = $urandom % 300;
      rst = 1; #1 rst = 0;
      for (int i = 0; i < n; i++) pulse_ring();
      se = 0; pulse_st();
      // the counter keeps running after the capture
      pulse_ring();
      se = 1; sdv = 3'($urandom);
      for (int i = 0; i < N + 3; i++) begin
        if (i < N) got[i] = so;
        else begin checks++; if (so != sdv[i-N]) begin failures++; $display("FAIL: sd bit %0d", i-N); end end
        sd = sdv[i < 3 ? i : 0];
        pulse_st();
      end
      checks++;
      if (got != N'(n)) begin failures++; $display("FAIL: count %0d read %0d", n, got); end
    end
    // clear
    for (int i = 0; i < 5; i++) pulse_ring();
    rst = 1; #1 rst = 0; se = 0; pulse_st(); se = 1;
    checks++;
    if (so != 0) begin failures++; $display("FAIL: not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
