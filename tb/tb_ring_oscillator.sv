`timescale 1ns/1ps
// tb_ring_oscillator: checks the rest pattern, the tap pattern half way
// through each of the first 40 stage delays after enable, and the oscillation
// period 2*TAPS*TD_PS measured by counting rising edges of the last tap.
//
// Self-checking, no ports: it prints one TB_RESULT line and calls $finish;
// a watchdog ends it with a failure if it hangs.
// The expected patterns follow from the ring's structure.
module tb_ring_oscillator;
  localparam int unsigned TAPS = 7, TD_PS = 50;
  int checks = 0, failures = 0;
  logic en = 0;
  logic [TAPS-1:0] taps, rest, expect_taps;
  int rises = 0;
  ring_oscillator #(.TAPS(TAPS), .TD_PS(TD_PS)) dut (.*);
  always @(posedge taps[TAPS-1]) rises++;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int k = 0; k < TAPS; k++) rest[k] = (k % 2 == 0);
    #2;
    checks++; if (taps != rest) begin failures++; $display("FAIL: rest %b", taps); end
    en = 1;
    for (int m = 0; m < 40; m++) begin
      int ph;
      #(0.025);  // reach m*TD + TD/2 from the enable edge
      ph = m % (2 * TAPS);
      for (int k = 0; k < TAPS; k++)
        expect_taps[k] = rest[k] ^ ((ph <= TAPS) ? (k < ph) : (k >= ph - TAPS));
      checks++;
      if (taps != expect_taps) begin failures++; $display("FAIL: m=%0d taps=%b exp=%b", m, taps, expect_taps); end
      #(0.025);
    end
    rises = 0;
    #(100 * 2 * TAPS * TD_PS * 1ps);
    checks++;
    if (rises != 100) begin failures++; $display("FAIL: %0d rises in 100 periods", rises); end
    en = 0;
    #(3 * TAPS * TD_PS * 1ps);
    checks++; if (taps != rest) begin failures++; $display("FAIL: not back at rest %b", taps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
