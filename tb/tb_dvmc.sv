`timescale 1ns/1ps
// tb_dvmc: measures known start-to-stop intervals, with rising and falling
// stop transitions, reads the 14-bit result out serially and compares it
// with the word worked out from the interval: m = floor(interval / TD) stage
// delays give count = m / 14 and a tap pattern with phase m mod 14.
//
// Self-checking, no ports: it prints one TB_RESULT line and calls $finish;
// a watchdog ends it with a failure if it hangs.
// The interval-to-word formula is worked out from the ring's structure,
// independently of the RTL.
module tb_dvmc;
  localparam int unsigned TAPS = 7, NCNT = 7, TD_PS = 50;
  int checks = 0, failures = 0;
  logic start = 0, stop = 0, clk0 = 0, se = 0, rst = 1, si = 0, so;
  dvmc #(.TAPS(TAPS), .NCNT(NCNT), .TD_PS(TD_PS)) dut (.*);
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [NCNT+TAPS-1:0] expected_word(input int m);
    logic [NCNT+TAPS-1:0] w; int ph; logic t;
    ph = m % (2 * TAPS);
    w[NCNT-1:0] = NCNT'(m / (2 * TAPS));
    for (int k = 0; k < TAPS; k++) begin
      t = (k % 2 == 0) ^ ((ph <= TAPS) ? (k < ph) : (k >= ph - TAPS));
      w[NCNT + (TAPS - 1 - k)] = t;
    end
    return w;
  endfunction

  initial begin
    // the first rst pulse below must be an edge whatever the power-up level
    #1 rst = 0; #1;
    for (int t = 0; t < 40; t++) begin
      int m, dly; logic pol; logic [NCNT+TAPS-1:0] got, exp_w;
      m   = (t < 4) ? t : ($urandom % 1500);
      dly = m * TD_PS + 10 + ($urandom % (TD_PS - 20));
      pol = 1'($urandom);
      se = 0; rst = 1; stop = ~pol; start = 0;
      #5; rst = 0; #5;
      start = 1;                         // launch edge: DVMC starts
      #(dly * 1ps) stop = pol;           // transition reaches stop
      #2 start = 0;
      #(1ns * (m / 20 + 1));
      se = 1; #1;
      for (int i = 0; i < NCNT + TAPS; i++) begin
        got[i] = so;
        #1 clk0 = 1; #1 clk0 = 0;
      end
      exp_w = expected_word(m);
      checks++;
      if (got != exp_w) begin
        failures++; $display("FAIL: m=%0d dly=%0dps pol=%0b got=%b exp=%b", m, dly, pol, got, exp_w);
      end
    end
    // stop going back to its first level must not change the result
    se = 0; rst = 1; stop = 0; start = 0; #5 rst = 0; #5 start = 1;
    #(3 * TD_PS * 1ps + 20ps) stop = 1;
    #(10 * TD_PS * 1ps) stop = 0;
    #(10 * TD_PS * 1ps);
    se = 1; #1;
    begin
      logic [NCNT+TAPS-1:0] got;
      for (int i = 0; i < NCNT + TAPS; i++) begin got[i] = so; #1 clk0 = 1; #1 clk0 = 0; end
      checks++;
      if (got != expected_word(3)) begin
        failures++; $display("FAIL: result changed when stop returned: %b", got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
