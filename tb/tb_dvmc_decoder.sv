`timescale 1ns/1ps
// tb_dvmc_decoder: builds readout words for every delay 0..1777 stage delays
// from the ring's state formula and checks the decoded delay; then checks
// that tap patterns which no ring state produces are flagged invalid.
//
// Self-checking, no ports: it prints one TB_RESULT line and calls $finish;
// a watchdog ends it with a failure if it hangs.
// The ring-state formula is independent of the decoder's matching logic.
module tb_dvmc_decoder;
  localparam int unsigned TAPS = 7, NCNT = 7, DW = NCNT + 4;
  int checks = 0, failures = 0;
  logic [NCNT+TAPS-1:0] word; logic [DW-1:0] delay; logic valid;
  dvmc_decoder #(.TAPS(TAPS), .NCNT(NCNT), .DW(DW)) dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int m = 0; m < 1778; m++) begin
      int ph; ph = m % 14;
      word[NCNT-1:0] = NCNT'(m / 14);
      for (int k = 0; k < TAPS; k++)
        word[NCNT + TAPS - 1 - k] = (k % 2 == 0) ^ ((ph <= TAPS) ? (k < ph) : (k >= ph - TAPS));
      #1;
      checks++;
      if (!valid || delay != DW'(m)) begin failures++; $display("FAIL: m=%0d delay=%0d valid=%b", m, delay, valid); end
    end
    // bubble patterns: rest pattern with only tap 3 toggled, and with taps 1,3
    foreach (word[i]) word[i] = 0;
    for (int k = 0; k < TAPS; k++) word[NCNT + TAPS - 1 - k] = (k % 2 == 0) ^ (k == 3);
    #1 checks++; if (valid) begin failures++; $display("FAIL: bubble accepted"); end
    for (int k = 0; k < TAPS; k++) word[NCNT + TAPS - 1 - k] = (k % 2 == 0) ^ (k == 1 || k == 3);
    #1 checks++; if (valid) begin failures++; $display("FAIL: bubble 2 accepted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
