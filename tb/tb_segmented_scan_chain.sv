`timescale 1ns/1ps
// tb_segmented_scan_chain: checks the segmented scan chain against a
// reference model, and replays the two-segment example: a 4-cell chain
// FF1..FF4 (FF1 nearest scan-in) in two segments, loaded with
// (FF1,FF2,FF3,FF4) = (1,1,0,0) and launched with SE1 = 1, SE2 = 0, so that
// FF3 captures its functional value 0 instead of shifting in FF2's 1.
//
// Self-checking, no ports: it prints one TB_RESULT line and calls $finish;
// a watchdog ends it with a failure if it hangs.
// The two-segment example follows the published illustration of segmented
// scan; the random test is this testbench's own.
module tb_segmented_scan_chain;
  localparam int unsigned LEN = 10, NSEG = 3, SEG_LEN = (LEN + NSEG - 1) / NSEG;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [NSEG-1:0] se;
  logic hold, si;
  logic [LEN-1:0] d, q, model;
  logic so;

  segmented_scan_chain #(.LEN(LEN), .NSEG(NSEG)) dut (.*);

  // small chain for the segmented-scan example
  logic [1:0] se4;
  logic hold4, si4, so4;
  logic [3:0] d4, q4;
  segmented_scan_chain #(.LEN(4), .NSEG(2)) dut4 (
    .clk(clk), .rst(rst), .se(se4), .hold(hold4), .si(si4), .d(d4), .q(q4), .so(so4));
  // cells: 3 = FF1, 2 = FF2, 1 = FF3, 0 = FF4; FF3.D = ~(FF1 & FF2)
  always_comb begin
    d4    = '0;
    d4[1] = ~(q4[3] & q4[2]);
    d4[0] = (q4[3] & q4[2]) | q4[1];
  end

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    se = '0; hold = 0; si = 0; d = '0; se4 = '0; hold4 = 1; si4 = 0;
    model = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // random operation against the reference model
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      se = NSEG'($urandom); hold = ($urandom % 5) == 0; si = $urandom; d = LEN'($urandom);
      if (cyc < 40) begin se = '1; hold = 0; end
      @(posedge clk);
      if (!hold)
        for (int k = 0; k < LEN; k++)
          model[k] <= se[k / SEG_LEN] ? ((k == LEN - 1) ? si : model[k+1]) : d[k];
      #1;
      check(q == model, $sformatf("cycle %0d q=%b model=%b", cyc, q, model));
      check(so == model[0], "so");
    end
    // the segmented-scan example: scan in FF4 first: 0, 0, 1, 1
    @(negedge clk); se4 = 2'b11; hold4 = 0;
    foreach (q4[k]) begin si4 = (k < 2); @(negedge clk); end
    check(q4 == 4'b1100, $sformatf("example load %b", q4));
    // launch: SE1 (segment 1: FF1, FF2) = 1, SE2 (segment 0: FF3, FF4) = 0
    se4 = 2'b10; si4 = 0; @(negedge clk);
    check(q4[3] == 0 && q4[2] == 1, "FF1/FF2 shifted to (0,1)");
    check(q4[1] == 0, "FF3 captured 0 instead of shifting in 1");
    check(q4[0] == 1, "FF4 captured a|c = 1");
    // the same launch without segmentation puts 1 in FF3
    se4 = 2'b11; foreach (q4[k]) begin si4 = (k < 2); @(negedge clk); end
    si4 = 0; @(negedge clk);
    check(q4[1] == 1, "unsegmented launch shifts FF2's 1 into FF3");
    hold4 = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
