`timescale 1ns/1ps
// tb_odm_controller: feeds back-to-back descriptors (LOS and LOC, shift
// counts including 0 and the full chain, random SSG selects and launch
// segment enables) to the controller, with a model of the DVMC's shift
// register on dvmc_so, and checks per measurement: s_i+1+T_D periods between
// descriptors, s_i+1 (LOS) or s_i (LOC) test data bits taken, the scan
// enables in the shift and launch periods, the freeze during readout, the
// DVMC reset window, and the result word and its SSG select.
//
// Self-checking, no ports: it prints one TB_RESULT line and calls $finish;
// a watchdog ends it with a failure if it hangs.
// The timing it checks, sum(s_i + 1 + 14), is the design's test time formula;
// the descriptor protocol is this design's own.
module tb_odm_controller;
  import odm_pkg::*;
  localparam int unsigned NSEG = 3, SW = 5, CW = 5, TD = DVMC_BITS;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic desc_valid, desc_ready; launch_mode_e desc_mode;
  logic [SW-1:0] desc_sel; logic [CW-1:0] desc_shift; logic [NSEG-1:0] desc_launch_se;
  logic tdi_req; logic [NSEG-1:0] chain_se; logic chain_hold, cp_se;
  logic [SW-1:0] ssg_sel; logic dvmc_rst, dvmc_se, dvmc_so;
  logic result_valid; logic [TD-1:0] result; logic [SW-1:0] result_sel; logic busy;
  odm_controller #(.NSEG(NSEG), .SW(SW), .CW(CW), .TD(TD)) dut (.*);

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // DVMC shift-register model: loads the word of the current measurement
  // while se = 0, shifts on falling clk edges while se = 1.
  logic [TD-1:0] dvmc_reg, cur_word;
  always @(negedge clk) dvmc_reg <= dvmc_se ? {1'b0, dvmc_reg[TD-1:1]} : cur_word;
  assign dvmc_so = dvmc_reg[0];

  localparam int NMEAS = 40;
  launch_mode_e  m_mode [NMEAS];
  int            m_s    [NMEAS];
  logic [SW-1:0] m_sel  [NMEAS];
  logic [NSEG-1:0] m_lse[NMEAS];
  logic [TD-1:0] m_word [NMEAS];

  // per-measurement observation
  int cyc = 0, take_cyc[NMEAS], n_take = 0, n_res = 0;
  int bits_taken[NMEAS], shift_ok[NMEAS], launch_ok[NMEAS], freeze_ok[NMEAS], rst_low[NMEAS];
  int launch_seen[NMEAS];

  always @(posedge clk) if (!rst) begin
    int cur;
    cyc++;
    cur = n_take - 1;
    if (desc_valid && desc_ready) begin
      take_cyc[n_take] = cyc;
      cur_word <= m_word[n_take];
      n_take++;
    end
    if (cur >= 0 && busy) begin
      if (tdi_req) bits_taken[cur]++;
      if (!dvmc_rst) rst_low[cur]++;
      if (cp_se) begin
        if (chain_se != '1 || chain_hold) shift_ok[cur] = 0;
      end else if (!dvmc_rst && !dvmc_se && !chain_hold && launch_seen[cur] == 0) begin
        launch_seen[cur] = 1;
        if (chain_se != ((m_mode[cur] == LAUNCH_LOS) ? m_lse[cur] : '0)) launch_ok[cur] = 0;
      end
      if (dvmc_se && !chain_hold) freeze_ok[cur] = 0;
    end
    if (result_valid) begin
      check(result == m_word[n_res], $sformatf("meas %0d word %h exp %h", n_res, result, m_word[n_res]));
      check(result_sel == m_sel[n_res], $sformatf("meas %0d sel", n_res));
      n_res++;
    end
  end

  initial begin
    desc_valid = 0; desc_mode = LAUNCH_LOS; desc_sel = 0; desc_shift = 0; desc_launch_se = 0;
    for (int i = 0; i < NMEAS; i++) begin
      m_mode[i] = (i >= NMEAS / 2) ? LAUNCH_LOC : LAUNCH_LOS;  // LOS patterns first
      m_s[i]    = (i == 0) ? 20 : (i % 5 == 1) ? 0 : ($urandom % 21);
      m_sel[i]  = SW'($urandom);
      m_lse[i]  = NSEG'($urandom);
      m_word[i] = TD'($urandom);
      bits_taken[i] = 0; shift_ok[i] = 1; launch_ok[i] = 1; freeze_ok[i] = 1; rst_low[i] = 0;
      launch_seen[i] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < NMEAS; i++) begin
      @(negedge clk);
      desc_valid = 1; desc_mode = m_mode[i]; desc_sel = m_sel[i];
      desc_shift = CW'(m_s[i]); desc_launch_se = m_lse[i];
      @(posedge clk);
      while (!desc_ready) @(posedge clk);
    end
    @(negedge clk) desc_valid = 0;
    wait (n_res == NMEAS);
    repeat (2) @(posedge clk);
    for (int i = 0; i < NMEAS; i++) begin
      int expb;
      expb = (m_mode[i] == LAUNCH_LOS) ? m_s[i] + 1 : m_s[i];
      check(bits_taken[i] == expb, $sformatf("meas %0d took %0d bits, exp %0d", i, bits_taken[i], expb));
      check(shift_ok[i] == 1, $sformatf("meas %0d shift enables", i));
      check(launch_ok[i] == 1 && launch_seen[i] == 1, $sformatf("meas %0d launch enables", i));
      check(freeze_ok[i] == 1, $sformatf("meas %0d chain not frozen in readout", i));
      check(rst_low[i] == 2, $sformatf("meas %0d DVMC reset low %0d periods", i, rst_low[i]));
      if (i > 0)
        check(take_cyc[i] - take_cyc[i-1] == m_s[i-1] + 1 + TD,
              $sformatf("meas %0d took %0d periods, exp %0d", i-1, take_cyc[i] - take_cyc[i-1], m_s[i-1] + 1 + TD));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
