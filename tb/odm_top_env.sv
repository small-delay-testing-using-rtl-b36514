`timescale 1ns/1ps
// odm_top_env: end-to-end test of the delay measurement system, shared by the
// reduced-size and the full-size testbench (FULL = 1 instantiates the top
// with its default parameters).
//
// The example CUT sits on four chain cells placed so that FF3/FF4 are the
// last cells of segment 0 and FF2/FF1 the first of segment 1. Five
// measurements run back to back, LOS ones first, then LOC:
//   1 LOS, segmented launch (segment 0 captures): a falls, then FF4's input
//   2 LOS, observation point a
//   3 LOS, control point forces c = 0 (test mode on)
//   4 LOC, observation point a rises
//   5 LOC, FF3's input falls
// For each, the testbench keeps its own model of the chain and finds the
// smallest shift s_i that makes the chain compatible with the next initial
// pattern (test pattern merging), streams only those bits, and checks the
// chain state, the decoded delay (floor of the path delay over the 50 ps
// stage delay), the SSG select and the total time sum(s_i + 1 + 14).
// It also counts how often each mechanism happened (segmented launch,
// observation point, control point, LOS, LOC, merged shift, rising and
// falling stop) and fails any that never did. Clock period 2 ns; the
// scenario is this testbench's own, built on the published example circuit.
module odm_top_env #(
  parameter bit          FULL = 0,
  parameter int unsigned LEN  = 4,
  parameter int unsigned NSEG = 2,
  parameter int unsigned NC   = 1,
  parameter int unsigned NO   = 1
) ();
  import odm_pkg::*;
  localparam int unsigned NSSG = LEN + NO, SW = $clog2(NSSG), TOTAL = LEN + NC;
  localparam int unsigned CW = $clog2(TOTAL + 1), DW = TRC_BITS + $clog2(2 * RING_TAPS);
  localparam int unsigned SEG_LEN = (LEN + NSEG - 1) / NSEG;
  localparam int unsigned I4 = 0, I3 = SEG_LEN - 1, I2 = SEG_LEN, I1 = SEG_LEN + 1;
  localparam int TD_PS = 50, NM = 5;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 0, test_mode = 0;
  logic desc_valid = 0, desc_ready; launch_mode_e desc_mode = LAUNCH_LOS;
  logic [SW-1:0] desc_sel = '0; logic [CW-1:0] desc_shift = '0; logic [NSEG-1:0] desc_launch_se = '0;
  logic tdi, tdi_req, tdo;
  logic [LEN-1:0] cut_q, cut_d; logic [NC-1:0] cp_node_in, cp_node_out; logic [NO-1:0] obs_node;
  logic result_valid; logic [DVMC_BITS-1:0] result; logic [SW-1:0] result_sel;
  logic [DW-1:0] result_delay; logic result_delay_ok, busy;

  if (FULL) begin : g_full
    odm_top u_dut (.*);
  end else begin : g_small
    odm_top #(.LEN(LEN), .NSEG(NSEG), .NC(NC), .NO(NO)) u_dut (.*);
  end

  logic obs_a, cp0_in;
  cut_example #(.LEN(LEN), .I_FF4(I4), .I_FF3(I3), .I_FF2(I2), .I_FF1(I1)) u_cut (
    .q(cut_q), .d(cut_d), .cp_in(cp0_in), .cp_out(cp_node_out[0]), .obs_a(obs_a));
  always_comb begin
    cp_node_in = '0; cp_node_in[0] = cp0_in;
    obs_node = '0;   obs_node[0] = obs_a;
  end

  always #1 clk = ~clk;   // 2 ns clock period
  initial begin
    #(FULL ? 200000 : 20000);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- reference model of the scan path: V[0] is the scan-out end ----
  // V[p] for p < NC is control-point FF NC-1-p, V[NC+k] is chain cell k.
  logic [TOTAL-1:0] V;
  function automatic logic cellv(input logic [TOTAL-1:0] s, input int k); return s[NC+k]; endfunction
  function automatic logic [LEN-1:0] func_d(input logic [TOTAL-1:0] s, input logic tm);
    logic [LEN-1:0] dd; logic c;
    for (int k = 0; k < LEN; k++) dd[k] = cellv(s, k);
    c = tm ? s[NC-1] : cellv(s, I3);
    dd[I4] = (cellv(s, I1) & cellv(s, I2)) | c;
    dd[I3] = ~(cellv(s, I1) & cellv(s, I2));
    dd[I1] = ~cellv(s, I1);
    return dd;
  endfunction
  function automatic logic [TOTAL-1:0] shift1(input logic [TOTAL-1:0] s, input logic b);
    return {b, s[TOTAL-1:1]} ;
  endfunction

  // measurement plan
  launch_mode_e mode [NM]; int sel [NM]; logic [NSEG-1:0] lse [NM]; bit tm [NM];
  int exp_ps [NM];
  logic [TOTAL-1:0] ival [NM], icare [NM]; logic lbit [NM];
  int s_i [NM]; logic [TOTAL-1:0] after_state [NM];
  bit bits_q [$];

  task automatic set_init(input int m, input int k, input logic v);
    ival[m][NC+k] = v; icare[m][NC+k] = 1;
  endtask

  initial begin
    for (int m = 0; m < NM; m++) begin ival[m] = '0; icare[m] = '0; lbit[m] = 0; end
    // 1: LOS, segmented launch; FF1=FF2=1, FF3=0; FF1 <- 0; a and FF4.D fall
    mode[0] = LAUNCH_LOS; sel[0] = I4; lse[0] = ~NSEG'(1); tm[0] = 0; exp_ps[0] = 420 + 305;
    set_init(0, I1, 1); set_init(0, I2, 1); set_init(0, I3, 0);
    // 2: LOS, observation point a falls
    mode[1] = LAUNCH_LOS; sel[1] = LEN; lse[1] = '1; tm[1] = 0; exp_ps[1] = 420;
    set_init(1, I1, 1); set_init(1, I2, 1);
    // 3: LOS, control point holds c at 0 though FF3 shifts in 1
    mode[2] = LAUNCH_LOS; sel[2] = I4; lse[2] = '1; tm[2] = 1; exp_ps[2] = 420 + 305;
    set_init(2, I1, 1); set_init(2, I2, 1); ival[2][NC-1] = 0; icare[2][NC-1] = 1;
    // 4: LOC, a rises
    mode[3] = LAUNCH_LOC; sel[3] = LEN; lse[3] = '0; tm[3] = 1; exp_ps[3] = 420;
    set_init(3, I1, 0); set_init(3, I2, 1);
    // 5: LOC, FF3.D falls
    mode[4] = LAUNCH_LOC; sel[4] = I3; lse[4] = '0; tm[4] = 1; exp_ps[4] = 333;
    set_init(4, I1, 0); set_init(4, I2, 1);
    // LOS launches take FF1's new value from the cell behind it
    for (int m = 0; m < NM; m++) if (mode[m] == LAUNCH_LOS) begin
      if (I1 + 1 < LEN) set_init(m, I1 + 1, 0); else lbit[m] = 0;
    end

    // plan: minimum shifts against the model, stream bits, next model state
    V = '0;   // state after reset
    for (int m = 0; m < NM; m++) begin
      int r; logic [LEN-1:0] dd; logic [TOTAL-1:0] nv;
      for (r = (m == 0) ? TOTAL : 0; r <= TOTAL; r++) begin
        bit ok; ok = 1;
        for (int p = 0; p < TOTAL - r; p++) if (icare[m][p] && V[p + r] != ival[m][p]) ok = 0;
        if (ok) break;
      end
      s_i[m] = r;
      for (int j = 0; j < r; j++) begin
        bits_q.push_back(ival[m][TOTAL - r + j]);
        V = shift1(V, ival[m][TOTAL - r + j]);
      end
      for (int p = 0; p < TOTAL; p++) if (icare[m][p] && V[p] != ival[m][p]) $display("PLAN ERROR %0d", m);
      dd = func_d(V, tm[m]);
      nv = V;
      if (mode[m] == LAUNCH_LOS) begin
        bits_q.push_back(lbit[m]);
        for (int k = 0; k < LEN; k++)
          nv[NC+k] = lse[m][k / SEG_LEN] ? ((k == LEN - 1) ? lbit[m] : V[NC+k+1]) : dd[k];
      end else begin
        for (int k = 0; k < LEN; k++) nv[NC+k] = dd[k];
        V = nv; dd = func_d(V, tm[m]);
        for (int k = 0; k < LEN; k++) nv[NC+k] = dd[k];
      end
      V = nv;
      after_state[m] = V;
    end
  end

  // test data stream: next bit always on tdi, consumed when tdi_req
  int bit_idx = 0;
  assign tdi = (bit_idx < bits_q.size()) ? bits_q[bit_idx] : 1'b0;
  always @(posedge clk) if (!rst && tdi_req) bit_idx <= bit_idx + 1;

  // counters of the mechanisms exercised
  int n_los = 0, n_loc = 0, n_seg = 0, n_obs = 0, n_cp = 0, n_full = 0, n_part = 0, n_zero = 0;
  int n_rise = 0, n_fall = 0;
  int cyc = 0, first_take = -1, last_result = -1, n_res = 0, n_take = 0;

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (desc_valid && desc_ready) begin
      if (first_take < 0) first_take = cyc;
      test_mode <= tm[n_take];
      n_take++;
    end
    if (result_valid) begin
      last_result = cyc;
      check(result_sel == SW'(sel[n_res]), $sformatf("meas %0d sel %0d", n_res, result_sel));
      check(result_delay_ok, $sformatf("meas %0d tap pattern invalid", n_res));
      check(result_delay == DW'(exp_ps[n_res] / TD_PS),
            $sformatf("meas %0d delay %0d stages, exp %0d (%0d ps)", n_res, result_delay, exp_ps[n_res] / TD_PS, exp_ps[n_res]));
      check(cut_q == after_state[n_res][TOTAL-1:NC], $sformatf("meas %0d chain %b exp %b", n_res, cut_q, after_state[n_res][TOTAL-1:NC]));
      check(tdo == after_state[n_res][0], $sformatf("meas %0d tdo", n_res));
      n_res++;
    end
  end


  initial begin
    int total;
    #0.1 rst = 1;                      // a reset edge whatever the power-up state
    repeat (3) @(posedge clk);
    #0.5 rst = 0;
    for (int m = 0; m < NM; m++) begin
      @(negedge clk);
      desc_valid = 1; desc_mode = mode[m]; desc_sel = SW'(sel[m]);
      desc_shift = CW'(s_i[m]); desc_launch_se = lse[m];
      @(posedge clk);
      while (!desc_ready) @(posedge clk);
    end
    @(negedge clk) desc_valid = 0;
    wait (n_res == NM);
    total = 0;
    for (int m = 0; m < NM; m++) begin
      total += s_i[m] + 1 + DVMC_BITS;
      if (mode[m] == LAUNCH_LOS) n_los++; else n_loc++;
      if (mode[m] == LAUNCH_LOS && lse[m] != '1) n_seg++;
      if (sel[m] >= LEN) n_obs++;
      if (tm[m]) n_cp++;
      if (s_i[m] == TOTAL) n_full++; else if (s_i[m] == 0) n_zero++; else n_part++;
      if (m == 3) n_rise++; else n_fall++;
      $display("meas %0d: %s s=%0d sel=%0d exp %0d ps", m, mode[m].name(), s_i[m], sel[m], exp_ps[m]);
    end
    // the result register adds one cycle after the last readout edge
    check(last_result - first_take == total + 1,
          $sformatf("total time %0d cycles, exp sum(s+1+T_D) = %0d", last_result - first_take - 1, total));
    check(bit_idx == bits_q.size(), $sformatf("%0d test data bits taken, %0d planned", bit_idx, bits_q.size()));
    $display("mechanisms: LOS=%0d LOC=%0d segmented_launch=%0d observation=%0d control_point=%0d full_load=%0d merged_partial=%0d merged_zero=%0d rising_stop=%0d falling_stop=%0d",
             n_los, n_loc, n_seg, n_obs, n_cp, n_full, n_part, n_zero, n_rise, n_fall);
    check(n_los > 0, "LOS"); check(n_loc > 0, "LOC"); check(n_seg > 0, "segmented launch");
    check(n_obs > 0, "observation point"); check(n_cp > 0, "control point");
    check(n_full > 0, "full load"); check(n_part > 0, "partial merge"); check(n_zero > 0, "zero-shift merge");
    check(n_rise > 0, "rising stop"); check(n_fall > 0, "falling stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
