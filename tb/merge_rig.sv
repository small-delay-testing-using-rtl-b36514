`timescale 1ns/1ps
// merge_rig: runs one worked example of test pattern merging through the
// measurement controller and a single-segment scan chain, and checks it.
//
// EX = 0 is a 7-flip-flop chain with three LOS patterns; EX = 1 is a
// 6-flip-flop chain with three LOS and two LOC patterns. Each pattern is a
// pair (initial, transition) of strings over 0/1/X, written with the scan-out
// end on the left, plus the flip-flop values after capture for LOC, the
// flip-flop its path ends in (the SSG control data d_i) and its mode.
//
// The rig first orders the patterns greedily (LOS before LOC, each next
// pattern the one needing the fewest shifts) and derives the shift counts
// s_i, checking order and counts against the published ones. It then plans
// the compacted test data stream symbolically: each bit of the stream is
// tracked through the chain, and a bit a pattern needs fixes that stream bit
// (a clash is a failure). For EX = 0 the planned stream, X included, must
// equal the published 12-bit stream. The remaining X bits are filled at
// random and the stream is applied to the hardware; a small CUT model
// supplies the LOC launch and capture responses. At every launch the chain
// must hold v_n,0, after it v_n,1, and at the end of the readout the
// capture values; the stream must be used up exactly and the whole run must
// take sum(s_i + 1 + 14) clock periods. done/checks/failures report back.
// The rig makes its own 2 ns clock and has a 20 us watchdog. The patterns,
// orders, shift counts, SSG data and stream are the published ones; the
// symbolic planner and the CUT response model are this testbench's own.
module merge_rig
  import odm_pkg::*;
#(
  parameter int unsigned EX = 0
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned L  = (EX == 0) ? 7 : 6;
  localparam int unsigned NP = (EX == 0) ? 3 : 5;
  localparam int unsigned TD = DVMC_BITS;

  string v0s[$], v1s[$], caps[$];
  int    dsel[$], exp_ord[$], exp_s[$];
  logic  is_loc[$];
  string exp_stream;

  initial begin
    if (EX == 0) begin
      v0s = '{"X1101XX", "11X011X", "X1011X0"};
      v1s = '{"1101XXX", "1X011X1", "1011X0X"};
      caps = v1s;
      dsel = '{0, 0, 1};
      is_loc = '{0, 0, 0};
      exp_ord = '{0, 2, 1};
      exp_s = '{7, 0, 2};
      exp_stream = "X11011X011X1";
    end else begin
      v0s = '{"X10XXX", "111XXX", "X011XX", "100X01", "110XX1"};
      v1s = '{"10XXXX", "11XXX1", "011XXX", "X111XX", "X101XX"};
      caps = '{"10XXXX", "11XXX1", "011XXX", "10011X", "1X100X"};
      dsel = '{1, 2, 0, 2, 0};
      is_loc = '{0, 0, 0, 1, 1};
      exp_ord = '{0, 2, 1, 4, 3};
      exp_s = '{6, 0, 1, 0, 2};
      exp_stream = "";
    end
  end

  // ---------------- greedy ordering -----------------------------------
  function automatic bit compat(string a, string b, int k);
    for (int p = 0; p + k < L; p++)
      if (a[p+k] != "X" && b[p] != "X" && a[p+k] != b[p]) return 0;
    return 1;
  endfunction

  function automatic int min_shift(string a, string b);
    for (int k = 0; k < L; k++) if (compat(a, b, k)) return k;
    return L;
  endfunction

  int ord[NP], sft[NP];

  task automatic order_patterns();
    bit used[NP];
    string after;
    foreach (used[i]) used[i] = 0;
    ord[0] = 0; sft[0] = L; used[0] = 1; after = caps[0];
    for (int n = 1; n < NP; n++) begin
      int best = -1, bs = L + 1;
      for (int grp = 0; grp < 2 && best < 0; grp++)
        for (int i = 0; i < NP; i++)
          if (!used[i] && int'(is_loc[i]) == grp && min_shift(after, v0s[i]) < bs) begin
            best = i; bs = min_shift(after, v0s[i]);
          end
      ord[n] = best; sft[n] = bs; used[best] = 1; after = caps[best];
    end
  endtask

  // ---------------- symbolic stream planning --------------------------
  byte sb[$];                 // planned stream bits: "0", "1" or "X"
  int  src[L];                // stream bit held by each cell, -1: CUT response
  byte rv[L];                 // the CUT response held where src = -1
  int  rsrc[L];               // which capture string a response cell came from
  byte cr[NP][L];             // capture responses, X resolved where needed

  task automatic require(string v);
    for (int p = 0; p < L; p++) begin
      if (v[p] == "X") continue;
      if (src[p] >= 0) begin
        if (sb[src[p]] == "X") sb[src[p]] = v[p];
        else if (sb[src[p]] != v[p]) begin failures++; $display("FAIL: stream clash at cell %0d", p); end
      end else if (rv[p] == "X") begin
        rv[p] = v[p];
        cr[rsrc[p]][p] = v[p];
      end else if (rv[p] != v[p]) begin
        failures++; $display("FAIL: response clash at cell %0d", p);
      end
    end
  endtask

  task automatic plan_shift();
    for (int p = 0; p < L - 1; p++) begin src[p] = src[p+1]; rv[p] = rv[p+1]; rsrc[p] = rsrc[p+1]; end
    sb.push_back("X");
    src[L-1] = sb.size() - 1;
  endtask

  task automatic plan_stream();
    for (int p = 0; p < L; p++) begin src[p] = -1; rv[p] = "X"; rsrc[p] = 0; end
    for (int i = 0; i < NP; i++) for (int p = 0; p < L; p++) cr[i][p] = caps[i][p];
    for (int n = 0; n < NP; n++) begin
      int i = ord[n];
      repeat (sft[n]) plan_shift();
      require(v0s[i]);
      if (!is_loc[i]) begin
        plan_shift();
        require(v1s[i]);
      end else begin
        for (int p = 0; p < L; p++) begin src[p] = -1; rv[p] = cr[i][p]; rsrc[p] = i; end
      end
    end
  endtask

  // ---------------- hardware -------------------------------------------
  logic clk = 0, rst = 0;
  logic desc_valid, desc_ready, tdi_req, chain_hold, cp_se, dvmc_rst, dvmc_se;
  launch_mode_e desc_mode;
  logic [2:0] desc_sel, desc_shift, ssg_sel, result_sel;
  logic [0:0] desc_launch_se, chain_se;
  logic result_valid, busy;
  logic [TD-1:0] result;
  logic [L-1:0] d, q;
  logic so, tdi;

  odm_controller #(.NSEG(1), .SW(3), .CW(3), .TD(TD)) u_ctrl (
    .clk, .rst, .desc_valid, .desc_ready, .desc_mode, .desc_sel, .desc_shift,
    .desc_launch_se, .tdi_req, .chain_se, .chain_hold, .cp_se, .ssg_sel,
    .dvmc_rst, .dvmc_se, .dvmc_so(1'b0), .result_valid, .result, .result_sel, .busy);
  segmented_scan_chain #(.LEN(L), .NSEG(1)) u_chain (
    .clk, .rst, .se(chain_se), .hold(chain_hold), .si(tdi), .d, .q, .so);

  always #1 clk = ~clk;
  initial begin #20000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic stream[$];
  int   bit_idx = 0, m_take = 0, cur = 0, cyc = 0, first_take = -1, last_res = -1;
  logic running = 0;
  int   res_idx[$];            // pattern of each measurement not yet reported

  function automatic logic [L-1:0] to_vec(string s);
    logic [L-1:0] v;
    for (int p = 0; p < L; p++) v[p] = (s[p] == "1");
    return v;
  endfunction

  function automatic bit match(logic [L-1:0] v, string s);
    for (int p = 0; p < L; p++) if (s[p] != "X" && v[p] != (s[p] == "1")) return 0;
    return 1;
  endfunction

  function automatic logic [L-1:0] cap_vec(int i);
    logic [L-1:0] v;
    for (int p = 0; p < L; p++) v[p] = (cr[i][p] == "1");
    return v;
  endfunction

  function automatic bit match_cap(logic [L-1:0] v, int i);
    for (int p = 0; p < L; p++) if (cr[i][p] != "X" && v[p] != (cr[i][p] == "1")) return 0;
    return 1;
  endfunction

  assign tdi            = (bit_idx < stream.size()) ? stream[bit_idx] : 1'b0;
  assign desc_valid     = running && (m_take < NP);
  assign desc_mode      = is_loc[ord[m_take < NP ? m_take : 0]] ? LAUNCH_LOC : LAUNCH_LOS;
  assign desc_sel       = 3'(dsel[ord[m_take < NP ? m_take : 0]]);
  assign desc_shift     = 3'(sft[m_take < NP ? m_take : 0] % 8);
  assign desc_launch_se = 1'b1;
  // CUT model: the LOC launch response, then the capture response
  assign d = (u_ctrl.state == ST_LAUNCH) ? to_vec(v1s[cur]) : cap_vec(cur);

  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (tdi_req) bit_idx <= bit_idx + 1;
    if (desc_valid && desc_ready) begin
      if (first_take < 0) first_take <= cyc;
      m_take <= m_take + 1;
      cur    <= ord[m_take];
    end
    if (u_ctrl.state == ST_LAUNCH) begin
      res_idx.push_back(cur);
      checks++;
      if (!match(q, v0s[cur])) begin failures++; $display("FAIL: v%0d initial pattern, chain %b", cur, q); end
    end
    if (u_ctrl.state == ST_READ && u_ctrl.rd_cnt == 0) begin
      checks++;
      if (!match(q, v1s[cur])) begin failures++; $display("FAIL: v%0d transition pattern, chain %b", cur, q); end
    end
    if (u_ctrl.state == ST_READ && u_ctrl.rd_cnt == 4'(TD - 1)) begin
      checks++;
      if (!match_cap(q, cur)) begin failures++; $display("FAIL: v%0d flip-flop values after the test, chain %b", cur, q); end
    end
    if (result_valid) begin
      last_res <= cyc;
      checks++;
      if (result_sel != 3'(dsel[res_idx[0]])) begin failures++; $display("FAIL: v%0d SSG data %0d", res_idx[0], result_sel); end
      void'(res_idx.pop_front());
    end
  end

  initial begin
    string planned;
    int total;
    done = 0; checks = 0; failures = 0;
    #0.1;
    order_patterns();
    for (int n = 0; n < NP; n++) begin
      checks++;
      if (ord[n] != exp_ord[n] || sft[n] != exp_s[n]) begin
        failures++; $display("FAIL: step %0d: v%0d with s=%0d, published v%0d with s=%0d", n, ord[n], sft[n], exp_ord[n], exp_s[n]);
      end
    end
    plan_stream();
    planned = "";
    foreach (sb[i]) planned = {planned, string'(sb[i])};
    $display("example %0d: stream %s (%0d bits)", EX, planned, sb.size());
    if (exp_stream != "") begin
      checks++;
      if (planned != exp_stream) begin failures++; $display("FAIL: stream %s, published %s", planned, exp_stream); end
    end
    foreach (sb[i]) stream.push_back(sb[i] == "X" ? 1'($urandom) : (sb[i] == "1"));
    total = 0;
    for (int n = 0; n < NP; n++) total += sft[n] + 1 + TD;
    rst = 1; #3 rst = 0;
    @(negedge clk); running = 1;
    wait (m_take == NP && !busy && last_res >= 0);
    @(posedge clk); #0.1;
    checks++;
    if (bit_idx != stream.size()) begin failures++; $display("FAIL: %0d of %0d stream bits used", bit_idx, stream.size()); end
    checks++;
    // the result register adds one cycle after the last readout bit
    if (last_res - first_take != total + 1) begin
      failures++; $display("FAIL: run took %0d cycles, sum(s+1+T_D) = %0d", last_res - first_take, total);
    end
    $display("example %0d: %0d measurements in %0d cycles", EX, NP, total);
    done = 1;
  end
endmodule
