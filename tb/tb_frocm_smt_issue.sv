// tb_frocm_smt_issue: end-to-end test of the FROCM issue stage at its default
// size (8 execute units, miss delays 5 and 60 cycles).
//
// Two synthetic threads stand in for the fetch units and caches. Each thread
// is a fixed, seeded sequence of execute packets. The packet masks set the
// thread's parallelism, and some packets end in a level-one or level-two
// miss. After such a packet the thread raises `miss` and stalls for 5 or 60
// cycles. The run time a thread would have alone follows from its sequence:
// one cycle per packet plus its miss delays. As in the method's evaluation,
// the thread that finishes first restarts its sequence until the other is
// done too. The test then computes each thread's slowdown and the fairness
// value Fn, the smaller slowdown over the larger. Each pair runs twice: once
// under FROCM and once as a round-robin baseline, with the dispatch priority
// forced to alternate every cycle.
//
// Checks: every IPC estimate the core publishes equals ceil(8*IC/(EP+T_miss))
// of the interval the testbench counted; no unit is given to two threads; each
// thread's instructions reach the execute units intact; Fn under FROCM stays
// at or above 0.85 for every pair; the mean Fn under FROCM beats round robin. Mechanisms counted, and failed if never seen:
// priority switches, packets split over several cycles, L1 and L2 misses,
// IPC recalculations, a miss ignored during a running calculation.
module tb_frocm_smt_issue;
  import frocm_pkg::*;

  localparam int unsigned NU = 8, IW = 32;
  localparam int unsigned NEP = 4000;          // packets per thread sequence

  logic clk = 0, rst_n = 0;
  logic [1:0] ep_valid;
  logic [1:0][NU-1:0] ep_mask;
  logic [1:0][NU-1:0][IW-1:0] ep_instr;
  logic [1:0] ep_done, miss, miss_l2;
  logic [NU-1:0] unit_valid, unit_tid;
  logic [NU-1:0][IW-1:0] unit_instr;
  logic [1:0][3:0] issue_count;
  logic [1:0] level1, ipc_update, calc_busy;
  logic [1:0][5:0] ipc_approx;
  logic switch_evt;
  logic [1:0][NU-1:0] issue_mask;
  logic [1:0][15:0] ic_count, ep_count;
  logic [1:0][6:0] ic_last;
  level_e [1:0] level;

  frocm_smt_issue dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_switch = 0, n_split = 0, n_l1 = 0, n_l2 = 0, n_recalc = 0, n_ignored = 0;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // deterministic hash of (thread seed, packet index, salt)
  function automatic int unsigned hash(int unsigned s, int unsigned i, int unsigned salt);
    int unsigned x;
    x = s * 32'h9E37_79B9 ^ i * 32'h85EB_CA6B ^ salt * 32'hC2B2_AE35;
    x = x ^ (x >> 15); x = x * 32'h2C1B_3C6D;
    x = x ^ (x >> 12); x = x * 32'h297A_2D39;
    return x ^ (x >> 15);
  endfunction

  // thread profile: unit occupancy in percent, misses per 1000 packets, L2 share in percent
  int unsigned p_seed [2], p_dens [2], p_miss [2], p_l2 [2];

  function automatic logic [NU-1:0] pkt_mask(int t, int unsigned i);
    logic [NU-1:0] m;
    for (int u = 0; u < NU; u++) m[u] = (hash(p_seed[t], i, u + 1) % 100) < p_dens[t];
    if (m == '0) m[hash(p_seed[t], i, 20) % NU] = 1'b1;
    return m;
  endfunction

  function automatic int unsigned pkt_miss(int t, int unsigned i);   // 0, 1 (L1) or 2 (L2)
    if ((hash(p_seed[t], i, 30) % 1000) >= p_miss[t]) return 0;
    return ((hash(p_seed[t], i, 31) % 100) < p_l2[t]) ? 2 : 1;
  endfunction

  function automatic int unsigned ceil8(int unsigned ic, int unsigned d);
    int unsigned q;
    q = (ic == 0) ? 1 : (8 * ic + d - 1) / d;
    return (q > 63) ? 63 : q;
  endfunction

  logic [1:0] rr_level1 = 2'b01;   // round-robin baseline priority
  real last_ipc, last_fn, fn_frocm, fn_rr, sum_frocm = 0.0, sum_rr = 0.0;

  task automatic run_pair(input string name, input bit rr,
                          input int unsigned s0, input int unsigned d0, input int unsigned m0, input int unsigned l0,
                          input int unsigned s1, input int unsigned d1, input int unsigned m1, input int unsigned l1);
    int unsigned idx [2], stall [2], t_alone [2], t_smt [2], cyc;
    int unsigned r_ic [2], r_ep [2], c_ic [2], c_ep [2], c_d [2], pend_miss [2], pend_l2 [2];
    bit finished [2], split [2], pending_calc [2];
    real dec [2], fn;
    longint unsigned n_instr;
    p_seed[0] = s0; p_dens[0] = d0; p_miss[0] = m0; p_l2[0] = l0;
    p_seed[1] = s1; p_dens[1] = d1; p_miss[1] = m1; p_l2[1] = l1;
    // stand-alone run time: one cycle per packet plus the miss delays
    for (int t = 0; t < 2; t++) begin
      t_alone[t] = 0;
      for (int unsigned i = 0; i < NEP; i++) begin
        int unsigned k;
        k = pkt_miss(t, i);
        t_alone[t] += 1 + ((k == 2) ? T_MISS_L2 : (k == 1) ? T_MISS_L1 : 0);
      end
      idx[t] = 0; stall[t] = 0; finished[t] = 0; t_smt[t] = 0; split[t] = 0;
      r_ic[t] = 0; r_ep[t] = 0; pend_miss[t] = 0; pend_l2[t] = 0; pending_calc[t] = 0;
      c_ic[t] = 0; c_ep[t] = 0; c_d[t] = 0;
    end
    ep_valid = '0; miss = '0; miss_l2 = '0; ep_mask = '0; ep_instr = '0;
    rst_n = 0;
    if (rr) force dut.u_dispatch.level1 = rr_level1;
    else    release dut.u_dispatch.level1;
    rr_level1 = 2'b01;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cyc = 0;
    n_instr = 0;
    while (!(finished[0] && finished[1]) && cyc < 400_000) begin
      logic [1:0][NU-1:0] sent_mask;
      logic [1:0][NU-1:0][IW-1:0] sent_instr;
      // drive this cycle
      for (int t = 0; t < 2; t++) begin
        miss[t] = 0; miss_l2[t] = 0;
        if (pend_miss[t] != 0) begin
          miss[t] = 1; miss_l2[t] = (pend_miss[t] == 2);
          pend_miss[t] = 0;
        end
        ep_valid[t] = (stall[t] == 0);
        ep_mask[t]  = pkt_mask(t, idx[t] % NEP);
        for (int u = 0; u < NU; u++) ep_instr[t][u] = {t[0], 7'(u), 24'(idx[t])};
      end
      #1;
      sent_mask = issue_mask; sent_instr = ep_instr;
      check((issue_mask[0] & issue_mask[1]) == '0, "unit conflict");
      if (switch_evt) n_switch++;
      for (int t = 0; t < 2; t++) begin
        if (miss[t]) begin
          if (miss_l2[t]) n_l2++; else n_l1++;
          if (calc_busy[t]) n_ignored++;
          else begin
            c_ic[t] = r_ic[t]; c_ep[t] = r_ep[t];
            c_d[t]  = r_ep[t] + (miss_l2[t] ? T_MISS_L2 : T_MISS_L1);
            r_ic[t] = 0; r_ep[t] = 0; pending_calc[t] = 1;
          end
        end
        r_ic[t] += 32'(issue_count[t]);
        if (!(finished[0] && finished[1])) n_instr += 64'(issue_count[t]);
        r_ep[t] += ep_done[t];
        if (r_ic[t] > 65535) r_ic[t] = 65535;
        if (ep_valid[t] && !ep_done[t] && issue_mask[t] != '0) split[t] = 1;
        if (ep_done[t]) begin
          int unsigned k;
          if (split[t]) n_split++;
          split[t] = 0;
          k = pkt_miss(t, idx[t] % NEP);
          if (k != 0) begin
            pend_miss[t] = k;
            stall[t] = (k == 2) ? T_MISS_L2 : T_MISS_L1;
          end
          idx[t]++;
          if (idx[t] == NEP && !finished[t]) begin finished[t] = 1; t_smt[t] = cyc + 1; end
        end else if (stall[t] != 0 && !ep_valid[t]) begin
          stall[t]--;
        end
      end
      @(posedge clk);
      #1;
      cyc++;
      rr_level1 = ~rr_level1;
      // execute-unit outputs carry last cycle's instructions
      for (int u = 0; u < NU; u++) begin
        logic owner;
        owner = sent_mask[1][u];
        if (sent_mask[0][u] | sent_mask[1][u])
          check(unit_valid[u] && unit_tid[u] == owner && unit_instr[u] == sent_instr[owner][u],
                "execute operand");
      end
      for (int t = 0; t < 2; t++)
        if (ipc_update[t]) begin
          n_recalc++;
          check(pending_calc[t] && ipc_approx[t] == 6'(ceil8(c_ic[t], c_d[t])),
                $sformatf("%s t%0d ipc %0d exp %0d (ic %0d d %0d)", name, t, ipc_approx[t],
                          ceil8(c_ic[t], c_d[t]), c_ic[t], c_d[t]));
          pending_calc[t] = 0;
        end
    end
    check(finished[0] && finished[1], {name, ": both threads finished"});
    for (int t = 0; t < 2; t++) dec[t] = real'(t_alone[t]) / real'(t_smt[t]);
    fn = (dec[0] < dec[1]) ? dec[0] / dec[1] : dec[1] / dec[0];
    last_ipc = real'(n_instr) / real'(cyc);
    $display("%-28s T_alone %0d/%0d  T_SMT %0d/%0d  Fn %0.3f  IPC %0.2f", name,
             t_alone[0], t_alone[1], t_smt[0], t_smt[1], fn, last_ipc);
    last_fn = fn;
  endtask


  task automatic compare(input string name,
                         input int unsigned s0, input int unsigned d0, input int unsigned m0, input int unsigned l0,
                         input int unsigned s1, input int unsigned d1, input int unsigned m1, input int unsigned l1);
    run_pair({name, " RR"}, 1, s0, d0, m0, l0, s1, d1, m1, l1);
    fn_rr = last_fn;
    run_pair({name, " FROCM"}, 0, s0, d0, m0, l0, s1, d1, m1, l1);
    fn_frocm = last_fn;
    sum_rr += fn_rr; sum_frocm += fn_frocm;
    check(fn_frocm >= 0.85, {name, ": FROCM Fn at least 0.85"});
  endtask

  initial begin
    // general code: sparse packets, frequent misses; DSP kernels: dense packets
    compare("general+general",   11, 30, 40, 10,   12, 25, 30, 10);
    compare("general+dsp_kernel", 21, 30, 40, 10,   22, 75, 5, 20);
    compare("dsp_kernel+dsp_kernel", 31, 70, 5, 20, 32, 85, 3, 20);
    compare("dsp_kernel+general", 41, 80, 4, 10,   42, 35, 25, 10);
    $display("mean Fn: round robin %0.3f  FROCM %0.3f", sum_rr / 4.0, sum_frocm / 4.0);
    check(sum_frocm > sum_rr, "FROCM raises the mean Fn over round robin");
    $display("mechanisms: switches %0d split packets %0d L1 misses %0d L2 misses %0d recalcs %0d ignored %0d",
             n_switch, n_split, n_l1, n_l2, n_recalc, n_ignored);
    check(n_switch > 0, "priority switch seen");
    check(n_split > 0, "split execute packet seen");
    check(n_l1 > 0 && n_l2 > 0, "L1 and L2 misses seen");
    check(n_recalc > 0, "IPC recalculation seen");
    check(n_ignored > 0, "miss during recalculation seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
