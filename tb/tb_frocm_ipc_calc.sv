// tb_frocm_ipc_calc: self-checking test of the per-thread IPC estimator.
//
// Random intervals of issue activity end in a cache miss (level one or level
// two). The testbench counts IC and EP itself and computes the expected
// estimate in closed form, ceil(8*IC/(EP+T_miss)), at least 1 and at most 63.
// It checks the value, the reset value 8 and the latency: a result N must
// appear N cycles after the miss. It also covers a miss during a running
// calculation (ignored), an empty interval and a saturated 16-bit IC counter.
module tb_frocm_ipc_calc;
  localparam int unsigned CW = 4;
  localparam int unsigned TL1 = 5, TL2 = 60;

  logic clk = 0, rst_n = 0;
  logic [CW-1:0] issue_count = '0;
  logic ep_done = 0, miss = 0, miss_l2 = 0;
  logic [5:0] ipc_approx;
  logic busy, ipc_update;
  logic [15:0] ic_count, ep_count;

  int checks = 0, failures = 0;
  int unsigned m_ic, m_ep;   // reference counters of the open interval

  frocm_ipc_calc dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int unsigned expect_ipc(int unsigned ic, int unsigned ep, bit l2);
    int unsigned d, n8, q;
    d  = ep + (l2 ? TL2 : TL1);
    n8 = 8 * ic;
    q  = (n8 == 0) ? 1 : (n8 + d - 1) / d;
    return (q > 63) ? 63 : q;
  endfunction

  // one clock with the given inputs; reference counters follow the DUT rule
  task automatic cycle(input logic [CW-1:0] cnt, input bit epd, input bit m, input bit l2);
    issue_count = cnt; ep_done = epd; miss = m; miss_l2 = l2;
    @(posedge clk);
    #1;
    miss = 0;
  endtask

  task automatic run_interval(input int unsigned len, input int unsigned maxc, input bit l2);
    int unsigned c, e, exp_n, lat, icv, epv;
    for (int i = 0; i < len; i++) begin
      c = $urandom_range(maxc, 0);
      e = $urandom_range(1, 0);
      cycle(CW'(c), 1'(e), 0, 0);
      m_ic = (m_ic + c > 65535) ? 65535 : m_ic + c;
      m_ep = (m_ep + e > 65535) ? 65535 : m_ep + e;
    end
    check(ic_count == 16'(m_ic) && ep_count == 16'(m_ep), "IC/EP counters");
    icv = m_ic; epv = m_ep;
    exp_n = expect_ipc(icv, epv, l2);
    // miss cycle: its own counts open the next interval
    c = $urandom_range(maxc, 0);
    e = $urandom_range(1, 0);
    cycle(CW'(c), 1'(e), 1, l2);
    m_ic = c; m_ep = e;
    lat = 0;
    check(busy, "busy after miss");
    while (!ipc_update && lat < 200) begin
      c = $urandom_range(maxc, 0);
      e = $urandom_range(1, 0);
      // a second miss while busy must be ignored
      cycle(CW'(c), 1'(e), (lat == 2), 1);
      m_ic += c; m_ep += e;
      lat++;
    end
    check(ipc_approx == 6'(exp_n),
          $sformatf("ipc ic=%0d ep=%0d l2=%0d got %0d exp %0d", icv, epv, l2, ipc_approx, exp_n));
    check(lat == exp_n, $sformatf("latency %0d exp %0d", lat, exp_n));
    check(!busy, "idle after result");
  endtask

  initial begin
    m_ic = 0; m_ep = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(ipc_approx == 6'd8, "reset value 8");
    check(!busy, "idle after reset");
    // empty interval: IC = 0 gives the minimum 1
    run_interval(0, 0, 0);
    for (int k = 0; k < 60; k++)
      run_interval($urandom_range(400, 1), $urandom_range(8, 0), k[0]);
    // near-maximum IPC: 8 instructions and one packet per cycle
    m_ic = 0; m_ep = 0;
    repeat (3) cycle(0, 0, 0, 0);
    begin
      int unsigned icv, epv, exp_n, lat;
      for (int i = 0; i < 600; i++) begin cycle(8, 1, 0, 0); m_ic += 8; m_ep += 1; end
      icv = m_ic; epv = m_ep; exp_n = expect_ipc(icv, epv, 0);
      cycle(0, 0, 1, 0); m_ic = 0; m_ep = 0;
      lat = 0;
      while (!ipc_update && lat < 200) begin cycle(0, 0, 0, 0); lat++; end
      check(ipc_approx == 6'(exp_n), $sformatf("high ipc got %0d exp %0d", ipc_approx, exp_n));
      check(lat == exp_n, "high ipc latency");
    end
    // IC counter saturation at 65535
    for (int i = 0; i < 8300; i++) begin cycle(8, 1, 0, 0); m_ic += 8; m_ep += 1; end
    check(ic_count == 16'hFFFF, "IC saturates");
    begin
      int unsigned exp_n, lat;
      exp_n = expect_ipc(65535, m_ep, 1);
      cycle(0, 0, 1, 1);
      lat = 0;
      while (!ipc_update && lat < 200) begin cycle(0, 0, 0, 0); lat++; end
      check(ipc_approx == 6'(exp_n), $sformatf("saturated got %0d exp %0d", ipc_approx, exp_n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
