// tb_frocm_dispatch: self-checking test of the unitive dispatch.
//
// First the two-thread example of the method: thread 0 (Level 1) offers
// ADD SHL ADD MPY LDW SUB on AL1 BC1 BC2 MU1 LS1 LS2, and thread 1 offers
// ADD SUB ADD MPY MPY on AL1 AL2 BC2 MU1 MU2. In the first cycle all of
// thread 0 issues, and of thread 1 only SUB (AL2) and MPY (MU2). The other
// three instructions of thread 1 issue in the second cycle, and that packet
// counts as done only then. Then random packets and priorities run against a
// reference model that tracks each packet's unissued instructions. The
// registered execute-unit outputs are checked one cycle after issue.
module tb_frocm_dispatch;
  import frocm_pkg::*;
  localparam int unsigned NU = 8, IW = 32, CW = 4;

  logic clk = 0, rst_n = 0;
  logic [1:0] ep_valid = '0;
  logic [1:0][NU-1:0] ep_mask = '0;
  logic [1:0][NU-1:0][IW-1:0] ep_instr = '0;
  logic [1:0] level1 = 2'b11;
  logic [1:0][NU-1:0] issue_mask;
  logic [1:0][CW-1:0] issue_count;
  logic [1:0] ep_done;
  logic [NU-1:0] unit_valid, unit_tid;
  logic [NU-1:0][IW-1:0] unit_instr;

  int checks = 0, failures = 0;
  logic [1:0][NU-1:0] pend;          // reference: unissued instructions of each packet
  logic [NU-1:0] exp_uv, exp_ut;
  logic [NU-1:0][IW-1:0] exp_ui;

  frocm_dispatch dut (.*);

  // units used by the two packets of the example
  const unit_e ex0 [6] = '{UNIT_AL1, UNIT_BC1, UNIT_BC2, UNIT_MU1, UNIT_LS1, UNIT_LS2};
  const unit_e ex1 [5] = '{UNIT_AL1, UNIT_AL2, UNIT_BC2, UNIT_MU1, UNIT_MU2};

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int unsigned ones(input logic [NU-1:0] m);
    int unsigned n = 0;
    for (int i = 0; i < NU; i++) if (m[i]) n++;
    return n;
  endfunction

  // compare this cycle's issue with the reference, then clock
  task automatic step();
    logic [1:0][NU-1:0] want;
    int unsigned hi;
    hi = (level1[0] || !level1[1]) ? 0 : 1;
    want[hi]   = ep_valid[hi] ? pend[hi] : '0;
    want[1-hi] = (ep_valid[1-hi] ? pend[1-hi] : '0) & ~want[hi];
    #1;
    for (int t = 0; t < 2; t++) begin
      check(issue_mask[t] == want[t], $sformatf("t%0d issue %b exp %b", t, issue_mask[t], want[t]));
      check(int'(issue_count[t]) == ones(want[t]), "issue count");
      check(ep_done[t] == (ep_valid[t] && (pend[t] & ~want[t]) == '0), "ep_done");
    end
    for (int u = 0; u < NU; u++) begin
      exp_uv[u] = want[0][u] | want[1][u];
      exp_ut[u] = want[1][u];
      exp_ui[u] = want[1][u] ? ep_instr[1][u] : want[0][u] ? ep_instr[0][u] : '0;
    end
    @(posedge clk);
    #1;
    check(unit_valid == exp_uv && unit_tid == exp_ut && unit_instr == exp_ui, "execute-unit outputs");
    for (int t = 0; t < 2; t++)
      if (ep_valid[t]) pend[t] = pend[t] & ~want[t];
  endtask

  task automatic new_packet(input int t);
    ep_valid[t] = ($urandom_range(4, 0) != 0);
    ep_mask[t]  = NU'($urandom);
    for (int u = 0; u < NU; u++) ep_instr[t][u] = $urandom;
    pend[t] = ep_mask[t];
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // the example (bit 0 = AL1 ... bit 7 = LS2)
    ep_valid = 2'b11;
    level1   = 2'b01;
    ep_mask = '0;
    foreach (ex0[k]) ep_mask[0][ex0[k]] = 1'b1;   // ADD SHL ADD MPY LDW SUB
    foreach (ex1[k]) ep_mask[1][ex1[k]] = 1'b1;   // ADD SUB ADD MPY MPY
    check(ep_mask[0] == 8'b1101_1101 && ep_mask[1] == 8'b0011_1011, "example masks");
    for (int u = 0; u < NU; u++) begin
      ep_instr[0][u] = 32'h1000_0000 + u;
      ep_instr[1][u] = 32'h2000_0000 + u;
    end
    pend = ep_mask;
    #1;
    check(issue_mask[0] == 8'b1101_1101, "example T0: thread 0 issues all six");
    check(issue_mask[1] == 8'b0010_0010, "example T0: thread 1 issues SUB and MPY");
    check(ep_done == 2'b01, "example T0: only thread 0 packet done");
    step();
    ep_mask[0] = 8'b0000_0000; ep_valid[0] = 1'b0;   // thread 0 stalled
    #1;
    check(issue_mask[1] == 8'b0001_1001, "example T1: ADD ADD MPY issue");
    check(ep_done[1], "example T1: thread 1 packet done");
    step();
    // random traffic: a new packet only after ep_done
    ep_valid = 2'b00; pend = '0;
    for (int i = 0; i < 20000; i++) begin
      for (int t = 0; t < 2; t++)
        if (!ep_valid[t] || pend[t] == '0) new_packet(t);
      if ($urandom_range(3, 0) == 0) level1 = 2'($urandom);
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
