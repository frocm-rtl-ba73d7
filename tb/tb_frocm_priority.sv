// tb_frocm_priority: self-checking test of the FROCM issue-priority switch.
//
// First the worked example of the method: scaled IPC estimates 20 and 30,
// counters at 24 and 29 after an issue cycle. Thread 0 must drop to Level 2
// with 4 left in its counter, and thread 1 must rise to Level 1. Then random
// issue counts and IPC values run against a cycle-level reference model of
// the counters and the two-state priority diagram.
module tb_frocm_priority;
  import frocm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [1:0][3:0] issue_count = '0;
  logic [1:0][5:0] ipc = '0;
  logic [1:0] level1;
  level_e [1:0] level;
  logic [1:0][6:0] ic_last;
  logic switch_evt;

  int checks = 0, failures = 0;
  int unsigned r_cnt [2];
  bit          r_l2  [2];   // reference: 1 = Level 2

  frocm_priority dut (.*);

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

  // reference step, evaluated with this cycle's inputs
  task automatic ref_step();
    int unsigned s [2];
    bit h [2];
    for (int t = 0; t < 2; t++) begin
      s[t] = r_cnt[t] + 32'(issue_count[t]);
      if (s[t] > 127) s[t] = 127;
      h[t] = (s[t] >= ipc[t]);
      r_cnt[t] = h[t] ? s[t] - 32'(ipc[t]) : s[t];
    end
    if (h[0] && !h[1]) begin r_l2[0] = 1; r_l2[1] = 0; end
    else if (h[1] && !h[0]) begin r_l2[1] = 1; r_l2[0] = 0; end
    else if (h[0] && h[1]) begin
      // the lead passes from its holder (thread 0 if both lead) to the other
      if (!r_l2[0]) begin r_l2[0] = 1; r_l2[1] = 0; end
      else          begin r_l2[1] = 1; r_l2[0] = 0; end
    end
  endtask

  task automatic step(input int unsigned c0, input int unsigned c1);
    issue_count[0] = 4'(c0); issue_count[1] = 4'(c1);
    ref_step();
    @(posedge clk);
    #1;
    check(ic_last[0] == 7'(r_cnt[0]) && ic_last[1] == 7'(r_cnt[1]),
          $sformatf("ic_last %0d/%0d exp %0d/%0d", ic_last[0], ic_last[1], r_cnt[0], r_cnt[1]));
    check(level1[0] == !r_l2[0] && level1[1] == !r_l2[1],
          $sformatf("levels %b exp %b%b", level1, !r_l2[1], !r_l2[0]));
  endtask

  initial begin
    r_cnt[0] = 0; r_cnt[1] = 0; r_l2[0] = 0; r_l2[1] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(level1 == 2'b11, "both threads start at Level 1");
    // worked example: IPC 2.5 and 3.7 scaled by 8 -> 20 and 30
    ipc[0] = 6'd20; ipc[1] = 6'd30;
    step(8, 8); step(8, 8); step(0, 5);
    check(ic_last[0] == 7'd16 && ic_last[1] == 7'd21, "example pre-state 16/21");
    check(level1 == 2'b11, "no switch before threshold");
    issue_count[0] = 4'd8; issue_count[1] = 4'd8;
    #1 check(switch_evt, "switch event on the crossing cycle");
    step(8, 8);
    check(ic_last[0] == 7'd4, "example: 24 - 20 = 4");
    check(ic_last[1] == 7'd29, "example: thread 1 keeps 29");
    check(level[0] == LEVEL2 && level[1] == LEVEL1, "example: thread 0 to Level 2, thread 1 to Level 1");
    // thread 1 now reaches 30: the lead returns to thread 0
    step(0, 1);
    check(level[0] == LEVEL1 && level[1] == LEVEL2, "lead returns to thread 0");
    check(ic_last[1] == 7'd0, "thread 1 counter 30 - 30 = 0");
    // random run
    for (int i = 0; i < 20000; i++) begin
      if ($urandom_range(50, 0) == 0) ipc[0] = 6'($urandom_range(63, 1));
      if ($urandom_range(50, 0) == 0) ipc[1] = 6'($urandom_range(63, 1));
      step($urandom_range(8, 0), $urandom_range(8, 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
