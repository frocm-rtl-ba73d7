// frocm_priority: FROCM issue-priority control for two threads.
//
// For each thread an IC_last_execute counter adds up the instructions the
// thread issued since it last triggered a priority change. When the counter
// reaches the thread's scaled IPC_approximately, that value is subtracted
// from it. The thread then drops to issue priority Level 2 and the other
// thread is raised to Level 1, as in the two-state Level 1 / Level 2 diagram
// of the method. A thread that issues faster than its estimated stand-alone
// IPC thus keeps handing the lead to the other thread, and the two threads'
// IPCs tend to the ratio of their stand-alone IPCs.
//
// Interface: issue_count[t] are the instructions of thread t issued this
// cycle and ipc[t] its 8 x IPC_approximately. level1[t] is high while thread
// t is at Level 1, and switch_evt pulses when a threshold was crossed.
// Timing: the counters and levels update at the clock edge after the issue
// cycle, so the new priority applies from the next cycle.
// After reset both threads are at Level 1 ("Beginning" enters Level 1).
// This design's choices: if both threads hit their thresholds in the same
// cycle, the lead passes from the thread that holds it (thread 0 when both are
// at Level 1) to the other. The counter is 7 bits wide, not 6, because up to
// eight instructions are added before the compare. It saturates at 127, so
// that a thread with a tiny IPC estimate cannot wrap it.
module frocm_priority
#(
  parameter int unsigned PW = frocm_pkg::IPC_W,
  parameter int unsigned LW = frocm_pkg::ICL_W,
  parameter int unsigned CW = frocm_pkg::CNT_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [1:0][CW-1:0]  issue_count,
  input  logic [1:0][PW-1:0]  ipc,
  output logic [1:0]          level1,
  output frocm_pkg::level_e [1:0]        level,
  output logic [1:0][LW-1:0]  ic_last,
  output logic                switch_evt
);

  logic [1:0][LW:0]   sum;
  logic [1:0][LW-1:0] sum_sat;
  logic [1:0]         hit;
  logic               holder;   // thread whose crossing hands the lead over on a tie

  always_comb begin
    for (int t = 0; t < 2; t++) begin
      sum[t]     = {1'b0, ic_last[t]} + (LW+1)'(issue_count[t]);
      sum_sat[t] = sum[t][LW] ? '1 : sum[t][LW-1:0];
      hit[t]   = sum_sat[t] >= LW'(ipc[t]);
      level1[t]  = (level[t] == frocm_pkg::LEVEL1);
    end
    holder     = (level[0] == frocm_pkg::LEVEL1) ? 1'b0 : 1'b1;
    switch_evt = |hit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ic_last <= '0;
      level   <= {frocm_pkg::LEVEL1, frocm_pkg::LEVEL1};
    end else begin
      for (int t = 0; t < 2; t++)
        ic_last[t] <= hit[t] ? (sum_sat[t] - LW'(ipc[t])) : sum_sat[t];
      unique case (hit)
        2'b01:   level <= {frocm_pkg::LEVEL1, frocm_pkg::LEVEL2};   // thread 0 crossed
        2'b10:   level <= {frocm_pkg::LEVEL2, frocm_pkg::LEVEL1};   // thread 1 crossed
        2'b11:   level <= holder ? {frocm_pkg::LEVEL2, frocm_pkg::LEVEL1} : {frocm_pkg::LEVEL1, frocm_pkg::LEVEL2};
        default: ;
      endcase
    end
  end

  // The two threads never share Level 2.
  a_one_leader: assert property (@(posedge clk) disable iff (!rst_n)
    !(level[0] == frocm_pkg::LEVEL2 && level[1] == frocm_pkg::LEVEL2));

endmodule
