// frocm_smt_issue: fairness-controlled issue stage of a two-thread VLIW SMT
// core using FROCM ("Fairness Recalculate Once Cache Miss").
//
// Two threads share eight execute units. Running them together slows each
// thread down, and the FROCM method aims to slow both by the same factor. For
// each thread it estimates the IPC the thread would reach alone, using only
// counters, one shifter and one adder, with no sampling phase in which the
// other thread is stopped. The estimate is renewed at every cache miss of the
// thread. The issue priority then goes to whichever thread has fallen behind
// its estimate.
//
// Structure:
//   frocm_dispatch   issues both threads' execute packets onto the units,
//                    the Level-1 thread first (unitive dispatch)
//   frocm_ipc_calc   one per thread: IC/EP counters and the shift-and-subtract
//                    evaluation of 8*IC/(EP+T_miss) at each cache miss
//   frocm_priority   IC_last_execute counters and the Level 1/Level 2 switch
//
// Interface: per thread an execute packet (ep_valid, ep_mask, ep_instr),
// accepted with ep_done, plus cache-miss pulses (miss, miss_l2) from the
// thread's caches. The fetch units stall a missing thread themselves by
// deasserting ep_valid for the miss delay. Outputs are the execute-unit
// operands (registered, one cycle after issue), the priority levels and the
// IPC estimates.
// Timing: issue is decided in one cycle. A priority change takes effect the
// cycle after the threshold is reached. A new IPC estimate with value N is
// visible N cycles after the miss.
// The composition follows the method's description; the signal-level
// interfaces are this design's own.
module frocm_smt_issue #(
  parameter int unsigned NU       = frocm_pkg::NUM_UNITS,
  parameter int unsigned IW       = frocm_pkg::INSTR_W,
  parameter int unsigned TMISS_L1 = frocm_pkg::T_MISS_L1,
  parameter int unsigned TMISS_L2 = frocm_pkg::T_MISS_L2
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // execute packets from Fetch 1 / Fetch 2
  input  logic [1:0]                        ep_valid,
  input  logic [1:0][NU-1:0]                ep_mask,
  input  logic [1:0][NU-1:0][IW-1:0]        ep_instr,
  output logic [1:0]                        ep_done,
  // cache-miss events per thread
  input  logic [1:0]                        miss,
  input  logic [1:0]                        miss_l2,
  // execute units
  output logic [NU-1:0]                     unit_valid,
  output logic [NU-1:0]                     unit_tid,
  output logic [NU-1:0][IW-1:0]             unit_instr,
  // status
  output logic [1:0][$clog2(NU+1)-1:0]      issue_count,
  output logic [1:0]                        level1,
  output logic [1:0][frocm_pkg::IPC_W-1:0]  ipc_approx,
  output logic [1:0]                        ipc_update,
  output logic [1:0]                        calc_busy,
  output logic                              switch_evt,
  // counters, for observation
  output logic [1:0][NU-1:0]                issue_mask,
  output logic [1:0][frocm_pkg::IC_W-1:0]   ic_count,
  output logic [1:0][frocm_pkg::EP_W-1:0]   ep_count,
  output logic [1:0][frocm_pkg::ICL_W-1:0]  ic_last,
  output frocm_pkg::level_e [1:0]           level
);

  localparam int unsigned CW = $clog2(NU + 1);

  frocm_dispatch #(.NU(NU), .IW(IW), .CW(CW)) u_dispatch (
    .clk, .rst_n,
    .ep_valid, .ep_mask, .ep_instr,
    .level1,
    .issue_mask, .issue_count, .ep_done,
    .unit_valid, .unit_tid, .unit_instr
  );

  for (genvar t = 0; t < 2; t++) begin : g_thread
    frocm_ipc_calc #(.CW(CW), .TMISS_L1(TMISS_L1), .TMISS_L2(TMISS_L2)) u_ipc (
      .clk, .rst_n,
      .issue_count (issue_count[t]),
      .ep_done     (ep_done[t]),
      .miss        (miss[t]),
      .miss_l2     (miss_l2[t]),
      .ipc_approx  (ipc_approx[t]),
      .busy        (calc_busy[t]),
      .ipc_update  (ipc_update[t]),
      .ic_count    (ic_count[t]),
      .ep_count    (ep_count[t])
    );
  end

  frocm_priority #(.CW(CW)) u_priority (
    .clk, .rst_n,
    .issue_count, .ipc (ipc_approx),
    .level1, .level, .ic_last, .switch_evt
  );

endmodule
