// frocm_dispatch: unitive dispatch of two threads' VLIW execute packets onto
// the shared execute units.
//
// Each thread presents one execute packet (EP): a valid bit, a mask of the
// units its instructions need (instruction u can only run on unit u) and the
// instruction words. The thread at issue-priority Level 1 issues every
// instruction of its packet that has not yet issued. The other thread issues
// those of its remaining instructions whose units the first thread left free.
// What could not issue waits in the packet and issues in a later cycle. A
// packet counts as done in the cycle its last instruction issues. Only then
// does the thread's fetch stage move to the next packet, so a packet split
// over several cycles still counts as one EP. This is how the FROCM method
// counts EPs.
//
// Interface: ep_valid/ep_mask/ep_instr per thread, held stable until ep_done;
// level1[t] is high when thread t is at Level 1. If both threads are at
// Level 1 (the state after reset) thread 0 goes first. That tie-break is this
// design's choice.
// Outputs issue_mask/issue_count/ep_done are combinational in the issue
// cycle. unit_valid/unit_tid/unit_instr are registered: they are the operands
// handed to the execute stage one cycle later.
// The split-packet behaviour and the priority rule follow the method's
// description. The per-packet done_mask register and the registered execute
// interface are this design's choices.
module frocm_dispatch
#(
  parameter int unsigned NU = frocm_pkg::NUM_UNITS,
  parameter int unsigned IW = frocm_pkg::INSTR_W,
  parameter int unsigned CW = $clog2(NU + 1)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // execute packets from the two fetch units
  input  logic [1:0]                       ep_valid,
  input  logic [1:0][NU-1:0]               ep_mask,
  input  logic [1:0][NU-1:0][IW-1:0]       ep_instr,
  // issue priority (1 = Level 1)
  input  logic [1:0]                       level1,
  // issue results of this cycle
  output logic [1:0][NU-1:0]               issue_mask,
  output logic [1:0][CW-1:0]               issue_count,
  output logic [1:0]                       ep_done,
  // execute stage operands
  output logic [NU-1:0]                    unit_valid,
  output logic [NU-1:0]                    unit_tid,
  output logic [NU-1:0][IW-1:0]            unit_instr
);

  logic [1:0][NU-1:0] done_mask;   // instructions of the current EP already issued
  logic [1:0][NU-1:0] remaining;
  logic               first;       // thread that issues first this cycle
  logic [NU-1:0]      lead_mask;   // instructions of the Level-1 thread
  logic [NU-1:0]      fill_mask;   // instructions of the other thread on free units

  function automatic logic [CW-1:0] popcount(input logic [NU-1:0] m);
    logic [CW-1:0] c;
    c = '0;
    for (int i = 0; i < NU; i++) c = c + CW'(m[i]);
    return c;
  endfunction

  always_comb begin
    first = (level1[0] || !level1[1]) ? 1'b0 : 1'b1;
    for (int t = 0; t < 2; t++)
      remaining[t] = ep_valid[t] ? (ep_mask[t] & ~done_mask[t]) : '0;
    lead_mask     = first ? remaining[1] : remaining[0];
    fill_mask     = (first ? remaining[0] : remaining[1]) & ~lead_mask;
    issue_mask[0] = first ? fill_mask : lead_mask;
    issue_mask[1] = first ? lead_mask : fill_mask;
    for (int t = 0; t < 2; t++) begin
      issue_count[t] = popcount(issue_mask[t]);
      ep_done[t]     = ep_valid[t] && ((remaining[t] & ~issue_mask[t]) == '0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_mask  <= '0;
      unit_valid <= '0;
      unit_tid   <= '0;
      unit_instr <= '0;
    end else begin
      for (int t = 0; t < 2; t++)
        done_mask[t] <= ep_done[t] ? '0 : (done_mask[t] | issue_mask[t]);
      for (int u = 0; u < NU; u++) begin
        unit_valid[u] <= issue_mask[0][u] | issue_mask[1][u];
        unit_tid[u]   <= issue_mask[1][u];
        unit_instr[u] <= issue_mask[1][u] ? ep_instr[1][u] :
                         issue_mask[0][u] ? ep_instr[0][u] : '0;
      end
    end
  end

  // No execute unit is given to both threads in the same cycle.
  a_no_unit_conflict: assert property (@(posedge clk) disable iff (!rst_n)
    (issue_mask[0] & issue_mask[1]) == '0);

endmodule
