// frocm_ipc_calc: per-thread estimate of the IPC the thread would reach if it
// ran alone (IPC_approximately), recalculated at every cache miss.
//
// Between two cache misses the block counts the instructions the thread
// issued (IC, 16 bits) and the execute packets it completed (EP, 16 bits).
// A packet counts once however many cycles its issue was split over, so EP
// approximates the cycles the interval would have taken alone. At a miss it
// evaluates
//     IPC_approximately = 8 * IC / (EP + T_miss)
// without a divider. The divisor D = EP + T_miss is formed by the adder. IC
// is shifted left by 3 (the x8 scaling that keeps three fraction bits). Then
// D is subtracted once per cycle, and the result counts up while the
// remainder stays above zero. The result starts at 1 and is 8 (IPC 1.0)
// after reset. This gives ceil(8*IC/D), at least 1 and saturated at 63.
// T_miss is T_MISS_L1 for a level-one miss and T_MISS_L2 for a level-two miss.
//
// Interface: issue_count/ep_done come from the dispatch stage each cycle;
// miss is a one-cycle pulse, with miss_l2 marking a level-two miss.
// Timing: at the miss edge IC and EP are copied into the working registers
// and restart from this cycle's counts. One subtraction is made per cycle.
// For a result N, ipc_approx changes and ipc_update pulses N cycles after the
// miss edge, so at most 63 cycles later. A miss that arrives while a
// calculation is running does not start a new one: its interval is merged
// into the next. That rule, the separate working registers (the counters keep
// counting during the calculation) and the 20-bit remainder (16-bit IC plus
// the 3-bit shift) are this design's choices. The flow, the counter widths,
// the reset value 8 and the restart value 1 follow the method's description.
module frocm_ipc_calc
#(
  parameter int unsigned ICW       = frocm_pkg::IC_W,
  parameter int unsigned EPW       = frocm_pkg::EP_W,
  parameter int unsigned SHIFT     = frocm_pkg::IPC_SHIFT,
  parameter int unsigned PW        = frocm_pkg::IPC_W,
  parameter int unsigned CW        = frocm_pkg::CNT_W,
  parameter int unsigned TMISS_L1  = frocm_pkg::T_MISS_L1,
  parameter int unsigned TMISS_L2  = frocm_pkg::T_MISS_L2,
  parameter int unsigned IPC_RESET = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] issue_count,  // instructions of this thread issued this cycle
  input  logic          ep_done,      // an execute packet of this thread completed
  input  logic          miss,         // cache miss of this thread (pulse)
  input  logic          miss_l2,      // the miss also missed in L2
  output logic [PW-1:0] ipc_approx,   // 8 x IPC_approximately
  output logic          busy,         // recalculation running
  output logic          ipc_update,   // ipc_approx was written this cycle
  output logic [ICW-1:0] ic_count,    // IC counter of the current interval
  output logic [EPW-1:0] ep_count     // EP counter of the current interval
);

  localparam int unsigned RW = ICW + SHIFT + 1;   // signed remainder width
  localparam logic [PW-1:0] PMAX = '1;

  logic signed [RW-1:0] rem;      // 8*IC minus the divisor subtracted so far
  logic        [RW-1:0] div;      // EP + T_miss
  logic        [PW-1:0] ipc_work; // running result
  logic signed [RW-1:0] diff;     // output of the single adder/subtractor
  logic        [ICW:0]  ic_sum;
  logic        [EPW:0]  ep_sum;
  logic                 start;

  assign start  = miss && !busy;
  assign ic_sum = {1'b0, ic_count} + (ICW+1)'(issue_count);
  assign ep_sum = {1'b0, ep_count} + (EPW+1)'(ep_done);

  // One adder: forms EP + T_miss at the miss, then subtracts during the loop.
  always_comb begin
    if (start) diff = signed'(RW'(ep_count)) + signed'(RW'(miss_l2 ? TMISS_L2 : TMISS_L1));
    else       diff = rem - signed'(div);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ic_count   <= '0;
      ep_count   <= '0;
      rem        <= '0;
      div        <= '0;
      ipc_work   <= '0;
      ipc_approx <= PW'(IPC_RESET);
      busy       <= 1'b0;
      ipc_update <= 1'b0;
    end else begin
      ipc_update <= 1'b0;
      if (start) begin
        // new interval starts with this cycle's counts
        ic_count <= ICW'(issue_count);
        ep_count <= EPW'(ep_done);
        rem      <= signed'(RW'(ic_count) << SHIFT);
        div      <= RW'(diff);
        ipc_work <= PW'(1);
        busy     <= 1'b1;
      end else begin
        ic_count <= ic_sum[ICW] ? '1 : ic_sum[ICW-1:0];
        ep_count <= ep_sum[EPW] ? '1 : ep_sum[EPW-1:0];
        if (busy) begin
          if (diff > 0 && ipc_work != PMAX) begin
            rem      <= diff;
            ipc_work <= ipc_work + 1'b1;
          end else begin
            ipc_approx <= ipc_work;
            ipc_update <= 1'b1;
            busy       <= 1'b0;
          end
        end
      end
    end
  end

  // The published estimate is never zero.
  a_ipc_nonzero: assert property (@(posedge clk) disable iff (!rst_n) ipc_approx != '0);

endmodule
