// frocm_pkg: constants and types shared by the FROCM issue-stage modules.
//
// The core is a two-thread (two-way) SMT processor with a VLIW instruction
// set: every cycle each thread offers one execute packet (EP) of up to eight
// 32-bit instructions, one per execute unit, and the two threads share the
// eight execute units. The unit names AL1..LS2 follow the unit columns of the
// core's issue diagram; their order here (bit 0 = AL1) is this design's
// choice. Counter widths follow the hardware budget of the FROCM method:
// 16-bit IC and EP counters, a 3-bit shift for the x8 scaling and a 6-bit
// IPC_approximately register. The 7-bit IC_last_execute width is this
// design's choice (see frocm_priority).
package frocm_pkg;

  localparam int unsigned NUM_UNITS   = 8;   // shared execute units
  localparam int unsigned INSTR_W     = 32;  // instruction word width
  localparam int unsigned IC_W        = 16;  // instruction counter per miss interval
  localparam int unsigned EP_W        = 16;  // execute-packet counter per miss interval
  localparam int unsigned IPC_SHIFT   = 3;   // IPC is kept scaled by 2**3 = 8
  localparam int unsigned IPC_W       = 6;   // scaled IPC_approximately, 0..63
  localparam int unsigned ICL_W       = 7;   // IC_last_execute counter
  localparam int unsigned CNT_W       = $clog2(NUM_UNITS + 1); // instructions issued in one cycle
  localparam int unsigned T_MISS_L1   = 5;   // L1 miss delay, cycles
  localparam int unsigned T_MISS_L2   = 60;  // L2 miss delay, cycles

  // Execute units of the shared VLIW back end, in issue-slot order.
  typedef enum logic [2:0] {
    UNIT_AL1 = 3'd0, UNIT_AL2 = 3'd1,
    UNIT_BC1 = 3'd2, UNIT_BC2 = 3'd3,
    UNIT_MU1 = 3'd4, UNIT_MU2 = 3'd5,
    UNIT_LS1 = 3'd6, UNIT_LS2 = 3'd7
  } unit_e;

  // Issue priority of one thread (Level 1 issues first).
  typedef enum logic {
    LEVEL1 = 1'b0,
    LEVEL2 = 1'b1
  } level_e;

endpackage
