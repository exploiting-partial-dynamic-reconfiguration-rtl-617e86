// fdt_pkg: types and constants shared by the routing-fault testing macros.
//
// The parity testing circuits send a small set of wires from a test pattern
// generator (TPG) to an output response analyzer (ORA). The structs below name
// those wires in the order of the pattern tables (column I is the MSB), so that a
// configuration can be written as a bit string such as 6'b000111.
//   6-wire circuit: I Cu1, II Cu0, III PEven, IV Cd1, V Cd0, VI POdd
//   8-wire circuit: I Cu1, II Cu0, III PEven, IV NPEven, V Cd1, VI Cd0,
//                   VII POdd, VIII NPOdd
// Cu is the 2-bit up counter of the Even Parity TPG, Cd the 2-bit down counter of
// the Odd Parity TPG. The state encodings of the control FSMs are this design's
// own choice.
package fdt_pkg;

  typedef struct packed {
    logic cu1;
    logic cu0;
    logic peven;
    logic cd1;
    logic cd0;
    logic podd;
  } wut6_t;

  typedef struct packed {
    logic cu1;
    logic cu0;
    logic peven;
    logic npeven;
    logic cd1;
    logic cd0;
    logic podd;
    logic npodd;
  } wut8_t;

  // Depth of one LUT used as distributed RAM (4-input LUT: 16 x 1 bit).
  localparam int unsigned DRAM_DEPTH = 16;
  localparam int unsigned DRAM_AW    = 4;

  // TPG_SU: DR is high while the wires hold a valid configuration; TPG_NEXT is a
  // single-cycle request for the next configuration.
  typedef enum logic [1:0] {
    TSU_INIT  = 2'd0,  // first cycle after RESET, wires settling
    TSU_READY = 2'd1,  // DR = 1, wait for DONE = 1
    TSU_NEXT  = 2'd2,  // TPG_NEXT = 1 for one cycle
    TSU_WAIT  = 2'd3   // wait for DONE = 0
  } tpg_su_state_t;

  // ORA_SU: the two states of the ORA sequencer (outputs ORA_CLK, DONE).
  typedef enum logic {
    OSU_S1 = 1'b0,     // outputs 00, initial state
    OSU_S0 = 1'b1      // outputs 11
  } ora_su_state_t;

  // OCU of the single-wire ORA (outputs DATATORAM, WRITETORAM).
  typedef enum logic [2:0] {
    OCU_WAIT  = 3'd0,  // nothing known yet: RAM keeps its initial '1'
    OCU_WR0   = 3'd1,  // write '0': the counters reached all ones
    OCU_HOLD0 = 3'd2,  // '0' written, watch for extra pulses
    OCU_WR1   = 3'd3,  // write '1': the counters moved on (extra pulses)
    OCU_LOCK  = 3'd4   // '1' written, insensitive to anything further
  } ocu_state_t;

endpackage
