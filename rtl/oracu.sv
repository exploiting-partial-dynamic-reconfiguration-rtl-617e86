// oracu: control unit of the single-wire ORA.
//
// Two flip-flops clocked by RNAND itself hold what the counters did, independent
// of both clocks, so that the ORA clock need not be faster than the TPG clock and
// a short low phase of RNAND is not missed:
//   FFDN (falling-edge, powers up 0): set to 1 when RNAND falls, i.e. the
//         counters reached all ones;
//   FFDP (rising-edge, powers up 1): cleared to 0 when RNAND rises again after
//         that, i.e. extra pulses arrived.
// The OCU state machine, clocked by the ORA's own clock, turns them into RAM
// writes (outputs DATATORAM, WRITETORAM):
//   WAIT  -> WR0 when FFDN = 1, or WR1 when FFDP = 0
//   WR0   (write 0)  -> HOLD0
//   HOLD0 -> WR1 when FFDP = 0
//   WR1   (write 1)  -> LOCK, insensitive to everything after.
// If RNAND never falls (stuck wire, missing pulses) nothing is written and the RAM
// keeps its power-up 1. The FF types and power-up values are the document's;
// their D inputs and the state machine are this design's reading of it.
// FFDN/FFDP change asynchronously to clk; on silicon the FSM would see them
// through one extra flip-flop, which the document does not show.
module oracu
  import fdt_pkg::*;
(
  input  logic clk,        // ORA clock
  input  logic rst,        // active high, asynchronous
  input  logic rnand,
  output logic datatoram,
  output logic writetoram
);
  logic ffdn = 1'b0;
  logic ffdp = 1'b1;

  always_ff @(negedge rnand or posedge rst) begin
    if (rst) ffdn <= 1'b0;
    else     ffdn <= 1'b1;
  end

  always_ff @(posedge rnand or posedge rst) begin
    if (rst) ffdp <= 1'b1;
    else     ffdp <= ~ffdn;
  end

  ocu_state_t state = OCU_WAIT;
  ocu_state_t state_d;

  always_comb begin
    state_d = state;
    unique case (state)
      OCU_WAIT:  if (!ffdp) state_d = OCU_WR1;
                 else if (ffdn) state_d = OCU_WR0;
      OCU_WR0:   state_d = OCU_HOLD0;
      OCU_HOLD0: if (!ffdp) state_d = OCU_WR1;
      OCU_WR1:   state_d = OCU_LOCK;
      OCU_LOCK:  state_d = OCU_LOCK;
      default:   state_d = OCU_WAIT;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= OCU_WAIT;
    else     state <= state_d;
  end

  assign writetoram = (state == OCU_WR0) || (state == OCU_WR1);
  assign datatoram  = (state == OCU_WR1);
endmodule
