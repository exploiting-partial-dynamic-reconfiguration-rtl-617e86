// tpg_su: TPG sequencer of the parity testing circuits.
//
// Drives DR (data ready: the wires under test carry a valid configuration) and
// TPG_NEXT (request the next configuration) in a four-phase handshake with the
// ORA sequencer's DONE. The document gives the outputs and the handshake; the
// state machine itself is this design's:
//   INIT  -> READY               one settling cycle after RESET
//   READY (DR=1)  -> NEXT        when DONE = 1
//   NEXT  (TPG_NEXT=1) -> WAIT   always (TPG_NEXT is a one-cycle pulse)
//   WAIT  -> READY               when DONE = 0
// With ora_su the loop takes 4 clock cycles per configuration. TPG_NEXT is only
// raised while DR is low, so the wires never change while DR is high.
module tpg_su
  import fdt_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic done,
  output logic dr,
  output logic tpg_next
);
  tpg_su_state_t state = TSU_INIT;
  tpg_su_state_t state_d;

  always_comb begin
    state_d = state;
    unique case (state)
      TSU_INIT:  state_d = TSU_READY;
      TSU_READY: if (done) state_d = TSU_NEXT;
      TSU_NEXT:  state_d = TSU_WAIT;
      TSU_WAIT:  if (!done) state_d = TSU_READY;
      default:   state_d = TSU_INIT;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= TSU_INIT;
    else     state <= state_d;
  end

  assign dr       = (state == TSU_READY);
  assign tpg_next = (state == TSU_NEXT);

  // Handshake rules: a new configuration is never requested while DR claims the
  // current one is valid, and each request is a single cycle.
  a_next_not_during_dr: assert property (@(posedge clk) disable iff (rst) !(dr && tpg_next));
  a_next_one_cycle:     assert property (@(posedge clk) disable iff (rst) tpg_next |=> !tpg_next);
endmodule
