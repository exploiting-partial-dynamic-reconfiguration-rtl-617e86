// ora_su: ORA sequencer of the parity testing circuits.
//
// A two-state Moore machine, as drawn in the document: S1 (outputs ORA_CLK = 0,
// DONE = 0) is the initial state; DR = 1 moves it to S0 (ORA_CLK = 1, DONE = 1);
// DR = 0 moves it back to S1. ORA_CLK enables the write of the ORA results into
// the distributed RAM; DONE tells the TPG sequencer that the next configuration
// may be applied. Making ORA_CLK a write enable sampled by the same clock (rather
// than a clock of its own) and the asynchronous active-high rst are this design's
// choices.
// Timing: outputs follow DR one clock later.
module ora_su
  import fdt_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic dr,
  output logic ora_clk,
  output logic done
);
  ora_su_state_t state = OSU_S1;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= OSU_S1;
    else     state <= dr ? OSU_S0 : OSU_S1;
  end

  assign ora_clk = (state == OSU_S0);
  assign done    = (state == OSU_S0);
endmodule
