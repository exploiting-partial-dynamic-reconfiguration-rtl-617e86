// tpgcu: TPG control unit of the single-wire ("CLK approach") testing circuit.
//
// The pattern sent over the wire under test is the clock itself, gated:
// wut = clk AND enable. ENABLE is high from power-up and reset, and falls after
// exactly 2**N - 1 full clock pulses have been let through after RESET, where N
// is the width of the internal counter; from then on the wire stays low. As in
// the document, the state changes on the falling clock edge, so that ENABLE only
// moves while clk is low and the last pulse is as long as the others.
// The two-state machine (enable high / low) and its counter compare are this
// design's; the document's state diagram is not reproduced.
// Interface: rst is active high and asynchronous; enable also drives the
// single-wire start checker.
module tpgcu #(
  parameter int unsigned N = 8
) (
  input  logic clk,
  input  logic rst,
  output logic enable,
  output logic wut
);
  localparam logic [N-1:0] LAST = {{(N-1){1'b1}}, 1'b0};  // 2**N - 2

  logic [N-1:0] cnt = '0;
  logic         en_q = 1'b1;

  always_ff @(negedge clk or posedge rst) begin
    if (rst) begin
      cnt  <= '0;
      en_q <= 1'b1;
    end else if (en_q) begin
      if (cnt == LAST) en_q <= 1'b0;
      else             cnt  <= cnt + 1'b1;
    end
  end

  assign enable = en_q;
  assign wut    = clk & en_q;
endmodule
