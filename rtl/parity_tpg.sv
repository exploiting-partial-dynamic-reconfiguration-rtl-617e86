// parity_tpg: one internal test pattern generator of the parity testing circuits.
//
// ODD = 0 gives the Even Parity TPG: a 2-bit up counter (Cu1 Cu0) that starts
// at 00. ODD = 1 gives the Odd Parity TPG: a 2-bit down counter (Cd1 Cd0) that
// starts at 11. As in the document, the parity wire is simply the next state of
// the counter MSB: for the up counter that is Cu1^Cu0 (even parity of the count),
// for the down counter ~(Cd1^Cd0) (odd parity). The extra wire of the 8-wire
// circuit (NPEven / NPOdd) is the next state of the counter LSB, ~c[0]; this
// reading is this design's, chosen because it reproduces the 8-wire pattern table
// column for column. The 6-wire circuit leaves np unused.
// Interface/timing: rst (active high, asynchronous) loads the first
// configuration; each rising clk edge with next = 1 advances one configuration.
module parity_tpg #(
  parameter bit ODD = 1'b0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       next,
  output logic [1:0] c,     // counter bits {MSB, LSB}
  output logic       p,     // parity wire (PEven or POdd)
  output logic       np     // next-LSB wire (NPEven or NPOdd)
);
  localparam logic [1:0] START = ODD ? 2'b11 : 2'b00;

  logic [1:0] cnt = START;
  logic [1:0] cnt_next;

  always_comb cnt_next = ODD ? cnt - 2'd1 : cnt + 2'd1;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       cnt <= START;
    else if (next) cnt <= cnt_next;
  end

  assign c  = cnt;
  assign p  = cnt_next[1];
  assign np = cnt_next[0];
endmodule
