// ora8_check: one internal output response analyzer of the 8-wire circuit.
//
// Purely combinational, with no feedback (its input is used for a fourth wire
// instead). The equations are the minimised sums of the document's Karnaugh maps:
//   Odd Parity ORA  (ODD = 1), wires Cu1 Cu0 POdd NPOdd:
//       fail = (Cu0 ^ NPOdd) | ~(Cu1 ^ Cu0 ^ POdd)
//   Even Parity ORA (ODD = 0), wires Cd1 Cd0 PEven NPEven:
//       fail = (Cd0 ^ NPEven) | (Cd1 ^ Cd0 ^ PEven)
// fail is 0 exactly for the four expected configurations of that group.
module ora8_check #(
  parameter bit ODD = 1'b1
) (
  input  logic [1:0] c,      // received counter wires {MSB, LSB}
  input  logic       p,      // received parity wire of the other TPG
  input  logic       np,     // received next-LSB wire of the other TPG
  output logic       fail
);
  always_comb begin
    if (ODD) fail = (c[0] ^ np) | ~(c[1] ^ c[0] ^ p);
    else     fail = (c[0] ^ np) |  (c[1] ^ c[0] ^ p);
  end
endmodule
