// ora6_check: one internal output response analyzer of the 6-wire circuit.
//
// The cross-coupled parity scheme checks each counter against the parity made by
// the other TPG. ODD = 1 is the Odd Parity ORA: it receives Cu1, Cu0 and POdd and
// passes when POdd = XNOR(Cu1, Cu0). ODD = 0 is the Even Parity ORA: it receives
// Cd1, Cd0 and PEven and passes when PEven = XOR(Cd1, Cd0). The XNOR / XOR gates
// are the document's. Its feedback wire, which keeps faults seen in earlier
// configurations (transient ones included), is built here as a flag register
// that is set by any mismatch at a write strobe and cleared only by rst; the
// result written to the RAM is "mismatch now OR flag". The flag register and its
// reset are this design's reading of that feedback.
// Interface/timing: fail is combinational from the wires and the flag; the flag
// updates on the rising clk edge while wr (ORA_CLK) is high.
module ora6_check #(
  parameter bit ODD = 1'b1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       wr,     // ORA_CLK: the result is being written
  input  logic [1:0] c,      // received counter wires {MSB, LSB}
  input  logic       p,      // received parity wire of the other TPG
  output logic       fail    // 1 = a fault has been seen (now or before)
);
  logic mismatch;
  logic seen = 1'b0;

  always_comb begin
    if (ODD) mismatch = (p != ~(c[1] ^ c[0]));
    else     mismatch = (p != (c[1] ^ c[0]));
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                 seen <= 1'b0;
    else if (wr && mismatch) seen <= 1'b1;
  end

  assign fail = mismatch | seen;
endmodule
