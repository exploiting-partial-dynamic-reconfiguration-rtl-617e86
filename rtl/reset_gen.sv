// reset_gen: internal power-up reset.
//
// The testing macros use no global reset, so they make their own: a WIDTH-bit
// shift register that powers up (from the FPGA configuration) holding all ones.
// On every rising clk edge it shifts right by one with a 0 entering at the MSB,
// and its LSB is the RESET output. RESET is therefore high from power-up for
// WIDTH clock cycles and then low for ever. WIDTH = 32 follows the document's
// register; the document also states a 16-cycle reset, which does not match an
// all-ones 32-bit register, and this design follows the register.
// Timing: RESET falls right after the WIDTH-th rising clk edge.
module reset_gen #(
  parameter int unsigned WIDTH = 32
) (
  input  logic clk,
  output logic reset
);
  logic [WIDTH-1:0] sr = '1;

  always_ff @(posedge clk) sr <= {1'b0, sr[WIDTH-1:1]};

  assign reset = sr[0];
endmodule
