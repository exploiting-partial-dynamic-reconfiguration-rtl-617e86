// fde: frequency divider element.
//
// A D flip-flop whose inverted output is fed back to its D input, so the output
// OCLK toggles on every rising edge of ICLK and runs at half its frequency. The
// structure (D, ~Q feedback, clock ICLK, output OCLK, RST pin) is the one of the
// document. The asynchronous active-high RST and the power-up value 0 (as an
// FPGA flip-flop gets from its configuration) are this design's choices.
// Timing: OCLK changes right after each rising ICLK edge; period of OCLK is two
// periods of ICLK.
module fde (
  input  logic iclk,
  input  logic rst,
  output logic oclk
);
  logic q = 1'b0;

  always_ff @(posedge iclk or posedge rst) begin
    if (rst) q <= 1'b0;
    else     q <= ~q;
  end

  assign oclk = q;
endmodule
