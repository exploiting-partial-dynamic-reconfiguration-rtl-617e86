// cycle_counter: optional clock cycle counter of the parity testing circuits.
//
// The document offers each parity circuit in a variant with a clock cycle counter,
// to be read back so that a slowing internal clock (for example through aging)
// can be noticed; it gives no more than that. This design counts the rising edges
// of the macro's own clock from the end of RESET, saturating at all ones, and
// exposes the count as a readback view. Width and saturation are this design's
// choices.
module cycle_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  output logic [WIDTH-1:0] count
);
  logic [WIDTH-1:0] cnt = '0;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)         cnt <= '0;
    else if (~&cnt)  cnt <= cnt + 1'b1;
  end

  assign count = cnt;
endmodule
