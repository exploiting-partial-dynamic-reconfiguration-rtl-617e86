// dist_ram: one LUT used as distributed RAM (DEPTH x 1 bit).
//
// Holds the test results. Every bit powers up at INIT_VAL (1 = "fault / not
// started"), as the document's result memories do; a write of d at address addr
// happens on a rising clk edge while we is high. q is the asynchronous read of
// addr. mem is the whole content: it stands for what a configuration readback
// of the LUT returns, which is how the results leave the FPGA.
// Depth 16 (a 4-input LUT) and the port names are this design's choices.
module dist_ram #(
  parameter int unsigned DEPTH    = 16,
  parameter int unsigned AW       = 4,
  parameter bit          INIT_VAL = 1'b1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic             d,
  output logic             q,
  output logic [DEPTH-1:0] mem
);
  logic [DEPTH-1:0] ram = {DEPTH{INIT_VAL}};

  always_ff @(posedge clk) begin
    if (we) ram[addr] <= d;
  end

  assign q   = ram[addr];
  assign mem = ram;
endmodule
