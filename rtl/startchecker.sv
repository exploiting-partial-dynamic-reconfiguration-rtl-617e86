// startchecker: records whether a test has been started.
//
// One distributed-RAM bit that powers up at 1 ("test not started") and is written
// to 0 once the test runs, so a readback can tell a circuit that never ran (for
// example a fault in its ring oscillator) from one that ran and found nothing.
// ONE_WUT = 0 is the parity circuits' version: trig is TPG_NEXT, and the write
// enable is TPG_NEXT AND the RAM's own output, so after the first write the bit
// ignores TPG_NEXT. ONE_WUT = 1 is the single-wire version: trig is the TPGCU's
// ENABLE and the write enable is its inverse, so 0 is written when ENABLE falls.
// Both follow the document's gate-level schemes. The result bit sits at address 0
// of a 16x1 LUT RAM; the write is synchronous to clk.
module startchecker
  import fdt_pkg::*;
#(
  parameter bit ONE_WUT = 1'b0
) (
  input  logic                  clk,
  input  logic                  trig,
  output logic                  started,
  output logic [DRAM_DEPTH-1:0] mem      // readback view of the RAM
);
  logic dram_out;
  logic we;

  always_comb we = ONE_WUT ? ~trig : (trig & dram_out);

  dist_ram #(.DEPTH(DRAM_DEPTH), .AW(DRAM_AW), .INIT_VAL(1'b1)) u_dram (
    .clk (clk),
    .we  (we),
    .addr('0),
    .d   (1'b0),
    .q   (dram_out),
    .mem (mem)
  );

  assign started = ~dram_out;
endmodule
