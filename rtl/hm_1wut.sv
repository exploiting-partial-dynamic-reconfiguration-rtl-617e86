// hm_1wut: single-wire testing macro ("CLK approach").
//
// Tests one routed wire with nothing else between TPG and ORA. Instead of a data
// pattern (which would need a sequence recogniser or a clock-recovering decoder at
// the far end), the TPG sends its own clock over the wire, gated so that exactly
// 2**N - 1 pulses go through; both kinds of transition are exercised. The ORA
// counts the rising and falling edges it receives with two N-bit counters:
//   fault-free: both counters stop at all ones -> RNAND falls -> a 0 is written;
//   stuck wire or lost pulses: RNAND never falls -> the RAM keeps its power-up 1;
//   extra pulses (a short to a toggling net): RNAND falls, then rises -> 0 then 1
//   is written, and the ORA stops listening.
// TPG and ORA run on two independent ring oscillators; their relative speed does
// not matter. RESET comes from the internal shift-register generator, clocked here
// on the falling TPG clock edge (this design's choice) so that it is released
// while the wire is low. The start checker bit is written to 0 when ENABLE falls.
// Outputs are the readback views of the start checker and ORA result RAMs
// (address 0 holds the result). N and the oscillator sizes are not given by the
// document and are this design's defaults.
module hm_1wut
  import fdt_pkg::*;
#(
  parameter int unsigned N             = 8,
  parameter int unsigned TPG_OSC_N_INV = 5,
  parameter int unsigned ORA_OSC_N_INV = 3,
  parameter int unsigned OSC_T_INV     = 1,
  parameter int unsigned OSC_N_FDE     = 2,
  parameter int unsigned RST_WIDTH     = 32
) (
  output logic [DRAM_DEPTH-1:0] ora_mem,
  output logic [DRAM_DEPTH-1:0] start_mem
);
  logic tclk, oclk, rst;
  logic enable, wut;

  // TPG: ring oscillator, reset, TPGCU, start checker
  ring_oscillator #(.N_INV(TPG_OSC_N_INV), .T_INV(OSC_T_INV), .N_FDE(OSC_N_FDE)) u_tpg_osc (.clk(tclk));
  reset_gen #(.WIDTH(RST_WIDTH)) u_rst (.clk(~tclk), .reset(rst));
  tpgcu #(.N(N)) u_tpgcu (.clk(tclk), .rst(rst), .enable(enable), .wut(wut));

  logic started_unused;
  startchecker #(.ONE_WUT(1'b1)) u_start (
    .clk(tclk), .trig(enable), .started(started_unused), .mem(start_mem)
  );

  // ORA: own oscillator, edge counters, control unit, result RAM
  ring_oscillator #(.N_INV(ORA_OSC_N_INV), .T_INV(OSC_T_INV), .N_FDE(OSC_N_FDE)) u_ora_osc (.clk(oclk));

  logic         rnand, datatoram, writetoram, q_unused;
  logic [N-1:0] high_unused, low_unused;

  clk_ora #(.N(N)) u_clk_ora (
    .wut(wut), .rst(rst), .rnand(rnand), .high_cnt(high_unused), .low_cnt(low_unused)
  );
  oracu u_oracu (
    .clk(oclk), .rst(rst), .rnand(rnand), .datatoram(datatoram), .writetoram(writetoram)
  );
  dist_ram #(.DEPTH(DRAM_DEPTH), .AW(DRAM_AW)) u_dram (
    .clk(oclk), .we(writetoram), .addr('0), .d(datatoram), .q(q_unused), .mem(ora_mem)
  );
endmodule
