// hm_6wut: six-wire cross-coupled parity testing macro.
//
// A self-contained test circuit meant to be dropped by partial reconfiguration
// into a region of the FPGA whose routing is to be checked. It has no clock or
// reset input: a ring oscillator makes the clock and a shift register the power-up
// RESET. Two internal TPGs drive six wires under test (WUTs):
//   Even Parity TPG: Cu1, Cu0 (up counter), PEven
//   Odd Parity TPG:  Cd1, Cd0 (down counter), POdd
// and the four configurations cycle for as long as the macro runs. The parity
// wires are swapped between the checkers (cross-coupling): the Odd Parity ORA
// checks Cu1 Cu0 against POdd, the Even Parity ORA checks Cd1 Cd0 against PEven,
// so a frozen TPG is caught by the ORA of the other group. Each ORA keeps earlier
// faults through its feedback, and its result is written at address 0 of its
// own LUT RAM, which powers up at 1 (fault). A start checker RAM bit goes to 0
// with the first TPG_NEXT. The results leave the chip by configuration readback;
// here they are the mem outputs. Result encoding (after a run):
//   start_mem[0] = 1: not started; else odd_mem[0]/even_mem[0] = 1: fault seen.
// Sequencing (TPG_SU / ORA_SU handshake): DR -> ORA_CLK/DONE -> TPG_NEXT, four
// clock cycles per configuration. With CYC_EN the variant with a clock cycle
// counter is built. Block structure and names follow the document; the handshake
// details, resets of the ORA side and all sizes not printed are this design's.
module hm_6wut
  import fdt_pkg::*;
#(
  parameter int unsigned OSC_N_INV = 5,
  parameter int unsigned OSC_T_INV = 1,
  parameter int unsigned OSC_N_FDE = 2,
  parameter int unsigned RST_WIDTH = 32,
  parameter bit          CYC_EN    = 1'b1,
  parameter int unsigned CYC_WIDTH = 16
) (
  output logic [DRAM_DEPTH-1:0] odd_mem,
  output logic [DRAM_DEPTH-1:0] even_mem,
  output logic [DRAM_DEPTH-1:0] start_mem,
  output logic [CYC_WIDTH-1:0]  cycles
);
  logic clk, rst;
  logic dr, done, tpg_next, ora_clk;

  ring_oscillator #(.N_INV(OSC_N_INV), .T_INV(OSC_T_INV), .N_FDE(OSC_N_FDE)) u_osc (.clk(clk));
  reset_gen #(.WIDTH(RST_WIDTH)) u_rst (.clk(clk), .reset(rst));

  tpg_su u_tpg_su (.clk(clk), .rst(rst), .done(done), .dr(dr), .tpg_next(tpg_next));
  ora_su u_ora_su (.clk(clk), .rst(rst), .dr(dr), .ora_clk(ora_clk), .done(done));

  logic started_unused;
  startchecker #(.ONE_WUT(1'b0)) u_start (
    .clk(clk), .trig(tpg_next), .started(started_unused), .mem(start_mem)
  );

  // TPG side
  logic [1:0] cu, cd;
  logic       peven, podd, npeven_unused, npodd_unused;

  parity_tpg #(.ODD(1'b0)) u_tpg_even (
    .clk(clk), .rst(rst), .next(tpg_next), .c(cu), .p(peven), .np(npeven_unused)
  );
  parity_tpg #(.ODD(1'b1)) u_tpg_odd (
    .clk(clk), .rst(rst), .next(tpg_next), .c(cd), .p(podd), .np(npodd_unused)
  );

  // Wires under test
  wut6_t wut;
  assign wut = '{cu1: cu[1], cu0: cu[0], peven: peven, cd1: cd[1], cd0: cd[0], podd: podd};

  // ORA side
  logic fail_odd, fail_even, q_odd_unused, q_even_unused;

  ora6_check #(.ODD(1'b1)) u_ora_odd (
    .clk(clk), .rst(rst), .wr(ora_clk), .c({wut.cu1, wut.cu0}), .p(wut.podd), .fail(fail_odd)
  );
  ora6_check #(.ODD(1'b0)) u_ora_even (
    .clk(clk), .rst(rst), .wr(ora_clk), .c({wut.cd1, wut.cd0}), .p(wut.peven), .fail(fail_even)
  );

  dist_ram #(.DEPTH(DRAM_DEPTH), .AW(DRAM_AW)) u_dram_odd (
    .clk(clk), .we(ora_clk), .addr('0), .d(fail_odd), .q(q_odd_unused), .mem(odd_mem)
  );
  dist_ram #(.DEPTH(DRAM_DEPTH), .AW(DRAM_AW)) u_dram_even (
    .clk(clk), .we(ora_clk), .addr('0), .d(fail_even), .q(q_even_unused), .mem(even_mem)
  );

  // The wires under test hold still for as long as DR is high.
  a_wut_stable: assert property (@(posedge clk) disable iff (rst) (dr && $past(dr)) |-> $stable(wut));

  if (CYC_EN) begin : g_cyc
    cycle_counter #(.WIDTH(CYC_WIDTH)) u_cyc (.clk(clk), .rst(rst), .count(cycles));
  end else begin : g_no_cyc
    assign cycles = '0;
  end
endmodule
