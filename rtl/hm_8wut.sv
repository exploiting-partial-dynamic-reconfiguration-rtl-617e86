// hm_8wut: eight-wire cross-coupled parity testing macro.
//
// The same self-contained circuit as hm_6wut (internal ring oscillator and reset,
// TPG_SU / ORA_SU handshake, start checker, optional clock cycle counter), with
// two more wires under test: NPEven from the Even Parity TPG and NPOdd from the
// Odd Parity TPG (next state of each counter's LSB). The ORAs lose their feedback
// and are the purely combinational checkers of four wires each:
//   Odd Parity ORA:  Cu1 Cu0 POdd NPOdd
//   Even Parity ORA: Cd1 Cd0 PEven NPEven
// The received counter wires Cu1 Cu0 Cd1 Cd0 (pattern columns I, II, V, VI) also
// address the result RAMs, so each configuration writes its own cell. A fault-free
// run leaves 0 at addresses 4'b0011, 4'b0110, 4'b1001, 4'b1100 and 1 (power-up
// value) elsewhere in both RAMs; a stuck addressing wire or a wire stuck at a
// valid pattern shows as a different map. The bit order of the address is this
// design's choice ({Cu1, Cu0, Cd1, Cd0}).
module hm_8wut
  import fdt_pkg::*;
#(
  parameter int unsigned OSC_N_INV = 7,
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
  logic       peven, podd, npeven, npodd;

  parity_tpg #(.ODD(1'b0)) u_tpg_even (
    .clk(clk), .rst(rst), .next(tpg_next), .c(cu), .p(peven), .np(npeven)
  );
  parity_tpg #(.ODD(1'b1)) u_tpg_odd (
    .clk(clk), .rst(rst), .next(tpg_next), .c(cd), .p(podd), .np(npodd)
  );

  // Wires under test
  wut8_t wut;
  assign wut = '{cu1: cu[1], cu0: cu[0], peven: peven, npeven: npeven,
                 cd1: cd[1], cd0: cd[0], podd: podd, npodd: npodd};

  // ORA side
  logic               fail_odd, fail_even, q_odd_unused, q_even_unused;
  logic [DRAM_AW-1:0] addr;

  assign addr = {wut.cu1, wut.cu0, wut.cd1, wut.cd0};

  ora8_check #(.ODD(1'b1)) u_ora_odd (
    .c({wut.cu1, wut.cu0}), .p(wut.podd), .np(wut.npodd), .fail(fail_odd)
  );
  ora8_check #(.ODD(1'b0)) u_ora_even (
    .c({wut.cd1, wut.cd0}), .p(wut.peven), .np(wut.npeven), .fail(fail_even)
  );

  dist_ram #(.DEPTH(DRAM_DEPTH), .AW(DRAM_AW)) u_dram_odd (
    .clk(clk), .we(ora_clk), .addr(addr), .d(fail_odd), .q(q_odd_unused), .mem(odd_mem)
  );
  dist_ram #(.DEPTH(DRAM_DEPTH), .AW(DRAM_AW)) u_dram_even (
    .clk(clk), .we(ora_clk), .addr(addr), .d(fail_even), .q(q_even_unused), .mem(even_mem)
  );

  // The wires under test hold still for as long as DR is high.
  a_wut_stable: assert property (@(posedge clk) disable iff (rst) (dr && $past(dr)) |-> $stable(wut));

  if (CYC_EN) begin : g_cyc
    cycle_counter #(.WIDTH(CYC_WIDTH)) u_cyc (.clk(clk), .rst(rst), .count(cycles));
  end else begin : g_no_cyc
    assign cycles = '0;
  end
endmodule
