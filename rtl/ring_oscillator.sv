// ring_oscillator: behavioural model of the on-chip clock source.
//
// BEHAVIOURAL MODEL, not synthesizable. On the FPGA the clock comes from a loop of
// an odd number of NOT gates (a ring oscillator) whose frequency is set by the
// gate and routing delays, followed by a chain of frequency divider elements
// (fde) that each halve it. The loop cannot be expressed as synthesizable logic,
// so it is modelled here as a signal that inverts every N_INV * T_INV time units,
// which is what a ring of N_INV inverters with T_INV delay per stage does. The
// divider chain is real logic (fde instances, generated as in the document).
// N_INV, T_INV and N_FDE are not given by the document: the defaults are this
// design's choice. CLK period = 2 * N_INV * T_INV * 2**N_FDE time units.
// Interface: one output, clk; no inputs, as the macros have no global signals.
module ring_oscillator #(
  parameter int unsigned N_INV = 5,   // NOT gates in the loop (odd)
  parameter int unsigned T_INV = 1,   // delay of one stage, in time units
  parameter int unsigned N_FDE = 2    // divide-by-2 stages after the loop
) (
  output logic clk
);
  // An even number of inverters settles instead of oscillating.
  if (N_INV % 2 == 0) begin : g_bad_ring
    $error("ring_oscillator: N_INV must be odd");
  end

  logic loop_q = 1'b0;

  // The loop: after the delay of all N_INV stages, the node sees its own inverse.
  always #(N_INV * T_INV) loop_q = ~loop_q;

  logic [N_FDE:0] div;
  assign div[0] = loop_q;

  for (genvar i = 0; i < N_FDE; i++) begin : g_fde
    fde u_fde (.iclk(div[i]), .rst(1'b0), .oclk(div[i+1]));
  end

  assign clk = div[N_FDE];
endmodule
