// fault_detect_top: the three routing-test macros side by side.
//
// Each macro is independent: it has its own ring oscillator(s) and power-up reset
// and needs no input at all, which is what lets it be placed anywhere by partial
// reconfiguration and run on its own. They are gathered here only so that one
// simulation runs all three. Every output is a readback view of a result RAM
// (16 x 1 LUT RAM, powers up at 1) or of a clock cycle counter:
//   p6_*: six-wire parity macro, result bits at address 0
//   p8_*: eight-wire parity macro, result bits addressed by the received counters
//   w1_*: single-wire clock-counting macro, result bit at address 0
// start_mem bit 0 = 0 means the macro has started.
module fault_detect_top
  import fdt_pkg::*;
(
  output logic [DRAM_DEPTH-1:0] p6_odd_mem,
  output logic [DRAM_DEPTH-1:0] p6_even_mem,
  output logic [DRAM_DEPTH-1:0] p6_start_mem,
  output logic [15:0]           p6_cycles,
  output logic [DRAM_DEPTH-1:0] p8_odd_mem,
  output logic [DRAM_DEPTH-1:0] p8_even_mem,
  output logic [DRAM_DEPTH-1:0] p8_start_mem,
  output logic [15:0]           p8_cycles,
  output logic [DRAM_DEPTH-1:0] w1_ora_mem,
  output logic [DRAM_DEPTH-1:0] w1_start_mem
);
  hm_6wut u_hm6 (
    .odd_mem(p6_odd_mem), .even_mem(p6_even_mem), .start_mem(p6_start_mem), .cycles(p6_cycles)
  );
  hm_8wut u_hm8 (
    .odd_mem(p8_odd_mem), .even_mem(p8_even_mem), .start_mem(p8_start_mem), .cycles(p8_cycles)
  );
  hm_1wut u_hm1 (
    .ora_mem(w1_ora_mem), .start_mem(w1_start_mem)
  );
endmodule
