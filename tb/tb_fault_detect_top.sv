// tb_fault_detect_top: end-to-end run of the three macros at default sizes.
// Two copies of the top run side by side: u_good untouched, u_bad with one fault
// per macro forced on its wires:
//   six-wire:    wire I (Cu1) inverted during one configuration (transient)
//   eight-wire:  wire IV (NPEven) stuck at 1
//   single-wire: one extra pulse after the burst (a short to a toggling net)
// The readback views must show: all macros started; u_good reports no fault
// (eight-wire map with zeros at 3, 6, 9, 12 only); u_bad reports a fault in the
// right place. Each mechanism of the design is counted and must happen at least
// once: power-up reset release, TPG_NEXT/DONE handshake, ORA_CLK result writes,
// feedback holding a transient fault, RAM addressing by the received wires, the
// gated-clock burst ending, the single-wire ORA writing 0, the extra-pulse
// rewrite to 1, and the clock cycle counter.
module tb_fault_detect_top;
  logic [15:0] g_p6o, g_p6e, g_p6s, g_p6c, g_p8o, g_p8e, g_p8s, g_p8c, g_w1o, g_w1s;
  logic [15:0] b_p6o, b_p6e, b_p6s, b_p6c, b_p8o, b_p8e, b_p8s, b_p8c, b_w1o, b_w1s;
  int checks = 0, failures = 0;

  fault_detect_top u_good (
    .p6_odd_mem(g_p6o), .p6_even_mem(g_p6e), .p6_start_mem(g_p6s), .p6_cycles(g_p6c),
    .p8_odd_mem(g_p8o), .p8_even_mem(g_p8e), .p8_start_mem(g_p8s), .p8_cycles(g_p8c),
    .w1_ora_mem(g_w1o), .w1_start_mem(g_w1s)
  );
  fault_detect_top u_bad (
    .p6_odd_mem(b_p6o), .p6_even_mem(b_p6e), .p6_start_mem(b_p6s), .p6_cycles(b_p6c),
    .p8_odd_mem(b_p8o), .p8_even_mem(b_p8e), .p8_start_mem(b_p8s), .p8_cycles(b_p8c),
    .w1_ora_mem(b_w1o), .w1_start_mem(b_w1s)
  );

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_reset_release = 0, n_handshake = 0, n_ora_write = 0, n_feedback_hold = 0;
  int n_addr_cells = 0, n_burst_end = 0, n_pass_write = 0, n_extra_rewrite = 0;
  bit addr_seen [16];

  always @(negedge u_good.u_hm6.rst) n_reset_release++;
  always @(negedge u_good.u_hm8.rst) n_reset_release++;
  always @(negedge u_good.u_hm1.rst) n_reset_release++;
  always @(posedge u_good.u_hm6.clk) begin
    if (u_good.u_hm6.tpg_next) n_handshake++;
    if (u_good.u_hm6.ora_clk)  n_ora_write++;
  end
  always @(posedge u_good.u_hm8.clk) if (u_good.u_hm8.ora_clk && !addr_seen[u_good.u_hm8.addr]) begin
    addr_seen[u_good.u_hm8.addr] = 1'b1;
    n_addr_cells++;
  end
  // feedback: a write of 'fault' while the wires themselves are correct again
  always @(posedge u_bad.u_hm6.clk)
    if (u_bad.u_hm6.ora_clk && u_bad.u_hm6.u_ora_odd.seen && !u_bad.u_hm6.u_ora_odd.mismatch)
      n_feedback_hold++;
  always @(negedge u_good.u_hm1.enable) n_burst_end++;
  always @(posedge u_good.u_hm1.oclk) if (u_good.u_hm1.writetoram && !u_good.u_hm1.datatoram) n_pass_write++;
  always @(posedge u_bad.u_hm1.oclk)  if (u_bad.u_hm1.writetoram && u_bad.u_hm1.datatoram)    n_extra_rewrite++;

  // fault injection into u_bad
  initial begin
    force u_bad.u_hm8.wut.npeven = 1'b1;
  end
  initial begin
    wait (u_bad.u_hm6.tpg_next === 1'b1);
    @(posedge u_bad.u_hm6.dr);
    force u_bad.u_hm6.wut.cu1 = ~u_bad.u_hm6.cu[1];
    @(negedge u_bad.u_hm6.dr);
    release u_bad.u_hm6.wut.cu1;
  end
  initial begin
    wait (u_bad.u_hm1.enable === 1'b0);
    #400;
    force u_bad.u_hm1.wut = 1'b1;
    #20;
    force u_bad.u_hm1.wut = 1'b0;
    #20;
    release u_bad.u_hm1.wut;
  end

  task automatic expect16(logic [15:0] got, logic [15:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: %h, expected %h", what, got, exp); end
  endtask

  task automatic mech(int n, string what);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("  %-32s %0d", what, n);
  endtask

  initial begin
    #20000;
    // all macros started
    expect16(g_p6s, 16'hFFFE, "good 6-wire start");
    expect16(g_p8s, 16'hFFFE, "good 8-wire start");
    expect16(g_w1s, 16'hFFFE, "good 1-wire start");
    expect16(b_p6s, 16'hFFFE, "bad 6-wire start");
    expect16(b_p8s, 16'hFFFE, "bad 8-wire start");
    expect16(b_w1s, 16'hFFFE, "bad 1-wire start");
    // fault-free results
    expect16(g_p6o, 16'hFFFE, "good 6-wire odd");
    expect16(g_p6e, 16'hFFFE, "good 6-wire even");
    expect16(g_p8o, 16'hEDB7, "good 8-wire odd");
    expect16(g_p8e, 16'hEDB7, "good 8-wire even");
    expect16(g_w1o, 16'hFFFE, "good 1-wire");
    // faulty results
    expect16(b_p6o, 16'hFFFF, "bad 6-wire odd (transient kept)");
    expect16(b_p6e, 16'hFFFE, "bad 6-wire even");
    // NPEven stuck at 1 breaks the even group in rows 2 and 4 (addresses 6, 12
    // keep their 1): zeros remain at 3 and 9 only
    expect16(b_p8o, 16'hEDB7, "bad 8-wire odd");
    expect16(b_p8e, 16'hFDF7, "bad 8-wire even");
    expect16(b_w1o, 16'hFFFF, "bad 1-wire");
    // cycle counters ran and agree between identical copies
    checks++; if (g_p6c == 0 || g_p6c !== b_p6c) begin failures++; $display("6-wire cycle counter %0d %0d", g_p6c, b_p6c); end
    checks++; if (g_p8c == 0 || g_p8c >= g_p6c) begin failures++; $display("8-wire counter %0d not below 6-wire %0d (slower oscillator)", g_p8c, g_p6c); end

    $display("mechanisms:");
    mech(n_reset_release, "power-up reset released");
    mech(n_handshake,     "TPG_NEXT/DONE handshakes");
    mech(n_ora_write,     "ORA_CLK result writes");
    mech(n_feedback_hold, "feedback kept a transient fault");
    mech(n_addr_cells == 4 ? 1 : 0, "four RAM cells addressed");
    mech(n_burst_end,     "gated-clock burst ended");
    mech(n_pass_write,    "single-wire pass written");
    mech(n_extra_rewrite, "extra pulse rewrote a fault");
    mech(int'(g_p6c),     "clock cycles counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
