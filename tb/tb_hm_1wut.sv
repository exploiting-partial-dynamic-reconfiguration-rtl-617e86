// tb_hm_1wut: runs the single-wire macro in five situations and checks the
// readback of its two RAM bits (address 0; 0 = started / no fault):
//   u_ok    fault-free: 2**8 - 1 = 255 pulses cross the wire; start 0, result 0
//   u_sa0   wire stuck at 0: start 0, result 1 (RNAND never falls)
//   u_miss  two pulses suppressed in the middle: start 0, result 1
//   u_extra one extra pulse after the burst: result written 0, then 1, then locked
//   u_dead  TPG oscillator stopped: start 1, result 1
module tb_hm_1wut;
  localparam int TPERIOD = 40;  // 2 * 5 * 1 * 2**2
  logic [15:0] om [5], sm [5];
  int checks = 0, failures = 0;

  hm_1wut u_ok    (.ora_mem(om[0]), .start_mem(sm[0]));
  hm_1wut u_sa0   (.ora_mem(om[1]), .start_mem(sm[1]));
  hm_1wut u_miss  (.ora_mem(om[2]), .start_mem(sm[2]));
  hm_1wut u_extra (.ora_mem(om[3]), .start_mem(sm[3]));
  hm_1wut u_dead  (.ora_mem(om[4]), .start_mem(sm[4]));

  initial begin
    #(TPERIOD * 3000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pulses seen on the fault-free wire after RESET
  int pulses = 0;
  always @(posedge u_ok.wut) if (!u_ok.rst) pulses++;

  // writes of the extra-pulse instance
  int w0 = 0, w1 = 0;
  always @(posedge u_extra.oclk) if (u_extra.writetoram) begin
    if (u_extra.datatoram) w1++; else w0++;
  end

  initial begin
    force u_sa0.wut  = 1'b0;
    force u_dead.tclk = 1'b0;
    // suppress two pulses of u_miss about half way
    wait (u_miss.rst === 1'b0);
    repeat (100) @(posedge u_miss.tclk);
    @(negedge u_miss.tclk);
    force u_miss.wut = 1'b0;
    repeat (2) @(posedge u_miss.tclk);
    @(negedge u_miss.tclk);
    release u_miss.wut;
  end

  initial begin
    // one extra pulse on u_extra once its burst is over and its 0 is written
    wait (u_extra.enable === 1'b0);
    wait (w0 == 1);
    #(TPERIOD * 3);
    force u_extra.wut = 1'b1;
    #(TPERIOD / 2);
    force u_extra.wut = 1'b0;
    #(TPERIOD / 2);
    release u_extra.wut;
  end

  initial begin
    #(TPERIOD * 400);
    checks++; if (pulses != 255) begin failures++; $display("fault-free wire carried %0d pulses", pulses); end
    checks++; if (sm[0] !== 16'hFFFE || om[0] !== 16'hFFFE) begin failures++; $display("ok: start %h result %h", sm[0], om[0]); end
    checks++; if (sm[1] !== 16'hFFFE || om[1] !== 16'hFFFF) begin failures++; $display("sa0: start %h result %h", sm[1], om[1]); end
    checks++; if (sm[2] !== 16'hFFFE || om[2] !== 16'hFFFF) begin failures++; $display("miss: start %h result %h", sm[2], om[2]); end
    checks++; if (sm[3] !== 16'hFFFE || om[3] !== 16'hFFFF) begin failures++; $display("extra: start %h result %h", sm[3], om[3]); end
    checks++; if (w0 != 1 || w1 != 1) begin failures++; $display("extra: %0d zero and %0d one writes", w0, w1); end
    checks++; if (sm[4] !== 16'hFFFF || om[4] !== 16'hFFFF) begin failures++; $display("dead: start %h result %h", sm[4], om[4]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
