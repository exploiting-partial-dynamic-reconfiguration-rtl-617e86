// tb_hm_6wut: runs the six-wire macro, fault-free and with faults forced onto
// its wires, and compares the readback views with expectations worked out here.
//   u_ok    fault-free: all three result bits at address 0 become 0; the wires
//           step through the four table rows, one per TPG_NEXT, 4 cycles apart.
//   u_pe0   wire III (PEven) stuck at 0: only the Even Parity ORA reports.
//   u_po1   wire VI (POdd) stuck at 1: only the Odd Parity ORA reports.
//   u_tr    wire I (Cu1) inverted for a few cycles only: the feedback must keep
//           the Odd Parity ORA's fault although later rows are correct.
//   u_dead  clock stopped (dead oscillator): start bit stays 1 (not started).
//   u_nocyc variant without the clock cycle counter: same results as u_ok,
//           cycle output 0.
// The clock cycle counter of u_ok must equal the clock edges seen after RESET.
module tb_hm_6wut;
  localparam int PERIOD = 40;   // 2 * 5 inverters * 1 * 2**2 dividers
  logic [15:0] om [6], em [6], sm [6], cy [6];
  int checks = 0, failures = 0;

  hm_6wut u_ok   (.odd_mem(om[0]), .even_mem(em[0]), .start_mem(sm[0]), .cycles(cy[0]));
  hm_6wut u_pe0  (.odd_mem(om[1]), .even_mem(em[1]), .start_mem(sm[1]), .cycles(cy[1]));
  hm_6wut u_po1  (.odd_mem(om[2]), .even_mem(em[2]), .start_mem(sm[2]), .cycles(cy[2]));
  hm_6wut u_tr   (.odd_mem(om[3]), .even_mem(em[3]), .start_mem(sm[3]), .cycles(cy[3]));
  hm_6wut u_dead (.odd_mem(om[4]), .even_mem(em[4]), .start_mem(sm[4]), .cycles(cy[4]));
  hm_6wut #(.CYC_EN(1'b0)) u_nocyc (.odd_mem(om[5]), .even_mem(em[5]), .start_mem(sm[5]),
                                    .cycles(cy[5]));

  localparam logic [5:0] ROWS [4] = '{6'b000111, 6'b011100, 6'b101010, 6'b110001};

  initial begin
    #(PERIOD * 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fault-free instance: wire sequence and handshake spacing
  int row = 0, n_next = 0, last_next = -1, cyc = 0, edges_after_reset = 0;
  always @(posedge u_ok.clk) begin
    cyc++;
    if (!u_ok.rst) edges_after_reset++;
    #1;
    if (u_ok.dr) begin
      checks++;
      if (u_ok.wut !== ROWS[row]) begin failures++; $display("wires %b expected row %0d %b", u_ok.wut, row + 1, ROWS[row]); end
    end
    if (u_ok.tpg_next) begin
      if (last_next >= 0) begin
        checks++; if (cyc - last_next != 4) begin failures++; $display("configuration took %0d cycles", cyc - last_next); end
      end
      last_next = cyc; n_next++;
      row = (row + 1) % 4;
    end
  end

  function automatic bit check_eq(logic [15:0] got, logic [15:0] exp, string what);
    if (got !== exp) $display("%s: got %h expected %h", what, got, exp);
    return got === exp;
  endfunction

  initial begin
    force u_pe0.wut.peven = 1'b0;
    force u_po1.wut.podd  = 1'b1;
    force u_dead.clk      = 1'b0;
    // transient: invert Cu1 during the second configuration only
    wait (u_tr.tpg_next === 1'b1);
    @(posedge u_tr.dr);
    force u_tr.wut.cu1 = ~u_tr.cu[1];
    @(negedge u_tr.dr);
    release u_tr.wut.cu1;

    #(PERIOD * 200);
    checks++; if (n_next < 20) begin failures++; $display("only %0d configurations", n_next); end
    checks++; if (!check_eq(sm[0], 16'hFFFE, "ok start"))  failures++;
    checks++; if (!check_eq(om[0], 16'hFFFE, "ok odd"))    failures++;
    checks++; if (!check_eq(em[0], 16'hFFFE, "ok even"))   failures++;
    checks++; if (cy[0] != 16'(edges_after_reset)) begin failures++; $display("cycles %0d expected %0d", cy[0], edges_after_reset); end
    checks++; if (!check_eq(sm[1], 16'hFFFE, "pe0 start")) failures++;
    checks++; if (!check_eq(om[1], 16'hFFFE, "pe0 odd"))   failures++;
    checks++; if (!check_eq(em[1], 16'hFFFF, "pe0 even"))  failures++;
    checks++; if (!check_eq(om[2], 16'hFFFF, "po1 odd"))   failures++;
    checks++; if (!check_eq(em[2], 16'hFFFE, "po1 even"))  failures++;
    checks++; if (!check_eq(om[3], 16'hFFFF, "transient odd"))  failures++;
    checks++; if (!check_eq(em[3], 16'hFFFE, "transient even")) failures++;
    checks++; if (!check_eq(sm[4], 16'hFFFF, "dead start")) failures++;
    checks++; if (!check_eq(sm[5], 16'hFFFE, "nocyc start")) failures++;
    checks++; if (!check_eq(om[5], 16'hFFFE, "nocyc odd"))   failures++;
    checks++; if (!check_eq(em[5], 16'hFFFE, "nocyc even"))  failures++;
    checks++; if (!check_eq(cy[5], 16'h0000, "nocyc cycles")) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
