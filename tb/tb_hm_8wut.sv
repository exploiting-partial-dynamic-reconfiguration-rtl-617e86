// tb_hm_8wut: runs the eight-wire macro fault-free and with stuck wires and
// compares both result RAMs with a reference worked out from the pattern table.
// Reference: every table row is passed through the fault (wire stuck at 0/1); a
// group passes if its four received wires equal that group's wires in some table
// row (Odd group I II VII VIII, Even group V VI III IV); the result is written at
// address {I, II, V, VI} of the received wires; unwritten cells keep 1.
//   u_ok   fault-free: 0 at addresses 3, 6, 9, 12 in both RAMs
//   u_a0   wire I (Cu1, also an address wire) stuck at 0
//   u_np1  wire VIII (NPOdd) stuck at 1
//   u_frz  all eight wires frozen at row 1 (a configuration that passes)
module tb_hm_8wut;
  localparam int PERIOD = 56;   // 2 * 7 inverters * 1 * 2**2 dividers
  logic [15:0] om [4], em [4], sm [4], cy [4];
  int checks = 0, failures = 0;

  hm_8wut u_ok  (.odd_mem(om[0]), .even_mem(em[0]), .start_mem(sm[0]), .cycles(cy[0]));
  hm_8wut u_a0  (.odd_mem(om[1]), .even_mem(em[1]), .start_mem(sm[1]), .cycles(cy[1]));
  hm_8wut u_np1 (.odd_mem(om[2]), .even_mem(em[2]), .start_mem(sm[2]), .cycles(cy[2]));
  hm_8wut u_frz (.odd_mem(om[3]), .even_mem(em[3]), .start_mem(sm[3]), .cycles(cy[3]));

  // columns I..VIII, column I is bit 7
  localparam logic [7:0] ROWS [4] = '{8'b0001_1110, 8'b0110_1001, 8'b1011_0100, 8'b1100_0011};

  function automatic logic [3:0] odd_grp(logic [7:0] w);  return {w[7], w[6], w[1], w[0]}; endfunction
  function automatic logic [3:0] even_grp(logic [7:0] w); return {w[3], w[2], w[5], w[4]}; endfunction
  function automatic logic [3:0] addr_of(logic [7:0] w);  return {w[7], w[6], w[3], w[2]}; endfunction

  // expected {odd, even} maps for wires forced by (row & keep) | set
  function automatic logic [31:0] expect_maps(logic [7:0] keep, logic [7:0] set);
    logic [15:0] o, e;
    o = '1; e = '1;
    for (int r = 0; r < 4; r++) begin
      logic [7:0] w;
      bit ook, eok;
      w = (ROWS[r] & keep) | set;
      ook = 0; eok = 0;
      for (int k = 0; k < 4; k++) begin
        if (odd_grp(w)  == odd_grp(ROWS[k]))  ook = 1;
        if (even_grp(w) == even_grp(ROWS[k])) eok = 1;
      end
      o[addr_of(w)] = !ook;
      e[addr_of(w)] = !eok;
    end
    return {o, e};
  endfunction

  initial begin
    #(PERIOD * 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_addr [16];
  always @(posedge u_ok.clk) if (u_ok.ora_clk) n_addr[u_ok.addr]++;

  task automatic check_maps(int i, logic [31:0] exp, string what);
    checks++;
    if ({om[i], em[i]} !== exp) begin
      failures++;
      $display("%s: odd %h even %h, expected %h %h", what, om[i], em[i], exp[31:16], exp[15:0]);
    end
  endtask

  initial begin
    logic [31:0] e_ok, e_a0, e_np1, e_frz;
    force u_a0.wut.cu1   = 1'b0;
    force u_np1.wut.npodd = 1'b1;
    force u_frz.wut      = ROWS[0];
    e_ok  = expect_maps(8'hFF, 8'h00);
    e_a0  = expect_maps(8'h7F, 8'h00);
    e_np1 = expect_maps(8'hFF, 8'h01);
    e_frz = expect_maps(8'h00, ROWS[0]);
    // sanity of the reference itself: the fault-free map has four zeros
    checks++; if (e_ok !== {16'hEDB7, 16'hEDB7}) begin failures++; $display("reference map %h", e_ok); end

    #(PERIOD * 200);
    checks++; if (sm[0] !== 16'hFFFE) begin failures++; $display("not started"); end
    check_maps(0, e_ok,  "fault-free");
    check_maps(1, e_a0,  "Cu1 stuck-at-0");
    check_maps(2, e_np1, "NPOdd stuck-at-1");
    check_maps(3, e_frz, "frozen at row 1");
    checks++; if ({om[1], em[1]} === e_ok) begin failures++; $display("address fault not visible"); end
    checks++; if ({om[3], em[3]} === e_ok) begin failures++; $display("frozen wires not visible"); end
    foreach (n_addr[a]) begin
      checks++;
      if ((a == 3 || a == 6 || a == 9 || a == 12) != (n_addr[a] > 0)) begin
        failures++; $display("address %0d written %0d times", a, n_addr[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
