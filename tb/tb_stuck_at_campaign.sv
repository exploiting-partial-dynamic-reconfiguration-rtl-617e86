// tb_stuck_at_campaign: stuck-at fault campaign over the three test macros.
//
// Each macro is evaluated the way it would be on the device: one copy per fault,
// the fault present from power-up, and the result RAMs read back once the macro
// has finished. Every run is sorted into the four outcome classes of the
// start/result pair:
//   not started + fault detected, not started + no fault,
//   started + fault detected (the wanted outcome), started + no fault (bad case).
// The faults:
//   - every wire under test stuck at 0 and at 1: 6 + 8 + 1 wires, 30 runs. Each
//     must end "started + fault detected";
//   - the macro clock stuck low (6WUT and 8WUT ring oscillator, 1WUT TPG
//     oscillator): "not started + fault detected", since the RAMs keep their
//     power-up ones;
//   - the start checker's write enable stuck at 0, on a fault-free macro:
//     "not started + no fault";
//   - a wire under test stuck at 0 together with the ORA result wire stuck at 0,
//     which masks it: "started + no fault".
// All macros run at their default parameters, except that each copy of the six-
// and eight-wire macros gets its own cycle-counter width (16 and up). The count is
// not read here; distinct parameters keep the copies, and the faults forced into
// them, apart when the simulator shares code between identical copies. For the six-wire and single-wire
// macros a fault is detected when result address 0 holds 1. For the eight-wire
// macro it is detected when either RAM differs from the fault-free map 16'hEDB7.
// The class counts are printed per macro.
module tb_stuck_at_campaign;
  import fdt_pkg::*;

  localparam logic [15:0] MAP8_OK = 16'hEDB7;  // 0 at addresses 3, 6, 9, 12
  localparam time         RUN_T   = 100_000;   // every macro is finished by then

  typedef enum logic [1:0] {
    NS_DET = 2'd0,  // not started, fault detected
    NS_OK  = 2'd1,  // not started, no fault detected
    ST_DET = 2'd2,  // started, fault detected
    ST_OK  = 2'd3   // started, no fault detected
  } outcome_t;

  function automatic outcome_t classify(input logic started, input logic detected);
    if (!started) return detected ? NS_DET : NS_OK;
    else          return detected ? ST_DET : ST_OK;
  endfunction

  int checks = 0, failures = 0;
  int cls6[4], cls8[4], cls1[4];

  // ---------------- six-wire macro: 12 stuck-ats + 3 special faults ----------
  logic [15:0] m6_odd [15], m6_even [15], m6_start [15];

  for (genvar k = 0; k < 12; k++) begin : g6
    localparam int  W = k / 2;
    localparam bit  V = k % 2;
    logic [16+k-1:0] cyc_unused;
    hm_6wut #(.CYC_WIDTH(16+k)) u (.odd_mem(m6_odd[k]), .even_mem(m6_even[k]), .start_mem(m6_start[k]),
               .cycles(cyc_unused));
    initial begin
      case (W)
        0: force u.wut.cu1   = V;
        1: force u.wut.cu0   = V;
        2: force u.wut.peven = V;
        3: force u.wut.cd1   = V;
        4: force u.wut.cd0   = V;
        default: force u.wut.podd = V;
      endcase
    end
  end

  logic [27:0] c6_clk_unused;
  logic [28:0] c6_ns_unused;
  logic [29:0] c6_mask_unused;
  hm_6wut #(.CYC_WIDTH(28)) u6_clk  (.odd_mem(m6_odd[12]), .even_mem(m6_even[12]), .start_mem(m6_start[12]),
                   .cycles(c6_clk_unused));
  hm_6wut #(.CYC_WIDTH(29)) u6_ns   (.odd_mem(m6_odd[13]), .even_mem(m6_even[13]), .start_mem(m6_start[13]),
                   .cycles(c6_ns_unused));
  hm_6wut #(.CYC_WIDTH(30)) u6_mask (.odd_mem(m6_odd[14]), .even_mem(m6_even[14]), .start_mem(m6_start[14]),
                   .cycles(c6_mask_unused));
  initial begin
    force u6_clk.clk          = 1'b0;
    force u6_ns.u_start.we    = 1'b0;
    force u6_mask.wut.peven   = 1'b0;
    force u6_mask.fail_even   = 1'b0;
  end

  // ---------------- eight-wire macro: 16 stuck-ats + 3 special faults --------
  logic [15:0] m8_odd [19], m8_even [19], m8_start [19];

  for (genvar k = 0; k < 16; k++) begin : g8
    localparam int  W = k / 2;
    localparam bit  V = k % 2;
    logic [16+k-1:0] cyc_unused;
    hm_8wut #(.CYC_WIDTH(16+k)) u (.odd_mem(m8_odd[k]), .even_mem(m8_even[k]), .start_mem(m8_start[k]),
               .cycles(cyc_unused));
    initial begin
      case (W)
        0: force u.wut.cu1    = V;
        1: force u.wut.cu0    = V;
        2: force u.wut.peven  = V;
        3: force u.wut.npeven = V;
        4: force u.wut.cd1    = V;
        5: force u.wut.cd0    = V;
        6: force u.wut.podd   = V;
        default: force u.wut.npodd = V;
      endcase
    end
  end

  logic [31:0] c8_clk_unused;
  logic [32:0] c8_ns_unused;
  logic [33:0] c8_mask_unused;
  hm_8wut #(.CYC_WIDTH(32)) u8_clk  (.odd_mem(m8_odd[16]), .even_mem(m8_even[16]), .start_mem(m8_start[16]),
                   .cycles(c8_clk_unused));
  hm_8wut #(.CYC_WIDTH(33)) u8_ns   (.odd_mem(m8_odd[17]), .even_mem(m8_even[17]), .start_mem(m8_start[17]),
                   .cycles(c8_ns_unused));
  hm_8wut #(.CYC_WIDTH(34)) u8_mask (.odd_mem(m8_odd[18]), .even_mem(m8_even[18]), .start_mem(m8_start[18]),
                   .cycles(c8_mask_unused));
  initial begin
    force u8_clk.clk         = 1'b0;
    force u8_ns.u_start.we   = 1'b0;
    // npeven stuck at 0 fails the even checker in rows 1 and 3 only; masking its
    // result wire leaves the fault-free map in both RAMs.
    force u8_mask.wut.npeven = 1'b0;
    force u8_mask.fail_even  = 1'b0;
  end

  // ---------------- single-wire macro: 2 stuck-ats + 3 special faults --------
  logic [15:0] m1_ora [5], m1_start [5];

  hm_1wut u1_sa0  (.ora_mem(m1_ora[0]), .start_mem(m1_start[0]));
  hm_1wut u1_sa1  (.ora_mem(m1_ora[1]), .start_mem(m1_start[1]));
  hm_1wut u1_clk  (.ora_mem(m1_ora[2]), .start_mem(m1_start[2]));
  hm_1wut u1_ns   (.ora_mem(m1_ora[3]), .start_mem(m1_start[3]));
  hm_1wut u1_mask (.ora_mem(m1_ora[4]), .start_mem(m1_start[4]));
  initial begin
    force u1_sa0.wut        = 1'b0;
    force u1_sa1.wut        = 1'b1;
    force u1_clk.tclk       = 1'b0;
    force u1_ns.u_start.we  = 1'b0;
    // Masking: the RAM data wire is stuck at 0, so the write of 1 that an extra
    // pulse on the wire causes stores 0 instead.
    force u1_mask.datatoram = 1'b0;
  end
  initial begin
    // One extra pulse after the burst (a short onto the wire).
    wait (u1_mask.rst === 1'b0);
    wait (u1_mask.enable === 1'b0);
    #200;
    force u1_mask.wut = 1'b1;
    #20;
    force u1_mask.wut = 1'b0;
  end

  // ---------------- evaluation ----------------------------------------------
  task automatic expect_class(input string name, input outcome_t got, input outcome_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: outcome %s, expected %s", name, got.name(), exp.name());
    end
  endtask

  initial begin
    outcome_t o;
    #(RUN_T);

    for (int k = 0; k < 15; k++) begin
      o = classify(!m6_start[k][0], m6_odd[k][0] | m6_even[k][0]);
      cls6[o]++;
      expect_class($sformatf("6WUT run %0d", k), o,
                   k < 12 ? ST_DET : (k == 12 ? NS_DET : (k == 13 ? NS_OK : ST_OK)));
    end
    for (int k = 0; k < 19; k++) begin
      o = classify(!m8_start[k][0], (m8_odd[k] != MAP8_OK) || (m8_even[k] != MAP8_OK));
      cls8[o]++;
      expect_class($sformatf("8WUT run %0d", k), o,
                   k < 16 ? ST_DET : (k == 16 ? NS_DET : (k == 17 ? NS_OK : ST_OK)));
    end
    for (int k = 0; k < 5; k++) begin
      o = classify(!m1_start[k][0], m1_ora[k][0]);
      cls1[o]++;
      expect_class($sformatf("1WUT run %0d", k), o,
                   k < 2 ? ST_DET : (k == 2 ? NS_DET : (k == 3 ? NS_OK : ST_OK)));
    end

    $display("macro  runs  NS+det  NS+ok  ST+det  ST+ok");
    $display("6WUT   %4d  %6d  %5d  %6d  %5d", 15, cls6[0], cls6[1], cls6[2], cls6[3]);
    $display("8WUT   %4d  %6d  %5d  %6d  %5d", 19, cls8[0], cls8[1], cls8[2], cls8[3]);
    $display("1WUT   %4d  %6d  %5d  %6d  %5d",  5, cls1[0], cls1[1], cls1[2], cls1[3]);

    // Every class must have occurred for every macro.
    for (int c = 0; c < 4; c++) begin
      checks += 3;
      if (cls6[c] == 0) begin failures++; $display("FAIL 6WUT class %0d never seen", c); end
      if (cls8[c] == 0) begin failures++; $display("FAIL 8WUT class %0d never seen", c); end
      if (cls1[c] == 0) begin failures++; $display("FAIL 1WUT class %0d never seen", c); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog
  initial begin
    #(RUN_T * 10);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
