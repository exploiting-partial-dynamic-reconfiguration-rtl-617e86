// tb_clk_ora: checks the edge counters and RNAND of the single-wire ORA (N = 4).
// RNAND must be 1 until the 15th falling edge, 0 right after it, and 1 again at
// the 16th rising edge; the counters must match the numbers of edges sent.
module tb_clk_ora;
  logic wut = 1'b0, rst = 1'b1, rnand;
  logic [3:0] hi, lo;
  int checks = 0, failures = 0;

  clk_ora #(.N(4)) dut (.wut(wut), .rst(rst), .rnand(rnand), .high_cnt(hi), .low_cnt(lo));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10 rst = 1'b0;
    #1 checks++; if (rnand !== 1'b1) begin failures++; $display("RNAND low after reset"); end
    for (int i = 1; i <= 15; i++) begin
      #5 wut = 1'b1; #1;
      checks++; if (hi !== 4'(i)) begin failures++; $display("high count %0d", hi); end
      checks++; if (rnand !== 1'b1) begin failures++; $display("RNAND low after rise %0d", i); end
      #5 wut = 1'b0; #1;
      checks++; if (lo !== 4'(i)) begin failures++; $display("low count %0d", lo); end
      checks++; if (rnand !== (i != 15)) begin failures++; $display("RNAND %b after fall %0d", rnand, i); end
    end
    #5 wut = 1'b1; #1;
    checks++; if (rnand !== 1'b1) begin failures++; $display("RNAND not back after extra pulse"); end
    #5 rst = 1'b1; #1;
    checks++; if (hi !== 0 || lo !== 0) begin failures++; $display("reset did not clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
