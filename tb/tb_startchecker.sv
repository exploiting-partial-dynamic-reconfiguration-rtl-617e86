// tb_startchecker: checks both start checker variants.
// Parity variant: the bit stays 1 until the first TPG_NEXT pulse, then is 0 for
// good. Single-wire variant: the bit stays 1 while ENABLE is high and becomes 0
// on the first clock edge after ENABLE falls. Only address 0 may change.
module tb_startchecker;
  logic clk = 1'b0, tpg_next = 1'b0, enable = 1'b1;
  logic started_p, started_w;
  logic [15:0] mem_p, mem_w;
  int checks = 0, failures = 0;

  startchecker #(.ONE_WUT(1'b0)) u_par (.clk(clk), .trig(tpg_next), .started(started_p), .mem(mem_p));
  startchecker #(.ONE_WUT(1'b1)) u_one (.clk(clk), .trig(enable),   .started(started_w), .mem(mem_w));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk); #1;
    checks++; if (mem_p !== 16'hFFFF || started_p) begin failures++; $display("parity: started early"); end
    checks++; if (mem_w !== 16'hFFFF || started_w) begin failures++; $display("1wut: started early"); end
    @(negedge clk) tpg_next = 1'b1;
    @(negedge clk) tpg_next = 1'b0;
    checks++; if (mem_p !== 16'hFFFE || !started_p) begin failures++; $display("parity: not started %h", mem_p); end
    repeat (5) begin
      @(negedge clk) tpg_next = 1'b1;
      @(negedge clk) tpg_next = 1'b0;
    end
    checks++; if (mem_p !== 16'hFFFE) begin failures++; $display("parity: changed again"); end
    checks++; if (mem_w !== 16'hFFFF) begin failures++; $display("1wut: started without ENABLE falling"); end
    @(negedge clk) enable = 1'b0;
    @(negedge clk);
    checks++; if (mem_w !== 16'hFFFE || !started_w) begin failures++; $display("1wut: not started %h", mem_w); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
