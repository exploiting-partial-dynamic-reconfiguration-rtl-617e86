// tb_fde: checks the frequency divider element.
// A clock drives iclk; the output must toggle on every rising edge (one output
// period per two input periods), and rst must force it low.
module tb_fde;
  logic iclk = 1'b0, rst = 1'b0, oclk;
  int checks = 0, failures = 0;

  fde dut (.iclk(iclk), .rst(rst), .oclk(oclk));

  always #5 iclk = ~iclk;

  initial begin
    repeat (200) @(posedge iclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    int   rises;
    #2 rst = 1'b1;
    #2 checks++; if (oclk !== 1'b0) begin failures++; $display("rst did not clear"); end
    rst = 1'b0;
    prev = oclk;
    for (int i = 0; i < 16; i++) begin
      @(posedge iclk); #1;
      checks++;
      if (oclk !== ~prev) begin failures++; $display("no toggle at edge %0d", i); end
      prev = oclk;
    end
    // count output rising edges over 32 input periods: expect 16
    rises = 0;
    fork
      begin repeat (32) @(posedge iclk); end
      forever begin @(posedge oclk); rises++; end
    join_any
    disable fork;
    checks++;
    if (rises != 16) begin failures++; $display("rises=%0d expected 16", rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
