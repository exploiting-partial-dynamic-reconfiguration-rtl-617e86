// tb_tpgcu: checks the single-wire TPG control unit.
// After reset the gated wire must carry exactly 2**N - 1 full pulses (N = 4 here:
// 15), each as long as a clock high phase, then stay low; ENABLE must change only
// while the clock is low. A second reset must start a new burst.
module tb_tpgcu;
  logic clk = 1'b0, rst = 1'b1, enable, wut;
  int checks = 0, failures = 0;
  int pulses = 0;
  bit count_on = 1'b0;

  tpgcu #(.N(4)) dut (.clk(clk), .rst(rst), .enable(enable), .wut(wut));

  always #5 clk = ~clk;

  always @(posedge wut) if (count_on) pulses++;
  always @(negedge wut) if (count_on) begin
    checks++; if (clk !== 1'b0) begin failures++; $display("pulse cut short"); end
  end
  always @(enable) if (!rst) begin
    checks++; if (clk !== 1'b0) begin failures++; $display("ENABLE moved while clk high"); end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int run = 0; run < 2; run++) begin
      rst = 1'b1;
      repeat (3) @(posedge clk);
      @(negedge clk); #1 rst = 1'b0; count_on = 1'b1; pulses = 0;
      repeat (40) @(posedge clk);
      checks++; if (pulses != 15) begin failures++; $display("run %0d: %0d pulses, expected 15", run, pulses); end
      checks++; if (enable !== 1'b0) begin failures++; $display("ENABLE still high"); end
      count_on = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
