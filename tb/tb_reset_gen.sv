// tb_reset_gen: checks the power-up reset generator.
// RESET must be high from time 0 for exactly WIDTH (32) rising clock edges and
// then stay low.
module tb_reset_gen;
  logic clk = 1'b0, reset;
  int checks = 0, failures = 0;

  reset_gen dut (.clk(clk), .reset(reset));

  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int high_cycles;
    #1;
    checks++; if (reset !== 1'b1) begin failures++; $display("reset low at power-up"); end
    high_cycles = 0;
    for (int i = 0; i < 100; i++) begin
      @(posedge clk); #1;
      if (reset) high_cycles = i + 1;
    end
    // reset stays high through edges 1..31 and falls after edge 32
    checks++;
    if (high_cycles != 31) begin failures++; $display("high through %0d edges, expected 31", high_cycles); end
    for (int i = 0; i < 20; i++) begin
      @(posedge clk); #1;
      checks++; if (reset !== 1'b0) begin failures++; $display("reset came back"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
