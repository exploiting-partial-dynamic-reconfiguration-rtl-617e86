// tb_cycle_counter: checks the clock cycle counter.
// It must read 0 in reset, count one per rising edge afterwards and saturate at
// all ones (WIDTH is reduced to 6 here so that saturation is reached quickly).
module tb_cycle_counter;
  logic clk = 1'b0, rst = 1'b1;
  logic [5:0] count;
  int checks = 0, failures = 0;

  cycle_counter #(.WIDTH(6)) dut (.clk(clk), .rst(rst), .count(count));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); #1;
    checks++; if (count !== 0) begin failures++; $display("not 0 in reset"); end
    @(negedge clk) rst = 1'b0;
    for (int i = 1; i <= 100; i++) begin
      @(posedge clk); #1;
      checks++;
      if (count !== 6'((i > 63) ? 63 : i)) begin failures++; $display("edge %0d count %0d", i, count); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
