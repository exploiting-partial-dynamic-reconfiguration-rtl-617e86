// tb_ora_su: checks the two-state ORA sequencer.
// After reset the outputs are 00 (state S1); a clock edge with DR = 1 gives 11
// (state S0); an edge with DR = 0 gives 00 again. Random DR is compared with a
// one-cycle-delayed reference.
module tb_ora_su;
  logic clk = 1'b0, rst = 1'b0, dr = 1'b0, ora_clk, done;
  int checks = 0, failures = 0;

  ora_su dut (.clk(clk), .rst(rst), .dr(dr), .ora_clk(ora_clk), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expect_s0;
    dr = 1'b1;
    rst = 1'b1; #12;
    checks++; if ({ora_clk, done} !== 2'b00) begin failures++; $display("reset state not S1/00"); end
    rst = 1'b0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      dr = 1'($urandom);
      expect_s0 = dr;
      @(posedge clk); #1;
      checks++;
      if ({ora_clk, done} !== {2{expect_s0}}) begin
        failures++; $display("cycle %0d dr=%b out=%b%b", i, dr, ora_clk, done);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
