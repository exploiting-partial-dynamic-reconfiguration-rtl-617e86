// tb_ring_oscillator: checks the clock source model.
// With N_INV = 3, T_INV = 2, N_FDE = 2 the clock period must be
// 2 * 3 * 2 * 2**2 = 48 time units with a 50 % duty cycle.
module tb_ring_oscillator;
  logic clk;
  int checks = 0, failures = 0;

  ring_oscillator #(.N_INV(3), .T_INV(2), .N_FDE(2)) dut (.clk(clk));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_rise, t_fall, t_prev;
    @(posedge clk); t_prev = $time;
    for (int i = 0; i < 10; i++) begin
      @(negedge clk); t_fall = $time;
      @(posedge clk); t_rise = $time;
      checks++; if (t_rise - t_prev != 48) begin failures++; $display("period %0d", t_rise - t_prev); end
      checks++; if (t_fall - t_prev != 24) begin failures++; $display("high time %0d", t_fall - t_prev); end
      t_prev = t_rise;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
