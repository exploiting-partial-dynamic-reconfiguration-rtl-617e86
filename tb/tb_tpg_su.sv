// tb_tpg_su: checks the TPG sequencer against a behavioural ORA sequencer.
// The testbench answers DR with DONE one cycle later (like the ORA sequencer) and
// checks that: TPG_NEXT is a single-cycle pulse, it only comes after DONE was seen
// while DR was high, DR and TPG_NEXT are never high together, and a complete
// configuration takes 4 clock cycles. It also checks that without DONE the
// sequencer waits with DR high.
module tb_tpg_su;
  logic clk = 1'b0, rst = 1'b0, done = 1'b0, dr, tpg_next;
  int checks = 0, failures = 0;
  bit answer = 1'b1;

  tpg_su dut (.clk(clk), .rst(rst), .done(done), .dr(dr), .tpg_next(tpg_next));

  always #5 clk = ~clk;

  // behavioural ORA side: DONE follows DR by one cycle
  always_ff @(posedge clk) done <= answer ? dr : 1'b0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_next, n_next;
    bit prev_next;
    rst = 1'b1; #12 rst = 1'b0;
    last_next = -1; n_next = 0; prev_next = 1'b0;
    for (int cyc = 0; cyc < 200; cyc++) begin
      @(posedge clk); #1;
      checks++; if (dr && tpg_next) begin failures++; $display("DR and TPG_NEXT together"); end
      if (tpg_next) begin
        checks++; if (prev_next) begin failures++; $display("TPG_NEXT longer than one cycle"); end
        if (last_next >= 0) begin
          checks++;
          if (cyc - last_next != 4) begin failures++; $display("period %0d, expected 4", cyc - last_next); end
        end
        last_next = cyc; n_next++;
      end
      prev_next = tpg_next;
    end
    checks++; if (n_next < 40) begin failures++; $display("only %0d configurations", n_next); end
    // no answer: must wait with DR high and no TPG_NEXT
    answer = 1'b0;
    repeat (10) @(posedge clk);
    for (int cyc = 0; cyc < 20; cyc++) begin
      @(posedge clk); #1;
      checks++; if (!dr || tpg_next) begin failures++; $display("did not wait for DONE"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
