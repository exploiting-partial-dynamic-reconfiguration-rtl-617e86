// tb_dist_ram: checks the 16x1 distributed RAM model.
// Power-up content all ones, synchronous write only when we is high,
// asynchronous read, readback view equal to a reference array.
module tb_dist_ram;
  logic clk = 1'b0, we = 1'b0, d = 1'b0, q;
  logic [3:0]  addr = '0;
  logic [15:0] mem, ref_mem;
  int checks = 0, failures = 0;

  dist_ram dut (.clk(clk), .we(we), .addr(addr), .d(d), .q(q), .mem(mem));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    ref_mem = 16'hFFFF;
    checks++; if (mem !== ref_mem) begin failures++; $display("power-up %h", mem); end
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we   = 1'($urandom_range(0, 1));
      addr = 4'($urandom);
      d    = 1'($urandom);
      #1;
      checks++; if (q !== ref_mem[addr]) begin failures++; $display("read addr %0d", addr); end
      @(posedge clk); #1;
      if (we) ref_mem[addr] = d;
      checks++; if (mem !== ref_mem) begin failures++; $display("mem %h ref %h", mem, ref_mem); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
