// tb_oracu: checks the single-wire ORA control unit.
// A reference RAM bit (power-up 1) is written from DATATORAM when WRITETORAM is
// high. Three cases are driven on RNAND:
//   it never falls          -> bit stays 1, nothing written;
//   it falls and stays low  -> bit becomes 0;
//   it falls, then rises    -> bit becomes 0, then 1, and further RNAND
//                              activity changes nothing.
// A short low pulse of RNAND, shorter than an ORA clock period, must be caught.
module tb_oracu;
  logic clk = 1'b0, rst = 1'b1, rnand = 1'b1, data, wr;
  logic bit_q;
  int checks = 0, failures = 0;
  int writes0 = 0, writes1 = 0;

  oracu dut (.clk(clk), .rst(rst), .rnand(rnand), .datatoram(data), .writetoram(wr));

  always #7 clk = ~clk;

  always_ff @(posedge clk) if (wr && !rst) begin
    bit_q <= data;
    if (data) writes1++; else writes0++;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic restart();
    rst = 1'b1; rnand = 1'b1; bit_q = 1'b1; writes0 = 0; writes1 = 0;
    #20 rst = 1'b0;
  endtask

  initial begin
    // case 1: never falls
    restart();
    repeat (20) @(posedge clk); #1;
    checks++; if (bit_q !== 1'b1 || writes0 + writes1 != 0) begin failures++; $display("case 1: wrote"); end
    // case 2: falls and stays low
    restart();
    #3 rnand = 1'b0;
    repeat (20) @(posedge clk); #1;
    checks++; if (bit_q !== 1'b0) begin failures++; $display("case 2: no 0 written"); end
    checks++; if (writes1 != 0) begin failures++; $display("case 2: wrote 1"); end
    // case 3: short low pulse (2 time units), then more activity
    restart();
    #3 rnand = 1'b0; #2 rnand = 1'b1;
    repeat (20) @(posedge clk); #1;
    checks++; if (bit_q !== 1'b1 || writes1 != 1) begin failures++; $display("case 3: final %b writes1=%0d", bit_q, writes1); end
    repeat (5) begin #3 rnand = 1'b0; #3 rnand = 1'b1; end
    repeat (10) @(posedge clk); #1;
    checks++; if (writes0 + writes1 > 2) begin failures++; $display("case 3: not locked"); end
    // case 4: falls, held low long enough to write 0, then rises
    restart();
    #3 rnand = 1'b0;
    repeat (10) @(posedge clk); #1;
    checks++; if (bit_q !== 1'b0) begin failures++; $display("case 4: no 0 first"); end
    rnand = 1'b1;
    repeat (10) @(posedge clk); #1;
    checks++; if (bit_q !== 1'b1 || writes0 != 1 || writes1 != 1) begin failures++; $display("case 4: %b %0d %0d", bit_q, writes0, writes1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
