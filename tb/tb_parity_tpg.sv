// tb_parity_tpg: checks both internal TPGs against the pattern tables.
// The four 8-wire configurations (columns I..VIII: Cu1 Cu0 PEven NPEven Cd1 Cd0
// POdd NPOdd) are written out as constants; the first six-wire table is the same
// without columns IV and VIII. The TPGs start at row 1 after reset, advance one
// row per next pulse, wrap after row 4, and hold when next is low.
module tb_parity_tpg;
  logic clk = 1'b0, rst = 1'b0, next = 1'b0;
  logic [1:0] cu, cd;
  logic pe, npe, po, npo;
  int checks = 0, failures = 0;

  localparam logic [7:0] ROWS [4] = '{8'b0001_1110, 8'b0110_1001, 8'b1011_0100, 8'b1100_0011};

  parity_tpg #(.ODD(1'b0)) u_even (.clk(clk), .rst(rst), .next(next), .c(cu), .p(pe), .np(npe));
  parity_tpg #(.ODD(1'b1)) u_odd  (.clk(clk), .rst(rst), .next(next), .c(cd), .p(po), .np(npo));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_row(int r);
    logic [7:0] got;
    got = {cu, pe, npe, cd, po, npo};
    checks++;
    if (got !== ROWS[r]) begin
      failures++;
      $display("row %0d: got %b expected %b", r + 1, got, ROWS[r]);
    end
  endtask

  initial begin
    int row;
    rst = 1'b1; #12 rst = 1'b0;
    row = 0;
    check_row(row);
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      next = 1'($urandom);
      @(posedge clk); #1;
      if (next) row = (row + 1) % 4;
      check_row(row);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
