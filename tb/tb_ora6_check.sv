// tb_ora6_check: checks the six-wire internal ORAs.
// Every combination of the three received wires is applied to both checkers and
// compared with the expected set (the four rows of the pattern table for that
// group); then a single mismatch strobed by wr must stay visible afterwards
// (feedback), until rst.
module tb_ora6_check;
  logic clk = 1'b0, rst = 1'b0, wr = 1'b0;
  logic [1:0] c;
  logic p, fail_odd, fail_even;
  int checks = 0, failures = 0;

  ora6_check #(.ODD(1'b1)) u_odd  (.clk(clk), .rst(rst), .wr(wr), .c(c), .p(p), .fail(fail_odd));
  ora6_check #(.ODD(1'b0)) u_even (.clk(clk), .rst(rst), .wr(wr), .c(c), .p(p), .fail(fail_even));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Valid {Cu1 Cu0 POdd}: 001 010 100 111; valid {Cd1 Cd0 PEven}: 110 101 011 000
  function automatic bit odd_ok(logic [2:0] v);
    return v == 3'b001 || v == 3'b010 || v == 3'b100 || v == 3'b111;
  endfunction
  function automatic bit even_ok(logic [2:0] v);
    return v == 3'b110 || v == 3'b101 || v == 3'b011 || v == 3'b000;
  endfunction

  initial begin
    rst = 1'b1; #12 rst = 1'b0;
    for (int v = 0; v < 8; v++) begin
      {c, p} = 3'(v); #1;
      checks++; if (fail_odd  !== !odd_ok(3'(v)))  begin failures++; $display("odd %b", 3'(v)); end
      checks++; if (fail_even !== !even_ok(3'(v))) begin failures++; $display("even %b", 3'(v)); end
    end
    // transient fault on the odd group while writing
    @(negedge clk); {c, p} = 3'b000; wr = 1'b1;
    @(negedge clk); {c, p} = 3'b001; wr = 1'b1;   // valid again
    #1;
    checks++; if (fail_odd !== 1'b1) begin failures++; $display("odd feedback lost"); end
    checks++; if (fail_even !== 1'b1) begin failures++; $display("even: 001 is not an even row"); end
    @(negedge clk); {c, p} = 3'b110; wr = 1'b1;   // valid for even, not for odd
    @(negedge clk); {c, p} = 3'b000; wr = 1'b0;   // valid for even
    #1;
    checks++; if (fail_odd !== 1'b1) begin failures++; $display("odd feedback lost 2"); end
    checks++; if (fail_even !== 1'b1) begin failures++; $display("even feedback lost"); end
    rst = 1'b1; #1 rst = 1'b0; #1;
    checks++; if (fail_even !== 1'b0) begin failures++; $display("even not cleared by rst"); end
    // a mismatch without wr is not remembered
    {c, p} = 3'b111; @(posedge clk); #1 {c, p} = 3'b000; #1;
    checks++; if (fail_even !== 1'b0) begin failures++; $display("even remembered without wr"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
