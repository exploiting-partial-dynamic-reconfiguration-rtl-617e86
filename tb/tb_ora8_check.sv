// tb_ora8_check: checks the eight-wire internal ORAs exhaustively.
// The expected passing sets are the four rows of each group of the 8-wire
// pattern table: {Cu1 Cu0 POdd NPOdd} in 0010 0101 1000 1111 and
// {Cd1 Cd0 PEven NPEven} in 1101 1010 0111 0000. All other inputs must fail.
module tb_ora8_check;
  logic [1:0] c;
  logic p, np, fail_odd, fail_even;
  int checks = 0, failures = 0;

  ora8_check #(.ODD(1'b1)) u_odd  (.c(c), .p(p), .np(np), .fail(fail_odd));
  ora8_check #(.ODD(1'b0)) u_even (.c(c), .p(p), .np(np), .fail(fail_even));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      bit odd_ok, even_ok;
      odd_ok  = (v == 4'b0010) || (v == 4'b0101) || (v == 4'b1000) || (v == 4'b1111);
      even_ok = (v == 4'b1101) || (v == 4'b1010) || (v == 4'b0111) || (v == 4'b0000);
      {c, p, np} = 4'(v); #1;
      checks++; if (fail_odd  !== !odd_ok)  begin failures++; $display("odd %b", 4'(v)); end
      checks++; if (fail_even !== !even_ok) begin failures++; $display("even %b", 4'(v)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
