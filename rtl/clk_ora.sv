// clk_ora: edge counting part of the single-wire ORA.
//
// The High counter counts rising edges and the Low counter falling edges of the
// received wire (the gated clock). Both are N bits wide. Their outputs are NANDed
// bit by bit and the N results ORed into RNAND, which is 0 exactly when both
// counters hold all ones, that is after 2**N - 1 complete pulses. One more pulse
// wraps the High counter to zero and RNAND returns to 1. This is the document's
// structure; the asynchronous active-high rst clears both counters.
module clk_ora #(
  parameter int unsigned N = 8
) (
  input  logic         wut,
  input  logic         rst,
  output logic         rnand,
  output logic [N-1:0] high_cnt,
  output logic [N-1:0] low_cnt
);
  logic [N-1:0] hi_q = '0;
  logic [N-1:0] lo_q = '0;

  always_ff @(posedge wut or posedge rst) begin
    if (rst) hi_q <= '0;
    else     hi_q <= hi_q + 1'b1;
  end

  always_ff @(negedge wut or posedge rst) begin
    if (rst) lo_q <= '0;
    else     lo_q <= lo_q + 1'b1;
  end

  assign high_cnt = hi_q;
  assign low_cnt  = lo_q;
  assign rnand    = |(~(hi_q & lo_q));
endmodule
