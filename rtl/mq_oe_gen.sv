// mq_oe_gen: output-enable generator for the four byte slots BO1..BO4
// (combinational).
//
// The code-update stage can commit up to four bytes per cycle: two for each
// symbol, in stream order BO1, BO2, BO3, BO4. The very first byte the coder
// commits in a code-block is not part of the code stream: it is the initial
// content of the byte buffer B, which only exists to absorb a carry. This
// unit passes the commit flags through as OE1..OE4, except that it removes the
// first commit of a code-block (the lowest set flag while `started` is low),
// and it reports whether the code-block has started after this cycle.
//
// The architecture only names this unit; suppressing the placeholder byte
// is this design's choice of what it does.
//
// Interface: commit[3:0] (bit 0 = BO1) and started in; oe[3:0] and
// started_next out. No clock.
module mq_oe_gen (
  input  logic [3:0] commit,
  input  logic       started,
  output logic [3:0] oe,
  output logic       started_next
);

  logic [3:0] first;   // one-hot lowest set commit flag

  always_comb begin
    first = commit & (~commit + 4'd1);
    oe    = started ? commit : (commit & ~first);
    started_next = started || (commit != 4'd0);
  end

endmodule
