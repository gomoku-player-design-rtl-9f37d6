// line_comparator: compares one window row of the board with one pattern row.
//
// Both rows are 10 bits, {msb[4:0], lsb[4:0]}, one 2-bit code per square.
// A pattern square coded 11 (don't care) matches anything; any other
// pattern square must equal the board square. match is 1 when all five
// squares match. Purely combinational; the don't-care rule is the
// document's, the gate structure is this design's.
module line_comparator
  import gomoku_pkg::*;
(
  input  logic [2*WIN_N-1:0] brow,
  input  logic [2*WIN_N-1:0] prow,
  output logic               match
);
  logic [WIN_N-1:0] sq_ok;
  always_comb begin
    for (int i = 0; i < WIN_N; i++) begin
      sq_ok[i] = (prow[i] & prow[WIN_N+i]) |
                 ((prow[i] == brow[i]) & (prow[WIN_N+i] == brow[WIN_N+i]));
    end
    match = &sq_ok;
  end
endmodule
