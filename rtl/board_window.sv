// board_window: cuts a five-square window out of one board row.
//
// The board row arrives as two 16-bit planes, the low (lsb) and high (msb)
// bit of each square, column i at bit i. The window starting at column x
// takes columns x..x+4 of both planes, giving the 10-bit window row "brow"
// = {msb[x+4:x], lsb[x+4:x]}; window position 0 is the least significant
// bit of each half. Ten multiplexers, one per output bit, do the selection,
// as in the document; x must lie in 0..11 (the window stays on the board).
// Purely combinational.
module board_window
  import gomoku_pkg::*;
(
  input  logic [BOARD_N-1:0] row_lsb,
  input  logic [BOARD_N-1:0] row_msb,
  input  logic [3:0]         x,
  output logic [2*WIN_N-1:0] brow
);
  always_comb begin
    for (int i = 0; i < WIN_N; i++) begin
      brow[i]         = row_lsb[4'(x + 4'(i))];
      brow[WIN_N + i] = row_msb[4'(x + 4'(i))];
    end
  end
endmodule
