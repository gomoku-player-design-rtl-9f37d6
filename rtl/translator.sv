// translator: turns a pattern's spot into a board coordinate.
//
// The spot is a 3-bit X and a 3-bit Y inside the 5x5 window; adding them to
// the window's board origin (4-bit X and Y) gives the 8-bit board
// coordinate of the white move. The addition is the document's; dropping
// the carry (a legal pattern keeps the spot inside the window, so the sum
// stays on the board) is this design's choice. Purely combinational.
module translator
  import gomoku_pkg::*;
(
  input  coord_t origin,
  input  spot_t  spot,
  output coord_t move
);
  assign move.x = origin.x + {1'b0, spot.x};
  assign move.y = origin.y + {1'b0, spot.y};
endmodule
