// gomoku_pkg: types and constants shared by the Gomoku player.
//
// A board square and a pattern spot use the same 2-bit code {msb, lsb}:
// 00 blank, 01 black, 10 white, 11 don't care (patterns only). This code is
// the one the pattern memory uses. A board coordinate is 8 bits, 4 for X
// (column) and 4 for Y (row); a spot inside the 5x5 window is 6 bits, 3 for
// X and 3 for Y. Putting X in the upper half of each is this design's choice.
package gomoku_pkg;

  localparam int unsigned BOARD_N       = 16;  // board is 16x16
  localparam int unsigned WIN_N         = 5;   // pattern window is 5x5
  localparam int unsigned PATTERN_BYTES = 11;  // 10 row bytes + 1 spot byte
  localparam int unsigned SRAM_AW       = 13;  // 8K x 8 SRAM

  typedef enum logic [1:0] {
    SQ_BLANK = 2'b00,
    SQ_BLACK = 2'b01,
    SQ_WHITE = 2'b10,
    SQ_ANY   = 2'b11   // don't care, only in patterns
  } square_e;

  typedef struct packed {
    logic [3:0] x;
    logic [3:0] y;
  } coord_t;

  typedef struct packed {
    logic [2:0] x;
    logic [2:0] y;
  } spot_t;

endpackage
