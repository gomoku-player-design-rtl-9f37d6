// address_counter: position of the 5x5 window on the board.
//
// Holds the window's origin (its top-left square) and slides it in raster
// order: X from 0 to 11, then the next Y, until (11,11), the last place where
// the whole window is on the board. The board row to read is the origin's
// Y plus the pattern row being compared (row_idx, 0..4). The document only
// names an address counter; the raster order is this design's choice.
//
// Interface: pos_clr puts the window at (0,0), pos_inc moves it one step;
// both act at the rising clock edge, pos_clr first. pos_last is 1 at the
// last position. origin and scan_row are combinational from the registers.
module address_counter
  import gomoku_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pos_clr,
  input  logic       pos_inc,
  input  logic [2:0] row_idx,
  output coord_t     origin,
  output logic [3:0] scan_row,
  output logic       pos_last
);
  localparam logic [3:0] LAST = 4'(BOARD_N - WIN_N);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      origin <= '0;
    end else if (pos_clr) begin
      origin <= '0;
    end else if (pos_inc) begin
      if (origin.x == LAST) begin
        origin.x <= '0;
        origin.y <= (origin.y == LAST) ? 4'd0 : origin.y + 4'd1;
      end else begin
        origin.x <= origin.x + 4'd1;
      end
    end
  end

  assign scan_row = origin.y + {1'b0, row_idx};
  assign pos_last = (origin.x == LAST) && (origin.y == LAST);
endmodule
