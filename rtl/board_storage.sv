// board_storage: the 16x16 playing board, two bits per square.
//
// Each board column is a 16-word x 2-bit RAM (the FPGA's LUT RAM in the
// original); all sixteen share one row address, so one whole row of the
// board is read at a time. A write changes a single square: two 3-to-8
// decoders turn the column number into one write enable, so although the
// whole row is addressed only one column RAM takes the data. This structure
// follows the document.
//
// Interface: row_addr selects the row that is read (and written); col and
// we/wdata write one square at the rising clock edge. row_lsb/row_msb give
// the addressed row combinationally (asynchronous read, as LUT RAM does):
// bit i of each is column i. rst_n clears the board to blank; the document
// does not say how the board is cleared (the LUT RAM started blank after
// FPGA configuration), so the reset is this design's choice.
module board_storage
  import gomoku_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [3:0]           row_addr,
  input  logic [3:0]           col,
  input  logic                 we,
  input  square_e              wdata,
  output logic [BOARD_N-1:0]   row_lsb,
  output logic [BOARD_N-1:0]   row_msb
);
  // one 16x2 RAM per column
  logic [1:0] ram [BOARD_N][BOARD_N];   // [column][row]
  logic [15:0] col_we;

  decoder3to8 u_dec_lo (.en(we & ~col[3]), .sel(col[2:0]), .out(col_we[7:0]));
  decoder3to8 u_dec_hi (.en(we &  col[3]), .sel(col[2:0]), .out(col_we[15:8]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < BOARD_N; c++)
        for (int r = 0; r < BOARD_N; r++)
          ram[c][r] <= SQ_BLANK;
    end else begin
      for (int c = 0; c < BOARD_N; c++)
        if (col_we[c]) ram[c][row_addr] <= wdata;
    end
  end

  always_comb begin
    for (int c = 0; c < BOARD_N; c++) begin
      row_lsb[c] = ram[c][row_addr][0];
      row_msb[c] = ram[c][row_addr][1];
    end
  end
endmodule
