// gomoku_player: a Gomoku (five in a row) player for a 16x16 board.
//
// The player keeps its own copy of the board and answers each black move
// from the PC with a white move found by pattern matching: a 5x5 pattern
// from the pattern SRAM is compared, one row at a time, with every 5x5
// window of the board; the first window that matches all five rows gives
// the move, the pattern's "spot" added to the window's position. Patterns
// are tried in memory order, so their order is the strategy.
//
// The blocks sit on three chips as in the original board:
//   R1  pc_interface                      PC port, black/white move latches
//   X1  main_fsm, board_storage, board_window, address_counter, translator
//   R2  sram_controller, pattern_store, line_comparator
// X1 and R2 share the 10-bit browspot bus (browspot_bus): the board window
// row goes to R2 for comparison, and on a match the spot comes back to X1.
//
// Interface: the PC register port of pc_interface, and the SRAM pins. The
// SRAM pins are plain signals with an enable (sram_pads_oe) standing for
// the tri-state pads: while it is low the PC owns the SRAM.
//
// Board write address: the single row address of the board RAM carries the
// black move's Y in STORE_BLACK, the white move's Y in PUT_WHITE, and the
// window row being compared otherwise; the column number goes to the write
// decoders. The translated white move is held in an X1 register (loaded in
// SPOT, written in PUT_WHITE) so the board address never depends on the
// board's own output in the same cycle.
module gomoku_player
  import gomoku_pkg::*;
#(
  parameter int unsigned N_PATTERNS = 744
) (
  input  logic               clk,
  input  logic               rst_n,
  // PC register port
  input  logic               host_wr,
  input  logic [1:0]         host_addr,
  input  logic [7:0]         host_wdata,
  output logic [7:0]         host_rdata,
  // pattern SRAM
  output logic [SRAM_AW-1:0] sram_addr,
  output logic               sram_ce_n,
  output logic               sram_oe_n,
  output logic               sram_we_n,
  output logic               sram_pads_oe,
  input  logic [7:0]         sram_dq
);
  // R1 <-> X1
  coord_t black_move, white_move, white_move_q;
  logic   black_ready, white_ready, white_latch;
  // main FSM controls
  logic we_black, we_white, pat_clr, sram_start, pos_clr, pos_inc;
  logic row_clr, row_inc, busc;
  // status
  logic sram_done, line_match, pos_last;
  // board and window
  coord_t                origin;
  logic [3:0]            scan_row, row_addr, wcol;
  logic [BOARD_N-1:0]    row_lsb, row_msb;
  logic [2*WIN_N-1:0]    brow, prow, browspot;
  square_e               wdata;
  // pattern side
  logic [2:0]            row_idx;
  spot_t                 spot;
  logic                  byte_valid;
  logic [7:0]            byte_data;

  // ---------------- R1 ----------------
  pc_interface u_pc (
    .clk, .rst_n, .host_wr, .host_addr, .host_wdata, .host_rdata,
    .black_move, .black_ready,
    .white_move_in(white_move), .white_latch, .white_ready
  );

  // ---------------- X1 ----------------
  main_fsm u_fsm (
    .clk, .rst_n,
    .black_ready, .sram_done, .line_match,
    .row_last(row_idx == 3'(WIN_N - 1)), .pos_last,
    .we_black, .we_white, .pat_clr, .sram_start, .pos_clr, .pos_inc,
    .row_clr, .row_inc, .busc, .white_latch, .white_ready
  );

  address_counter u_addr (
    .clk, .rst_n, .pos_clr, .pos_inc, .row_idx, .origin, .scan_row, .pos_last
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           white_move_q <= '0;
    else if (white_latch) white_move_q <= white_move;
  end

  always_comb begin
    row_addr = scan_row;
    wcol     = white_move_q.x;
    wdata    = SQ_WHITE;
    if (we_black) begin
      row_addr = black_move.y;
      wcol     = black_move.x;
      wdata    = SQ_BLACK;
    end else if (we_white) begin
      row_addr = white_move_q.y;
    end
  end

  board_storage u_board (
    .clk, .rst_n, .row_addr, .col(wcol), .we(we_black | we_white), .wdata,
    .row_lsb, .row_msb
  );

  board_window u_window (.row_lsb, .row_msb, .x(origin.x), .brow);

  translator u_xlate (.origin, .spot(browspot[5:0]), .move(white_move));

  // ------------- X1 <-> R2 -------------
  browspot_bus u_bus (.busc, .brow_x1(brow), .spot_r2(spot), .browspot);

  // ---------------- R2 ----------------
  sram_controller #(.N_PATTERNS(N_PATTERNS)) u_sram (
    .clk, .rst_n, .start(sram_start), .addr_clr(pat_clr), .done(sram_done),
    .sram_addr, .sram_ce_n, .sram_oe_n, .sram_we_n, .pads_oe(sram_pads_oe),
    .sram_dq, .byte_valid, .byte_data
  );

  pattern_store u_pat (
    .clk, .rst_n, .load_clr(sram_start), .byte_valid, .byte_data,
    .row_clr, .row_inc, .row_idx, .prow, .spot
  );

  line_comparator u_cmp (.brow(browspot), .prow, .match(line_match));
endmodule
