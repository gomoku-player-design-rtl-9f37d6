// tb_gomoku_player: plays whole games against the player at its default
// parameters.
//
// The testbench is the PC. It compiles a pattern file the way the host
// tool does: each seed pattern (5 strings of 5 characters: '.' don't care,
// 'b' blank, 'B' blank and the move, 'X' black, 'O' white) is rotated and
// mirrored the eight ways, duplicates are dropped, and each survivor is
// encoded as 11 bytes (rows as low-bit byte then high-bit byte, square p in
// bit 3+p; then the spot, X in bits 7..5 and Y in bits 4..2). These bytes
// are written into the SRAM model through the SRAM pins while the player has
// released them.
//
// Search time is counted in clock edges from the edge that lowers
// black_ready to the edge that raises white_ready.
//
// Each turn the PC posts a random black move on an empty square, drops
// black_ready, waits for white_ready, reads the white move and raises
// black_ready again. A reference player in the testbench searches its own
// board copy (patterns in file order, window positions in raster order) and
// predicts the move and the number of cycles the search takes:
//   5 + sum over patterns tried of (35 + sum over positions of 2*m + 2*(m<5))
// with m the number of leading rows that match at that position.
// Halfway through the first game the PC loads a different pattern file (the
// strategy change on the fly). At the end of each game the player's board is
// compared with the reference board, then the player is reset for the next.
//
// Mechanisms counted (each must happen): a pattern that matches nowhere and
// the next pattern is loaded; a partial match (rows matched, then a
// mismatch); a full match with the spot sent over the shared bus; a pattern
// file rewritten by the PC while the pins are released.
module tb_gomoku_player;
  import gomoku_pkg::*;

  localparam int MOVES_PER_GAME = 24;
  localparam int GAMES          = 3;

  logic clk = 0, rst_n = 0;
  logic host_wr;
  logic [1:0] host_addr;
  logic [7:0] host_wdata, host_rdata;
  logic [12:0] sram_addr;
  logic sram_ce_n, sram_oe_n, sram_we_n, sram_pads_oe;
  logic [7:0] sram_dq;

  // PC side of the SRAM pins
  logic [12:0] pc_addr;
  logic pc_we_n;
  logic [7:0] pc_din;

  gomoku_player dut (.*);

  sram_model u_mem (
    .clk,
    .addr(sram_pads_oe ? sram_addr : pc_addr),
    .ce_n(sram_pads_oe ? sram_ce_n : pc_we_n),
    .oe_n(sram_pads_oe ? sram_oe_n : 1'b1),
    .we_n(sram_pads_oe ? sram_we_n : pc_we_n),
    .din(pc_din),
    .dq(sram_dq)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_no_match_reload = 0, n_partial = 0, n_match_bus = 0, n_pc_reload = 0;

  // watchdog
  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  always @(posedge clk) if (rst_n) begin
    if (dut.pos_clr && !dut.we_black) n_no_match_reload++;
    if (dut.pos_inc && dut.row_idx != 3'd0) n_partial++;
    if (dut.busc) n_match_bus++;
  end

  // ---------------- pattern compiler ----------------
  typedef struct {
    logic [1:0] code [5][5];
    int sx, sy;
  } pat_t;

  pat_t pats [$];

  function automatic logic [1:0] ch_code(byte c);
    case (c)
      "X":     return 2'b01;
      "O":     return 2'b10;
      "b", "B": return 2'b00;
      default: return 2'b11;
    endcase
  endfunction

  function automatic bit same(pat_t a, pat_t b);
    if (a.sx != b.sx || a.sy != b.sy) return 0;
    for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++)
      if (a.code[r][c] != b.code[r][c]) return 0;
    return 1;
  endfunction

  // transform t: bit 2 mirror, bits 1..0 quarter turns
  function automatic pat_t xform(pat_t p, int t);
    pat_t q;
    q = p;
    if (t[2]) begin
      for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++) q.code[r][c] = p.code[r][4-c];
      q.sx = 4 - p.sx; q.sy = p.sy;
    end
    for (int k = 0; k < t[1:0]; k++) begin
      pat_t s;
      s = q;
      // quarter turn: new[r][c] = old[4-c][r]
      for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++) s.code[r][c] = q.code[4-c][r];
      s.sx = 4 - q.sy; s.sy = q.sx;
      q = s;
    end
    return q;
  endfunction

  task automatic compile(string seeds [$]);
    pats.delete();
    foreach (seeds[i]) begin
      pat_t p;
      for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++) begin
        byte ch;
        ch = seeds[i][r*5 + c];
        p.code[r][c] = ch_code(ch);
        if (ch == "B") begin p.sx = c; p.sy = r; end
      end
      for (int t = 0; t < 8; t++) begin
        pat_t v;
        bit dup;
        v = xform(p, t);
        dup = 0;
        foreach (pats[j]) if (same(pats[j], v)) dup = 1;
        if (!dup) pats.push_back(v);
      end
    end
  endtask

  // PC writes the compiled file into the SRAM over the released pins
  task automatic load_sram();
    foreach (pats[i]) begin
      for (int b = 0; b < 11; b++) begin
        logic [7:0] d;
        d = '0;
        if (b == 10) d = {3'(pats[i].sx), 3'(pats[i].sy), 2'b00};
        else for (int p = 0; p < 5; p++) d[3+p] = pats[i].code[b/2][p][b%2];
        @(negedge clk);
        chk(!sram_pads_oe, "SRAM pins released while the PC writes");
        pc_addr = 13'(i*11 + b); pc_din = d; pc_we_n = 0;
        @(negedge clk);
        pc_we_n = 1;
      end
    end
  endtask

  // ---------------- reference player ----------------
  logic [1:0] ref_b [16][16];   // [y][x]

  function automatic int lead_rows(pat_t p, int x, int y);
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++)
        if (p.code[r][c] != 2'b11 && p.code[r][c] != ref_b[y+r][x+c]) return r;
    return 5;
  endfunction

  // returns the move; cycles gets the predicted search time
  function automatic void ref_search(output int mx, output int my, output int cycles);
    cycles = 5;
    mx = -1; my = -1;
    foreach (pats[i]) begin
      cycles += 35;
      for (int y = 0; y < 12; y++)
        for (int x = 0; x < 12; x++) begin
          int m;
          m = lead_rows(pats[i], x, y);
          cycles += 2*m + ((m < 5) ? 2 : 0);
          if (m == 5) begin
            mx = x + pats[i].sx; my = y + pats[i].sy;
            return;
          end
        end
    end
  endfunction

  // ---------------- PC register port ----------------
  task automatic host_write(logic [1:0] a, logic [7:0] d);
    @(negedge clk); host_wr = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_wr = 0;
  endtask

  task automatic host_read(logic [1:0] a, output logic [7:0] d);
    @(negedge clk); host_addr = a; #1 d = host_rdata;
  endtask

  // one turn: returns 0 if the reference finds no move (game over)
  task automatic play_turn(output bit ok);
    int bx, by, wx, wy, cyc, n;
    logic [7:0] st, wm;
    // black: a random empty square
    do begin
      bx = $urandom_range(15); by = $urandom_range(15);
    end while (ref_b[by][bx] != 2'b00);
    ref_b[by][bx] = 2'b01;
    ref_search(wx, wy, cyc);
    if (wx < 0) begin ok = 0; return; end
    ok = 1;
    host_write(0, {4'(bx), 4'(by)});
    @(negedge clk); host_wr = 1; host_addr = 1; host_wdata = 8'h00;
    n = 0;
    @(posedge clk); #1 host_wr = 0; n = 1;
    while (!dut.white_ready && n < 5_000_000) begin @(posedge clk); #1 n++; end
    chk(n == cyc, $sformatf("search took %0d cycles, expected %0d", n, cyc));
    host_read(1, st);
    chk(st[1:0] == 2'b10, "status: white_ready set, black_ready low");
    host_read(2, wm);
    chk(wm == {4'(wx), 4'(wy)}, $sformatf("white move (%0d,%0d), expected (%0d,%0d)",
                                          wm[7:4], wm[3:0], wx, wy));
    ref_b[wy][wx] = 2'b10;
    host_write(1, 8'h01);
    @(negedge clk);
    @(negedge clk);
    chk(!dut.white_ready, "white_ready drops after black_ready returns");
  endtask

  task automatic compare_boards();
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++)
      chk(dut.u_board.ram[x][y] == ref_b[y][x], $sformatf("board square (%0d,%0d)", x, y));
  endtask

  // ---------------- pattern files ----------------
  string file_a [$] = '{
    // win: complete five
    {".....", ".....", "OOOOB", ".....", "....."},
    {"O....", ".O...", "..O..", "...O.", "....B"},
    {".....", ".....", "OOBOO", ".....", "....."},
    // block four
    {".....", ".....", "XXXXB", ".....", "....."},
    {"X....", ".X...", "..X..", "...X.", "....B"},
    // block open three
    {".....", ".....", "bXXXB", ".....", "....."},
    // extend own three, two
    {".....", ".....", "OOOB.", ".....", "....."},
    {".....", ".....", ".OOB.", ".....", "....."},
    // next to black
    {".....", ".....", ".XB..", ".....", "....."},
    // anything: centre of the window is blank
    {".....", ".....", "..B..", ".....", "....."}
  };
  string file_b [$] = '{
    {".....", ".....", "OOOOB", ".....", "....."},
    {".....", ".....", "XXXXB", ".....", "....."},
    {".....", ".....", "XXXB.", ".....", "....."},
    {".....", ".X...", "..B..", ".....", "....."},
    {".....", ".....", "..B..", ".....", "....."}
  };

  initial begin
    bit ok;
    host_wr = 0; host_addr = 0; host_wdata = 0;
    pc_addr = 0; pc_we_n = 1; pc_din = 0;
    for (int g = 0; g < GAMES; g++) begin
      rst_n = 0;
      repeat (3) @(negedge clk);
      rst_n = 1;
      for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) ref_b[y][x] = 2'b00;
      compile(g == 1 ? file_b : file_a);
      $display("game %0d: %0d patterns", g, pats.size());
      load_sram();
      for (int m = 0; m < MOVES_PER_GAME; m++) begin
        if (g == 0 && m == MOVES_PER_GAME / 2) begin
          compile(file_b);
          load_sram();
          n_pc_reload++;
          $display("pattern file changed: %0d patterns", pats.size());
        end
        play_turn(ok);
        if (!ok) break;
      end
      compare_boards();
    end
    $display("mechanisms: no-match reloads %0d, partial matches %0d, matches on bus %0d, pattern files changed by PC %0d",
             n_no_match_reload, n_partial, n_match_bus, n_pc_reload);
    chk(n_no_match_reload > 0, "a pattern matched nowhere and the next was loaded");
    chk(n_partial > 0, "a partial match happened");
    chk(n_match_bus > 0, "a spot went over the shared bus");
    chk(n_pc_reload > 0, "the PC changed the pattern file");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
