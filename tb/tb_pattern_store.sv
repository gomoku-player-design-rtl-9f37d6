// tb_pattern_store: loads random 11-byte patterns (with random idle cycles
// between bytes) and checks every row the row counter selects, the spot,
// the counter stepping with row_inc/row_clr, and that load_clr restarts the
// store counter. Expected rows are decoded here from the byte layout: row r
// is bytes 2r (low bits) and 2r+1 (high bits), position p in bit 3+p; the
// spot is bits 7..2 of byte 10. A directed case loads the 11 bytes of a
// worked example and compares the stored rows with the square codes of the
// same pattern written as text: "B....", ".X...", ".OX..", "...X.", "....b",
// spot bits 100 100.
module tb_pattern_store;
  import gomoku_pkg::*;
  logic clk = 0, rst_n = 0;
  logic load_clr, byte_valid, row_clr, row_inc;
  logic [7:0] byte_data;
  logic [2:0] row_idx;
  logic [9:0] prow;
  spot_t spot;
  int checks = 0, failures = 0;
  logic [7:0] pat [11];

  pattern_store dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load(bit garbage_first);
    @(negedge clk); load_clr = 1; @(negedge clk); load_clr = 0;
    if (garbage_first) begin
      // a few stray bytes, then restart: only the restart must count
      for (int i = 0; i < 4; i++) begin
        byte_data = 8'($urandom); byte_valid = 1; @(negedge clk); byte_valid = 0;
      end
      load_clr = 1; @(negedge clk); load_clr = 0;
    end
    for (int i = 0; i < 11; i++) begin
      pat[i] = 8'($urandom);
      byte_data = pat[i]; byte_valid = 1;
      @(negedge clk);
      byte_valid = 0; byte_data = 8'($urandom);
      repeat ($urandom_range(2)) @(negedge clk);
    end
  endtask

  task automatic check_rows();
    row_clr = 1; @(negedge clk); row_clr = 0;
    for (int r = 0; r < 5; r++) begin
      chk(row_idx == 3'(r), "row counter");
      chk(prow == {pat[2*r+1][7:3], pat[2*r][7:3]},
          $sformatf("row %0d: got %b", r, prow));
      row_inc = 1; @(negedge clk); row_inc = 0;
    end
    chk(row_idx == 3'd5, "window counter reaches 5");
    chk(prow == '1, "row 5 reads as don't care");
    chk(spot == spot_t'(pat[10][7:2]), "spot");
  endtask

  initial begin
    load_clr = 0; byte_valid = 0; row_clr = 0; row_inc = 0; byte_data = 0;
    #12 rst_n = 1;
    begin : worked_example
      logic [7:0] ex [11] = '{8'hF0, 8'hF0, 8'hF8, 8'hE8, 8'hE8, 8'hD8,
                              8'hF8, 8'hB8, 8'h78, 8'h78, 8'h90};
      string rows [5] = '{"B....", ".X...", ".OX..", "...X.", "....b"};
      @(negedge clk); load_clr = 1; @(negedge clk); load_clr = 0;
      for (int i = 0; i < 11; i++) begin
        byte_data = ex[i]; byte_valid = 1; @(negedge clk); byte_valid = 0;
      end
      row_clr = 1; @(negedge clk); row_clr = 0;
      for (int r = 0; r < 5; r++) begin
        for (int p = 0; p < 5; p++) begin
          logic [1:0] want;
          case (rows[r][p])
            "X":      want = 2'b01;
            "O":      want = 2'b10;
            "B", "b": want = 2'b00;
            default:  want = 2'b11;
          endcase
          chk({prow[5+p], prow[p]} == want, $sformatf("example row %0d square %0d", r, p));
        end
        row_inc = 1; @(negedge clk); row_inc = 0;
      end
      chk(spot.x == 3'd4 && spot.y == 3'd4, "example spot");
    end
    for (int n = 0; n < 100; n++) begin
      load(n % 7 == 3);
      check_rows();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
