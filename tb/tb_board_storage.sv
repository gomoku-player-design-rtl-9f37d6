// tb_board_storage: random single-square writes into the board, with every
// row read back after each write and compared with a reference array kept
// by the testbench. Also checks that reset blanks the board and that a
// write with we low changes nothing.
module tb_board_storage;
  import gomoku_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] row_addr, col;
  logic we;
  square_e wdata;
  logic [15:0] row_lsb, row_msb;
  int checks = 0, failures = 0;
  logic [1:0] ref_b [16][16];   // [row][col]

  board_storage dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all_rows();
    for (int r = 0; r < 16; r++) begin
      row_addr = 4'(r);
      #1;
      for (int c = 0; c < 16; c++) begin
        checks++;
        if ({row_msb[c], row_lsb[c]} != ref_b[r][c]) begin
          failures++;
          $display("mismatch row %0d col %0d: got %b want %b", r, c,
                   {row_msb[c], row_lsb[c]}, ref_b[r][c]);
        end
      end
    end
  endtask

  initial begin
    we = 0; row_addr = 0; col = 0; wdata = SQ_BLANK;
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) ref_b[r][c] = 2'b00;
    #12 rst_n = 1;
    @(negedge clk);
    check_all_rows();
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      row_addr = 4'($urandom_range(15));
      col      = 4'($urandom_range(15));
      wdata    = square_e'($urandom_range(2) + ($urandom_range(9) == 0 ? 1 : 0));
      we       = ($urandom_range(7) != 0);
      if (we) ref_b[row_addr][col] = wdata;
      @(negedge clk);
      we = 0;
      if (n % 10 == 0) check_all_rows();
      else begin
        // quick check of the written row
        #1;
        for (int c = 0; c < 16; c++) begin
          checks++;
          if ({row_msb[c], row_lsb[c]} != ref_b[row_addr][c]) failures++;
        end
      end
    end
    check_all_rows();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
