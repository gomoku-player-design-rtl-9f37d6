// tb_board_window: random board rows, every window position 0..11; each
// window square is compared with the row bits picked out by the testbench.
module tb_board_window;
  import gomoku_pkg::*;
  logic [15:0] row_lsb, row_msb;
  logic [3:0] x;
  logic [9:0] brow;
  int checks = 0, failures = 0;

  board_window dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      row_lsb = 16'($urandom);
      row_msb = 16'($urandom);
      for (int xi = 0; xi <= 11; xi++) begin
        x = 4'(xi);
        #1;
        for (int i = 0; i < 5; i++) begin
          checks++;
          if (brow[i] != ((row_lsb >> (xi + i)) & 1) ||
              brow[5+i] != ((row_msb >> (xi + i)) & 1)) begin
            failures++;
            $display("x=%0d square %0d wrong", xi, i);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
