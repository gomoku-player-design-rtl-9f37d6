// tb_address_counter: steps the window through all 144 positions and checks
// raster order (X fastest), the pos_last flag only at (11,11), the wrap
// back to (0,0), pos_clr, and scan_row = origin Y + row index.
module tb_address_counter;
  import gomoku_pkg::*;
  logic clk = 0, rst_n = 0;
  logic pos_clr, pos_inc;
  logic [2:0] row_idx;
  coord_t origin;
  logic [3:0] scan_row;
  logic pos_last;
  int checks = 0, failures = 0;

  address_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    pos_clr = 0; pos_inc = 0; row_idx = 0;
    #12 rst_n = 1;
    for (int pass = 0; pass < 2; pass++)
      for (int y = 0; y < 12; y++)
        for (int x = 0; x < 12; x++) begin
          @(negedge clk);
          chk(origin.x == 4'(x) && origin.y == 4'(y), $sformatf("origin (%0d,%0d) got (%0d,%0d)", x, y, origin.x, origin.y));
          chk(pos_last == (x == 11 && y == 11), "pos_last");
          row_idx = 3'($urandom_range(4));
          #1 chk(scan_row == 4'(y + row_idx), "scan_row");
          pos_inc = 1;
          @(negedge clk);
          pos_inc = 0;
          @(negedge clk);
          if (!(x == 11 && y == 11)) begin
            chk(!(origin.x == 4'(x) && origin.y == 4'(y)), "moved");
          end
        end
    // pos_clr from the middle
    @(negedge clk); pos_inc = 1; repeat (30) @(negedge clk); pos_inc = 0;
    chk(origin.y == 4'd2 && origin.x == 4'd6, "30 steps");
    pos_clr = 1; pos_inc = 1; @(negedge clk); pos_clr = 0; pos_inc = 0;
    chk(origin == '0, "pos_clr wins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
