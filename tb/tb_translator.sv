// tb_translator: every window origin (0..11 in X and Y) with every spot
// inside the window (0..4 in X and Y); the move must be origin + spot.
module tb_translator;
  import gomoku_pkg::*;
  coord_t origin, move;
  spot_t spot;
  int checks = 0, failures = 0;

  translator dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ox = 0; ox < 12; ox++)
      for (int oy = 0; oy < 12; oy++)
        for (int sx = 0; sx < 5; sx++)
          for (int sy = 0; sy < 5; sy++) begin
            origin.x = 4'(ox); origin.y = 4'(oy);
            spot.x = 3'(sx);   spot.y = 3'(sy);
            #1;
            checks++;
            if (move.x != 4'(ox + sx) || move.y != 4'(oy + sy)) begin
              failures++;
              $display("origin (%0d,%0d) spot (%0d,%0d) -> (%0d,%0d)",
                       ox, oy, sx, sy, move.x, move.y);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
