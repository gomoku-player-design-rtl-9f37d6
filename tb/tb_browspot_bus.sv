// tb_browspot_bus: with busc low the bus must carry the window row, with
// busc high the spot on its low six wires and zeros above.
module tb_browspot_bus;
  import gomoku_pkg::*;
  logic busc;
  logic [9:0] brow_x1, browspot;
  spot_t spot_r2;
  int checks = 0, failures = 0;

  browspot_bus dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      brow_x1 = 10'($urandom);
      spot_r2 = 6'($urandom);
      busc    = 1'($urandom);
      #1;
      checks++;
      if (browspot != (busc ? {4'b0, 6'(spot_r2)} : brow_x1)) begin
        failures++;
        $display("busc=%b brow=%h spot=%h bus=%h", busc, brow_x1, spot_r2, browspot);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
