// tb_pc_interface: the PC register port. Writes the black move and
// black_ready and reads them back, checks the outputs to the board logic,
// latches white moves with white_latch and reads them at address 2, and
// reads white_ready in the status register.
module tb_pc_interface;
  import gomoku_pkg::*;
  logic clk = 0, rst_n = 0;
  logic host_wr;
  logic [1:0] host_addr;
  logic [7:0] host_wdata, host_rdata;
  coord_t black_move, white_move_in;
  logic black_ready, white_latch, white_ready;
  int checks = 0, failures = 0;

  pc_interface dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(logic [1:0] a, logic [7:0] d);
    @(negedge clk); host_wr = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_wr = 0;
  endtask

  initial begin
    logic [7:0] bm, wm, last_wm;
    host_wr = 0; host_addr = 0; host_wdata = 0;
    white_move_in = '0; white_latch = 0; white_ready = 0;
    #12 rst_n = 1;
    @(negedge clk);
    host_addr = 1; #1 chk(host_rdata[0] == 1'b1 && black_ready, "black_ready high after reset");
    last_wm = 0;
    for (int n = 0; n < 200; n++) begin
      bm = 8'($urandom);
      wr(0, bm);
      chk(black_move == coord_t'(bm), "black_move out");
      host_addr = 0; #1 chk(host_rdata == bm, "black move read back");
      wr(1, 8'h00);
      chk(!black_ready, "black_ready dropped");
      // board logic answers
      wm = 8'($urandom);
      @(negedge clk); white_move_in = coord_t'(wm);
      white_latch = ($urandom_range(3) != 0);
      if (white_latch) last_wm = wm;
      @(negedge clk); white_latch = 0; white_move_in = coord_t'(8'($urandom));
      host_addr = 2; #1;
      chk(host_rdata == last_wm, "white move read");
      white_ready = 1; host_addr = 1; #1 chk(host_rdata[1:0] == 2'b10, "status white_ready");
      wr(1, 8'h01);
      chk(black_ready, "black_ready raised");
      white_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
