// tb_sram_controller: the controller reading patterns from an SRAM model.
// Checks, for each start: the 11 bytes handed over are the next 11 bytes of
// memory in order, done comes exactly 34 cycles after start (3 cycles per
// byte plus one), the pads are released whenever the controller is idle,
// addr_clr restarts at the first pattern and the pointer wraps after
// N_PATTERNS patterns (set small here).
module tb_sram_controller;
  import gomoku_pkg::*;
  localparam int NP = 4;
  logic clk = 0, rst_n = 0;
  logic start, addr_clr, done;
  logic [12:0] sram_addr;
  logic sram_ce_n, sram_oe_n, sram_we_n, pads_oe;
  logic [7:0] sram_dq;
  logic byte_valid;
  logic [7:0] byte_data;
  int checks = 0, failures = 0;

  sram_controller #(.N_PATTERNS(NP)) dut (.*);
  sram_model u_mem (.clk, .addr(sram_addr), .ce_n(sram_ce_n | ~pads_oe),
                    .oe_n(sram_oe_n | ~pads_oe), .we_n(1'b1), .din(8'h00),
                    .dq(sram_dq));
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

  // one pattern load, expecting to start at pattern p
  task automatic load_and_check(int p);
    int nbytes, cycles;
    @(negedge clk);
    chk(!pads_oe && sram_ce_n && sram_oe_n, "pads released while idle");
    start = 1; @(negedge clk); start = 0;
    nbytes = 0; cycles = 1;
    while (!done && cycles < 100) begin
      if (byte_valid) begin
        chk(byte_data == 8'(p * 11 + nbytes + 1), $sformatf("byte %0d of pattern %0d: %h", nbytes, p, byte_data));
        nbytes++;
      end
      chk(pads_oe, "pads driven while reading");
      @(negedge clk); cycles++;
    end
    chk(nbytes == 11, $sformatf("11 bytes, got %0d", nbytes));
    chk(cycles == 34, $sformatf("done after 34 cycles, got %0d", cycles));
    @(negedge clk);
    chk(!done, "done lasts one cycle");
  endtask

  initial begin
    start = 0; addr_clr = 0;
    for (int a = 0; a < NP * 11; a++) u_mem.write_byte(a, 8'(a + 1));
    #12 rst_n = 1;
    for (int p = 0; p < NP; p++) load_and_check(p);
    load_and_check(0);                       // wrapped
    load_and_check(1);
    @(negedge clk); addr_clr = 1; @(negedge clk); addr_clr = 0;
    load_and_check(0);
    // idle for a while: the pads stay released
    repeat (20) begin
      @(negedge clk);
      chk(!pads_oe && !byte_valid && !done, "idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
