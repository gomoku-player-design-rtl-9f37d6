// tb_main_fsm: drives the main FSM's status inputs from a small scripted
// search and checks its outputs cycle by cycle against the expected
// sequence: WAIT until black_ready drops, one STORE_BLACK cycle (board
// write, all counters cleared), LOAD (start), wait for done, then per
// window position COMPARE / NEXT_ROW pairs while rows match, NEXT_POS on a
// mismatch, NEXT_PAT at the last position, SPOT (busc) after five rows,
// PUT_WHITE, DONE with white_ready until black_ready returns.
module tb_main_fsm;
  logic clk = 0, rst_n = 0;
  logic black_ready, sram_done, line_match, row_last, pos_last;
  logic we_black, we_white, pat_clr, sram_start, pos_clr, pos_inc;
  logic row_clr, row_inc, busc, white_latch, white_ready;
  int checks = 0, failures = 0;

  main_fsm dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected output vector, in the port order below
  function automatic logic [10:0] outs();
    return {we_black, we_white, pat_clr, sram_start, pos_clr, pos_inc,
            row_clr, row_inc, busc, white_latch, white_ready};
  endfunction
  localparam logic [10:0] O_NONE  = 11'b000_0000_0000;
  localparam logic [10:0] O_STORE = 11'b101_0101_0000;  // we_black pat_clr pos_clr row_clr
  localparam logic [10:0] O_LOAD  = 11'b000_1000_0000;
  localparam logic [10:0] O_NROW  = 11'b000_0000_1000;
  localparam logic [10:0] O_NPOS  = 11'b000_0011_0000;  // pos_inc row_clr
  localparam logic [10:0] O_NPAT  = 11'b000_0101_0000;  // pos_clr row_clr
  localparam logic [10:0] O_SPOT  = 11'b000_0000_0110;  // busc white_latch
  localparam logic [10:0] O_PUTW  = 11'b010_0000_0000;
  localparam logic [10:0] O_DONE  = 11'b000_0000_0001;

  task automatic expect_out(logic [10:0] e, string what);
    checks++;
    if (outs() !== e) begin
      failures++;
      $display("FAIL %s: got %b want %b at %0t", what, outs(), e, $time);
    end
    @(negedge clk);
  endtask

  // one pattern load: LOAD then LOAD_WAIT for 'wait_cycles' cycles
  task automatic do_load(int wait_cycles);
    expect_out(O_LOAD, "LOAD");
    sram_done = 0;
    repeat (wait_cycles) expect_out(O_NONE, "LOAD_WAIT");
    sram_done = 1;
    expect_out(O_NONE, "LOAD_WAIT done");
    sram_done = 0;
  endtask

  // one window position where the first 'good' rows match
  task automatic do_position(int good, bit last);
    for (int r = 0; r < good; r++) begin
      line_match = 1; row_last = (r == 4);
      expect_out(O_NONE, "COMPARE match");
      expect_out(O_NROW, "NEXT_ROW");
      line_match = 0; row_last = 0;
    end
    if (good < 5) begin
      line_match = 0; pos_last = last;
      expect_out(O_NONE, "COMPARE mismatch");
      expect_out(last ? O_NPAT : O_NPOS, last ? "NEXT_PAT" : "NEXT_POS");
      pos_last = 0;
    end
  endtask

  initial begin
    black_ready = 1; sram_done = 0; line_match = 0; row_last = 0; pos_last = 0;
    #12 rst_n = 1;
    @(negedge clk);
    for (int mv = 0; mv < 10; mv++) begin
      repeat (3) expect_out(O_NONE, "WAIT");
      black_ready = 0;
      expect_out(O_NONE, "WAIT sees black_ready low");
      expect_out(O_STORE, "STORE_BLACK");
      do_load($urandom_range(5));
      // first pattern: never matches, ends at the last position
      do_position(2, 0);
      do_position(0, 0);
      do_position(4, 1);
      do_load($urandom_range(3));
      // second pattern matches at its third position
      do_position(1, 0);
      do_position(3, 0);
      do_position(5, 0);
      expect_out(O_SPOT, "SPOT");
      expect_out(O_PUTW, "PUT_WHITE");
      repeat (4) expect_out(O_DONE, "DONE");
      black_ready = 1;
      expect_out(O_DONE, "DONE sees black_ready");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
