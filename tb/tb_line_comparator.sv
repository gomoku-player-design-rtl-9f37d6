// tb_line_comparator: random and biased pattern/board rows. The expected
// result is worked out square by square: a pattern code 11 matches anything,
// any other code must equal the board code.
module tb_line_comparator;
  logic [9:0] brow, prow;
  logic match;
  int checks = 0, failures = 0;
  int hits = 0;

  line_comparator dut (.*);

  function automatic logic expect_match(logic [9:0] b, logic [9:0] p);
    for (int i = 0; i < 5; i++) begin
      logic [1:0] pc, bc;
      pc = {p[5+i], p[i]};
      bc = {b[5+i], b[i]};
      if (pc != 2'b11 && pc != bc) return 1'b0;
    end
    return 1'b1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      brow = 10'($urandom);
      prow = 10'($urandom);
      if (n % 2 == 0) begin
        // make most squares agree so that matches are frequent
        for (int i = 0; i < 5; i++)
          if ($urandom_range(3) != 0) begin
            prow[i] = brow[i];
            prow[5+i] = brow[5+i];
          end
      end
      #1;
      checks++;
      if (match) hits++;
      if (match != expect_match(brow, prow)) begin
        failures++;
        $display("brow=%b prow=%b got %b", brow, prow, match);
      end
    end
    checks++;
    if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
