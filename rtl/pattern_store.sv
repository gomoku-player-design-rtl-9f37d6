// pattern_store: holds the pattern currently searched for.
//
// A pattern is 11 bytes from the pattern memory. For each of the five rows
// come two bytes, first the low bits then the high bits of the row's five
// 2-bit codes, with window position p in bit 3+p (bits 2..0 unused). The
// eleventh byte carries the 6-bit spot in bits 7..2: X in 7..5, Y in 4..2.
// The byte order and the row bit layout follow the document's worked
// example; the spot's bit places are this design's reading of it.
//
// Storage is 50 flip-flops for the pattern and 6 for the spot, as in the
// document. A store counter steps through the 11 bytes as they arrive
// (load_clr restarts it); a row counter (the window counter) selects the
// pattern row that goes to the comparator. row_clr / row_inc act at the
// rising edge. prow = {msb[4:0], lsb[4:0]} of row row_idx, combinational;
// with row_idx 5 or more it reads as all don't care.
module pattern_store
  import gomoku_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load_clr,    // restart the store counter
  input  logic               byte_valid,  // byte_data is the next pattern byte
  input  logic [7:0]         byte_data,
  input  logic               row_clr,
  input  logic               row_inc,
  output logic [2:0]         row_idx,
  output logic [2*WIN_N-1:0] prow,
  output spot_t              spot
);
  logic [WIN_N-1:0] lsb [WIN_N];
  logic [WIN_N-1:0] msb [WIN_N];
  logic [3:0]       store_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      store_cnt <= '0;
      spot      <= '0;
      for (int r = 0; r < WIN_N; r++) begin
        lsb[r] <= '1;
        msb[r] <= '1;
      end
    end else if (load_clr) begin
      store_cnt <= '0;
    end else if (byte_valid) begin
      if (store_cnt == 4'(PATTERN_BYTES - 1)) begin
        spot      <= byte_data[7:2];
        store_cnt <= '0;
      end else begin
        if (store_cnt[0]) msb[store_cnt[3:1]] <= byte_data[7:3];
        else              lsb[store_cnt[3:1]] <= byte_data[7:3];
        store_cnt <= store_cnt + 4'd1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       row_idx <= '0;
    else if (row_clr) row_idx <= '0;
    else if (row_inc) row_idx <= row_idx + 3'd1;
  end

  always_comb begin
    prow = '1;
    if (row_idx < 3'(WIN_N)) prow = {msb[row_idx], lsb[row_idx]};
  end
endmodule
