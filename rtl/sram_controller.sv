// sram_controller: reads the next pattern from the onboard SRAM.
//
// On start the controller reads the next PATTERN_BYTES (11) bytes of the
// 8K x 8 SRAM, one after another, and hands each to the pattern store with
// byte_valid; after the last it raises done for one cycle. A pattern
// address counter remembers where the next pattern begins; addr_clr sends it
// back to the first pattern and it wraps after N_PATTERNS patterns. While
// the controller waits for start its pads are released (pads_oe low, the
// tri-state of the original) so the host PC can rewrite the SRAM and so
// change the strategy without stopping the design. All of that is the
// document's.
//
// The state code is assigned by hand so that every SRAM control output is a
// state bit: no decoding logic, so no glitches on the SRAM pins (the
// document's reason). Each byte takes three cycles: ADDR (address and chip
// enable out), READ (output enable on), LATCH (byte sampled at the end of the
// cycle, address counted up). The three-cycle read and the bit assignment
// are this design's choices. done follows 34 cycles after start is taken.
module sram_controller
  import gomoku_pkg::*;
#(
  parameter int unsigned N_PATTERNS = 744   // 8192 / 11 patterns fit in 8 KB
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               addr_clr,
  output logic               done,
  // SRAM pins
  output logic [SRAM_AW-1:0] sram_addr,
  output logic               sram_ce_n,
  output logic               sram_oe_n,
  output logic               sram_we_n,
  output logic               pads_oe,     // 0: SRAM pins released to the PC
  input  logic [7:0]         sram_dq,
  // to the pattern store
  output logic               byte_valid,
  output logic [7:0]         byte_data
);
  // state bits: [4] done, [3] latch, [2] oe, [1] ce, [0] pads
  typedef enum logic [4:0] {
    S_IDLE  = 5'b00000,
    S_ADDR  = 5'b00011,
    S_READ  = 5'b00111,
    S_LATCH = 5'b01111,
    S_DONE  = 5'b10000
  } state_e;

  localparam logic [SRAM_AW-1:0] LAST_ADDR = SRAM_AW'(N_PATTERNS * PATTERN_BYTES - 1);

  state_e             state, state_n;
  logic [3:0]         byte_cnt;
  logic [SRAM_AW-1:0] addr;

  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE:  if (start) state_n = S_ADDR;
      S_ADDR:  state_n = S_READ;
      S_READ:  state_n = S_LATCH;
      S_LATCH: state_n = (byte_cnt == 4'(PATTERN_BYTES - 1)) ? S_DONE : S_ADDR;
      S_DONE:  state_n = S_IDLE;
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      byte_cnt <= '0;
      addr     <= '0;
    end else begin
      state <= state_n;
      if (state == S_IDLE) begin
        byte_cnt <= '0;
        if (addr_clr) addr <= '0;
      end else if (state == S_LATCH) begin
        byte_cnt <= byte_cnt + 4'd1;
        addr     <= (addr == LAST_ADDR) ? '0 : addr + 1'b1;
      end
    end
  end

  assign pads_oe    = state[0];
  assign sram_ce_n  = ~state[1];
  assign sram_oe_n  = ~state[2];
  assign sram_we_n  = 1'b1;        // only read: the PC writes the patterns
  assign byte_valid = state[3];
  assign done       = state[4];
  assign sram_addr  = addr;
  assign byte_data  = sram_dq;

  // the SRAM is never read while the pads are released
  a_pads_when_reading: assert property (@(posedge clk) disable iff (!rst_n)
    (!sram_oe_n || !sram_ce_n) |-> pads_oe);
endmodule
