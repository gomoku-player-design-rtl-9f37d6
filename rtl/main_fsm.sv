// main_fsm: sequences one white move from black_ready to white_ready.
//
// A one-hot Moore machine (each output is a function of the state alone), as
// in the document, which chose one-hot to spend flip-flops rather than the
// scarcer LUTs. The sequence follows the document's outline:
//
//   WAIT        wait until the PC drops black_ready (a black move is posted)
//   STORE_BLACK write the black move into the board; clear the pattern
//               pointer, the window position and the window (row) counter
//   LOAD        start the SRAM controller on the next pattern
//   LOAD_WAIT   wait for its done
//   COMPARE     compare the current window row with the pattern row
//   NEXT_ROW    rows matched so far + 1; after the fifth: MATCH
//   NEXT_POS    row mismatch: move the window one place, row counter to 0
//   NEXT_PAT    mismatch at the last window position: window and row
//               counter to 0, then load the next pattern
//   SPOT        busc high puts the spot on the bus; the translated move is
//               latched (in X1 for the board, in R1 for the PC)
//   PUT_WHITE   the latched move is written into the board as white
//   DONE        white_ready high until the PC raises black_ready again
//
// The loop order (each pattern tried at every window position before the
// next pattern, so the pattern file order sets the priority), the split
// into these states (SPOT and PUT_WHITE are two states so that the board's
// address never depends on the board's own output within a cycle) and the
// black_ready/white_ready handshake are this design's choices where the
// document gives only the outline.
module main_fsm (
  input  logic clk,
  input  logic rst_n,
  // inputs
  input  logic black_ready,
  input  logic sram_done,
  input  logic line_match,
  input  logic row_last,     // row counter is at the fifth row
  input  logic pos_last,     // window is at its last position
  // outputs
  output logic we_black,
  output logic we_white,
  output logic pat_clr,
  output logic sram_start,
  output logic pos_clr,
  output logic pos_inc,
  output logic row_clr,
  output logic row_inc,
  output logic busc,
  output logic white_latch,
  output logic white_ready
);
  typedef enum int unsigned {
    WAIT, STORE_BLACK, LOAD, LOAD_WAIT, COMPARE, NEXT_ROW, NEXT_POS,
    NEXT_PAT, SPOT, PUT_WHITE, DONE, N_STATES
  } state_idx_e;

  logic [N_STATES-1:0] state, state_n;

  always_comb begin
    state_n = '0;
    case (1'b1)
      state[WAIT]:        if (!black_ready) state_n[STORE_BLACK] = 1'b1;
                          else              state_n[WAIT]        = 1'b1;
      state[STORE_BLACK]: state_n[LOAD] = 1'b1;
      state[LOAD]:        state_n[LOAD_WAIT] = 1'b1;
      state[LOAD_WAIT]:   if (sram_done) state_n[COMPARE]   = 1'b1;
                          else           state_n[LOAD_WAIT] = 1'b1;
      state[COMPARE]:     if (line_match)    state_n[NEXT_ROW] = 1'b1;
                          else if (pos_last) state_n[NEXT_PAT] = 1'b1;
                          else               state_n[NEXT_POS] = 1'b1;
      state[NEXT_ROW]:    if (row_last) state_n[SPOT]    = 1'b1;
                          else          state_n[COMPARE] = 1'b1;
      state[NEXT_POS]:    state_n[COMPARE] = 1'b1;
      state[NEXT_PAT]:    state_n[LOAD] = 1'b1;
      state[SPOT]:        state_n[PUT_WHITE] = 1'b1;
      state[PUT_WHITE]:   state_n[DONE] = 1'b1;
      state[DONE]:        if (black_ready) state_n[WAIT] = 1'b1;
                          else             state_n[DONE] = 1'b1;
      default:            state_n[WAIT] = 1'b1;   // not one-hot: recover
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= N_STATES'(1) << WAIT;
    else        state <= state_n;
  end

  // Moore outputs
  assign we_black    = state[STORE_BLACK];
  assign pat_clr     = state[STORE_BLACK];
  assign sram_start  = state[LOAD];
  assign pos_clr     = state[STORE_BLACK] | state[NEXT_PAT];
  assign row_clr     = state[STORE_BLACK] | state[NEXT_PAT] | state[NEXT_POS];
  assign row_inc     = state[NEXT_ROW];
  assign pos_inc     = state[NEXT_POS];
  assign busc        = state[SPOT];
  assign we_white    = state[PUT_WHITE];
  assign white_latch = state[SPOT];
  assign white_ready = state[DONE];

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(state));
endmodule
