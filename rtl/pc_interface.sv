// pc_interface: the PC side of the player, and the latches of the latest
// black and white moves.
//
// The PC posts its (black) move coordinate and then drops black_ready; the
// player answers with the white move and white_ready. This block holds the
// latest black move for the board logic and latches the white move when the
// main FSM produces it, so the PC can read it later. That much is the
// document's. The document does not describe the PC bus cycle, so the PC
// side here is a plain synchronous register port (this design's choice):
//
//   addr 0  black move, {x[3:0], y[3:0]}          read/write
//   addr 1  bit 0 black_ready (write/read), bit 1 white_ready (read only)
//   addr 2  latest white move, {x[3:0], y[3:0]}   read only
//
// Writes take effect at the rising edge with host_wr high; host_rdata is
// combinational from host_addr. black_ready comes out of reset high (no move
// posted).
module pc_interface
  import gomoku_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // PC register port
  input  logic       host_wr,
  input  logic [1:0] host_addr,
  input  logic [7:0] host_wdata,
  output logic [7:0] host_rdata,
  // to and from the board logic
  output coord_t     black_move,
  output logic       black_ready,
  input  coord_t     white_move_in,
  input  logic       white_latch,
  input  logic       white_ready
);
  coord_t white_move;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      black_move  <= '0;
      black_ready <= 1'b1;
      white_move  <= '0;
    end else begin
      if (host_wr && host_addr == 2'd0) black_move  <= host_wdata;
      if (host_wr && host_addr == 2'd1) black_ready <= host_wdata[0];
      if (white_latch)                  white_move  <= white_move_in;
    end
  end

  always_comb begin
    unique case (host_addr)
      2'd0:    host_rdata = black_move;
      2'd1:    host_rdata = {6'b0, white_ready, black_ready};
      2'd2:    host_rdata = white_move;
      default: host_rdata = '0;
    endcase
  end
endmodule
