// sram_model: behavioural model of an 8K x 8 asynchronous SRAM (read side).
//
// Not synthesizable logic of the design: it stands for the memory chip on
// the board. dq shows mem[addr] while ce_n and oe_n are both low and
// 8'h00 otherwise (the two-state stand-in for a floating bus). A write with
// ce_n and we_n low stores din. Testbenches fill it with write_byte, the
// way the PC loads the pattern file while the player has released the pins.
module sram_model #(
  parameter int unsigned AW = 13
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          ce_n,
  input  logic          oe_n,
  input  logic          we_n,
  input  logic [7:0]    din,
  output logic [7:0]    dq
);
  logic [7:0] mem [2**AW];

  initial for (int i = 0; i < 2**AW; i++) mem[i] = 8'h00;

  always @(posedge clk) if (!ce_n && !we_n) mem[addr] <= din;

  assign dq = (!ce_n && !oe_n) ? mem[addr] : 8'h00;

  function automatic void write_byte(int unsigned a, logic [7:0] d);
    mem[a] = d;
  endfunction
endmodule
