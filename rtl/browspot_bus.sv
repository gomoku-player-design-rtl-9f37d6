// browspot_bus: the shared wires between the X1 and R2 chips.
//
// The two chips had too few wires between them to carry both the 10-bit
// board window row (brow, X1 to R2) and the 6-bit spot of a matching
// pattern (R2 to X1), so both travel over one 10-bit bus, browspot. The
// main FSM's busc signal decides who drives: with busc low X1 drives brow,
// with busc high R2 drives spot on the low six wires. That scheme is the
// document's. Inside one chip there are no tri-state wires, so here the bus
// is the multiplexer the two output enables amount to; the upper four wires,
// undriven in the original while spot is on the bus, read as 0.
// Purely combinational.
module browspot_bus
  import gomoku_pkg::*;
(
  input  logic               busc,      // 0: X1 drives brow, 1: R2 drives spot
  input  logic [2*WIN_N-1:0] brow_x1,   // X1 side: window row
  input  spot_t              spot_r2,   // R2 side: spot of the current pattern
  output logic [2*WIN_N-1:0] browspot   // what both chips see on the wires
);
  logic x1_oe, r2_oe;
  assign x1_oe = ~busc;
  assign r2_oe = busc;

  always_comb begin
    browspot = '0;
    if (x1_oe) browspot = brow_x1;
    if (r2_oe) browspot = {4'b0000, spot_r2};
  end
endmodule
