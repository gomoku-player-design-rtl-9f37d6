// decoder3to8: active-high 3-to-8 decoder with an enable.
//
// out[i] is 1 when en is 1 and sel equals i. Two of these, enabled by the
// top bit of the column number and its complement, give the sixteen column
// write enables of the board storage, as the original board logic did;
// using col[3] as the selector is this design's choice. Purely combinational.
module decoder3to8 (
  input  logic       en,
  input  logic [2:0] sel,
  output logic [7:0] out
);
  always_comb begin
    out = '0;
    if (en) out[sel] = 1'b1;
  end
endmodule
