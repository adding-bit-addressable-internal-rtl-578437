// dec3to8: 3-to-8 one-hot decoder with enable.
//
// dec[i] is high when en is high and x equals i. Combinational. Used twice
// in the register file: once to pick the register (R0-R7) and once, as the
// second decoder, to pick the bit inside it.
module dec3to8 (
  input  logic       en,
  input  logic [2:0] x,
  output logic [7:0] dec
);
  always_comb dec = en ? (8'b1 << x) : 8'b0;
endmodule
