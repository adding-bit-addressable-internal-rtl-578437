// mux8to1: 8-to-1 multiplexer with enable.
//
// Output is d[s] when en is high, otherwise 0. Combinational. Reads one bit
// of a register.
module mux8to1 (
  input  logic [7:0] d,
  input  logic [2:0] s,
  input  logic       en,
  output logic       y
);
  always_comb y = en & d[s];
endmodule
